// stdio_mux: shares one standard-I/O request/response channel between N
// hardware clients (in this system the trace reader, the trace writer and
// the log printer).
//
// Requests: round-robin. Starting after the client granted last, the first
// client with a request wins; one request passes per cycle, and a client
// that is refused keeps its request stable. Responses: steered by the
// client tag the host echoes (client i must tag its requests with i); every
// client always accepts, so the response channel is always ready.
// Combinational except for the round-robin pointer. The paper says only
// that the STDIO service is shared by user hardware; the arbitration is
// this design's choice.
module stdio_mux
  import stdio_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  // clients
  input  logic     c_req_valid [N],
  output logic     c_req_ready [N],
  input  sio_req_t c_req       [N],
  output logic     c_rsp_valid [N],
  // channel to the host
  output logic     req_valid,
  input  logic     req_ready,
  output sio_req_t req,
  input  logic     rsp_valid,
  output logic     rsp_ready,
  input  sio_rsp_t rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  typedef logic [IW-1:0] idx_t;

  idx_t last;   // client granted most recently
  idx_t pick;
  logic found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx_t i;
      i = idx_t'((32'(last) + k) % N);
      if (!found && c_req_valid[i]) begin
        found = 1'b1;
        pick  = i;
      end
    end
    req_valid = found;
    req       = c_req[pick];
    rsp_ready = 1'b1;
    for (int unsigned i = 0; i < N; i++) begin
      c_req_ready[i] = req_ready && found && pick == idx_t'(i);
      c_rsp_valid[i] = rsp_valid && 32'(rsp.client) == i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    last <= idx_t'(N - 1);
    else if (req_valid && req_ready) last <= pick;
  end
endmodule
