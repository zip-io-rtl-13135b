// stdio_reader: hardware side of a standard-I/O file read with
// split-phase requests, as the ZIP-IO paper describes for hiding the
// host's read latency.
//
// After reset it opens the file named by string handle NAME_STR, then
// keeps up to MAX_OUT FREAD requests of CHUNK words in flight. A request
// is issued only when the receive buffer (BUF_WORDS deep) has room for
// every word already requested plus the new chunk, so responses are
// always accepted. Words leave in
// file order on a valid/ready stream. After a response marked eof no more
// reads are issued; once the outstanding ones are answered and the buffer
// is empty, eof is raised. The paper gives the split-phase idea; the
// chunking, credit rule and buffer are this design's choices.
// Timing: one request per cycle at most, one response word per cycle.
module stdio_reader
  import stdio_pkg::*;
#(
  parameter client_t     CLIENT    = 2'd0,
  parameter logic [15:0] NAME_STR  = 16'd0,
  parameter int unsigned CHUNK     = 16,
  parameter int unsigned MAX_OUT   = 4,
  parameter int unsigned BUF_WORDS = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // request channel
  output logic        req_valid,
  input  logic        req_ready,
  output sio_req_t    req,
  // responses addressed to this client
  input  logic        rsp_valid,
  input  sio_rsp_t    rsp,
  // file contents
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        eof,
  output logic [7:0]  max_inflight
);
  typedef enum logic [1:0] {S_OPEN, S_OPEN_WAIT, S_READ, S_END} state_e;
  state_e state;

  logic [15:0] handle;
  logic [$clog2(MAX_OUT+1)-1:0] inflight;
  logic [15:0] cur_cnt;   // words received so far for the oldest read
  logic [$clog2(BUF_WORDS):0]     level;
  logic        seen_eof;

  wire rsp_word  = rsp_valid && rsp.op == SIO_FREAD && !rsp.nodata;
  wire rsp_last  = rsp_valid && rsp.op == SIO_FREAD && rsp.last;
  // room for every word still owed by reads in flight, plus a new chunk
  wire [31:0] owed = 32'(inflight) * CHUNK - 32'(cur_cnt);
  wire buf_room  = (32'(level) + owed + CHUNK) <= BUF_WORDS;
  wire can_read  = state == S_READ && !seen_eof && 32'(inflight) < MAX_OUT && buf_room;

  always_comb begin
    req        = '0;
    req.client = CLIENT;
    req.handle = handle;
    req_valid  = 1'b0;
    if (state == S_OPEN) begin
      req_valid = 1'b1;
      req.op    = SIO_FOPEN;
      req.arg   = NAME_STR;
    end else if (can_read) begin
      req_valid = 1'b1;
      req.op    = SIO_FREAD;
      req.arg   = 16'(CHUNK);
    end
  end

  wire issue = req_valid && req_ready && req.op == SIO_FREAD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_OPEN;
      handle       <= '0;
      inflight     <= '0;
      cur_cnt      <= '0;
      seen_eof     <= 1'b0;
      max_inflight <= '0;
    end else begin
      unique case (state)
        S_OPEN:      if (req_ready) state <= S_OPEN_WAIT;
        S_OPEN_WAIT: if (rsp_valid && rsp.op == SIO_FOPEN) begin
                       handle <= rsp.data[15:0];
                       state  <= S_READ;
                     end
        S_READ:      if (seen_eof && inflight == 0) state <= S_END;
        S_END:       ;
      endcase
      inflight <= inflight + $bits(inflight)'(issue) - $bits(inflight)'(rsp_last);
      // a short answer releases the rest of its reservation
      if (rsp_last)      cur_cnt <= '0;
      else if (rsp_word) cur_cnt <= cur_cnt + 1'b1;
      if (rsp_last && rsp.eof) seen_eof <= 1'b1;
      if (32'(inflight) > 32'(max_inflight)) max_inflight <= 8'(inflight);
    end
  end

  sync_fifo #(.T(logic [31:0]), .DEPTH(BUF_WORDS)) u_buf (
    .clk, .rst_n,
    .in_valid(rsp_word), .in_ready(), .in_data(rsp.data),
    .out_valid, .out_ready, .out_data,
    .level
  );

  assign eof = (state == S_END) && !out_valid;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_word |-> 32'(level) < BUF_WORDS);
endmodule
