// sync_fifo: synchronous first-in first-out buffer with valid/ready ports.
//
// Used for the decompressor's input FIFO (compressed tokens from the host)
// and output FIFO (inflated records back to the host). The ZIP-IO paper names
// both FIFOs but gives neither depth nor width; DEPTH defaults are this
// design's choice. Storage is a circular array with read and write
// pointers one bit wider than the index so full and empty are told apart.
// Timing: a word written in cycle t is visible at the output in t+1
// (no fall-through). in_ready = not full, out_valid = not empty; a push and
// a pop may happen in the same cycle. Reset empties the FIFO.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW:0] wptr, rptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  function automatic logic [AW:0] bump(input logic [AW:0] p);
    if (p[AW-1:0] == AW'(DEPTH - 1)) return {~p[AW], {AW{1'b0}}};
    return p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= bump(wptr);
      if (pop)  rptr <= bump(rptr);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_comb begin
    out_valid = (wptr != rptr);
    in_ready  = !((wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]));
    out_data  = mem[rptr[AW-1:0]];
    if (wptr[AW] == rptr[AW]) level = ($clog2(DEPTH)+1)'(wptr[AW-1:0] - rptr[AW-1:0]);
    else                      level = ($clog2(DEPTH)+1)'(DEPTH) - ($clog2(DEPTH)+1)'(rptr[AW-1:0] - wptr[AW-1:0]);
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> $stable(wptr));
endmodule
