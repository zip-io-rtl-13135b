// decomp_ctrl: the decompressor controller, which sits between the input
// FIFO and the predictor CPU.
//
// It is the composition the ZIP-IO paper draws for this unit: the Zcompr+
// expansion stage with its instruction buffer, followed by the parser.
// Compressed tokens come in; markers leave towards the predictor CPU, and
// unpredictable records leave both towards the predictor CPU and down the
// bypass to the output merge. One token per cycle, one cycle of latency
// (in the Zcompr+ output register); valid/ready throughout. busy is high
// while a token sits between the two stages.
module decomp_ctrl
  import zipio_pkg::*;
#(
  parameter int unsigned IBUF_ENTRIES = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  ztok_t in_tok,
  output logic  cpu_valid,
  input  logic  cpu_ready,
  output dtok_t cpu_tok,
  output logic  byp_valid,
  input  logic  byp_ready,
  output upd_t  byp_upd,
  output logic [31:0] n_refs,
  output logic [31:0] n_retained,
  output logic        busy
);
  logic  x_valid, x_ready;
  dtok_t x_tok;

  zcompr_plus #(.ENTRIES(IBUF_ENTRIES)) u_zplus (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_tok,
    .out_valid(x_valid), .out_ready(x_ready), .out_tok(x_tok),
    .n_refs, .n_retained
  );

  assign busy = x_valid;

  trace_parser u_parser (
    .in_valid(x_valid), .in_ready(x_ready), .in_tok(x_tok),
    .cpu_valid, .cpu_ready, .cpu_tok,
    .byp_valid, .byp_ready, .byp_upd
  );
endmodule
