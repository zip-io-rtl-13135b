// trace_parser: the parser of the decompressor controller.
//
// Splits the expanded token stream in two, as drawn in the ZIP-IO paper's
// structure figure: markers (predictable-trace indicators) go only to the
// predictor CPU; an unpredictable record goes both to the predictor CPU,
// which patches its state with it, and down the bypass to the output merge,
// where it becomes the record of that instruction. The fork is taken in
// one cycle: an unpredictable record leaves only when both outputs are
// ready, which keeps the two copies in step. Purely combinational
// valid/ready routing; no storage.
module trace_parser
  import zipio_pkg::*;
(
  input  logic  in_valid,
  output logic  in_ready,
  input  dtok_t in_tok,
  // to the core controller of the predictor CPU
  output logic  cpu_valid,
  input  logic  cpu_ready,
  output dtok_t cpu_tok,
  // bypass to the output merge
  output logic  byp_valid,
  input  logic  byp_ready,
  output upd_t  byp_upd
);
  always_comb begin
    cpu_tok = in_tok;
    byp_upd = in_tok.upd;
    if (in_tok.unimpl) begin
      cpu_valid = in_valid && byp_ready;
      byp_valid = in_valid && cpu_ready;
      in_ready  = cpu_ready && byp_ready;
    end else begin
      cpu_valid = in_valid;
      byp_valid = 1'b0;
      in_ready  = cpu_ready;
    end
  end
endmodule
