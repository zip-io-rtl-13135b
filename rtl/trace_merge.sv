// trace_merge: the output merge ("+") in front of the output FIFO.
//
// Two record sources meet here: predicted records from the prediction
// core's last stage and unpredictable records from the parser's bypass.
// The core controller only lets an unpredictable record through once the
// core is drained, so the two rarely compete; when they do the bypass wins,
// because its record is the older one. Bypass records leave with
// predicted = 0 and pc = 0. Combinational valid/ready mux, no storage.
module trace_merge
  import zipio_pkg::*;
(
  input  logic  core_valid,
  output logic  core_ready,
  input  trec_t core_rec,
  input  logic  byp_valid,
  output logic  byp_ready,
  input  upd_t  byp_upd,
  output logic  out_valid,
  input  logic  out_ready,
  output trec_t out_rec
);
  always_comb begin
    out_valid  = core_valid || byp_valid;
    byp_ready  = out_ready;
    core_ready = out_ready && !byp_valid;
    if (byp_valid) begin
      out_rec.predicted = 1'b0;
      out_rec.pc        = '0;
      out_rec.upd       = byp_upd;
    end else begin
      out_rec = core_rec;
    end
  end
endmodule
