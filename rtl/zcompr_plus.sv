// zcompr_plus: Zcompr+ expansion stage of the decompressor controller.
//
// Reads compressed tokens (ztok_t) and emits expanded tokens (dtok_t) in
// which every unimplemented instruction is a full state-update record:
//   TOK_PRED   -> passed on as a marker with its run length
//   TOK_UNIMPL -> passed on; with RETAIN set the record is also written
//                 into the instruction buffer's LRU slot
//   TOK_REF    -> replaced by the record held in buffer slot IDX, which
//                 becomes most recently used
// The ZIP-IO paper gives this behaviour (a small LRU table of earlier
// unimplemented instructions, a flag that makes the decompressor update its
// table, references as indices); the token encoding and the single output
// register are this design's own. Timing: one token per cycle, one cycle
// of latency, valid/ready on both sides with a skid-free output register
// (in_ready = output register empty or being drained).
module zcompr_plus
  import zipio_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  ztok_t in_tok,
  output logic  out_valid,
  input  logic  out_ready,
  output dtok_t out_tok,
  // statistics
  output logic [31:0] n_refs,
  output logic [31:0] n_retained
);
  localparam int unsigned SW = $clog2(ENTRIES);

  upd_t          buf_rd;
  logic          fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  wire do_store = fire && in_tok.kind == TOK_UNIMPL && in_tok.retain;
  wire do_ref   = fire && in_tok.kind == TOK_REF;

  instr_buffer #(.ENTRIES(ENTRIES)) u_buf (
    .clk, .rst_n,
    .wr_en  (do_store),
    .wr_data(in_tok.upd),
    .wr_slot(),
    .rd_en  (do_ref),
    .rd_idx (in_tok.idx[SW-1:0]),
    .rd_data(buf_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_tok    <= '0;
      n_refs     <= '0;
      n_retained <= '0;
    end else begin
      if (fire) begin
        out_valid     <= 1'b1;
        out_tok.unimpl <= (in_tok.kind != TOK_PRED);
        out_tok.count  <= in_tok.count;
        out_tok.upd    <= (in_tok.kind == TOK_REF) ? buf_rd : in_tok.upd;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (do_ref)   n_refs     <= n_refs + 1;
      if (do_store) n_retained <= n_retained + 1;
    end
  end

  a_kind_known: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_tok.kind inside {TOK_PRED, TOK_UNIMPL, TOK_REF});
endmodule
