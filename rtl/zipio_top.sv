// zipio_top: the ZIP-IO hardware trace decompressor (Zcompr with the
// Zcompr+ extension).
//
// Data flow, as in the ZIP-IO paper's structure figure:
//   compressed tokens -> input FIFO -> decompressor controller
//     (Zcompr+ expansion with instruction buffer, parser)
//   markers and unpredictable records -> predictor CPU
//     (core controller, PC/regs/caches, prediction core)
//   predicted records (from the core) and unpredictable records (bypass
//     from the parser) -> merge -> output FIFO -> inflated records.
// On the host side the two streams would be carried by a standard-I/O
// service (file and pipe reads and writes); here they are plain
// valid/ready ports of one token or one record per transfer. The program
// binary is written word by word through prog_* and the starting PC set
// with start_*, before the trace is streamed. idle is high when no token
// or record is held anywhere and the predictor has no credit left.
//
// Output order equals instruction order: a record from the bypass is
// released only after every previously credited predicted step has left
// the core. Throughput: one inflated instruction per cycle while the
// predictor runs (two for a load); an unpredictable record costs the drain
// of the core plus one cycle.
//
// Parameter defaults: FIFO depths, instruction-buffer entries and the
// memory window are this design's choices; the ZIP-IO paper gives none.
module zipio_top
  import zipio_pkg::*;
#(
  parameter int unsigned IN_DEPTH     = 64,
  parameter int unsigned OUT_DEPTH    = 64,
  parameter int unsigned IBUF_ENTRIES = 16,
  parameter int unsigned MEM_AW       = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // compressed trace in
  input  logic        in_valid,
  output logic        in_ready,
  input  ztok_t       in_tok,
  // inflated trace out
  output logic        out_valid,
  input  logic        out_ready,
  output trec_t       out_rec,
  // program binary and start address
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic        start_we,
  input  logic [31:0] start_pc,
  output logic        prog_ready,
  // status and statistics
  output logic        err_unimpl,
  output logic [31:0] n_refs,
  output logic [31:0] n_retained,
  output logic [31:0] n_markers,
  output logic [31:0] n_patches,
  output logic [31:0] n_drain_wait,
  output logic        idle
);
  logic  q_valid, q_ready, d_busy;
  ztok_t q_tok;
  logic  c_valid, c_ready;
  dtok_t c_tok;
  logic  b_valid, b_ready;
  upd_t  b_upd;
  logic  p_valid, p_ready;
  trec_t p_rec;
  logic  m_valid, m_ready;
  trec_t m_rec;

  sync_fifo #(.T(ztok_t), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_tok),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_tok),
    .level()
  );

  decomp_ctrl #(.IBUF_ENTRIES(IBUF_ENTRIES)) u_dctrl (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_tok(q_tok),
    .cpu_valid(c_valid), .cpu_ready(c_ready), .cpu_tok(c_tok),
    .byp_valid(b_valid), .byp_ready(b_ready), .byp_upd(b_upd),
    .n_refs, .n_retained, .busy(d_busy)
  );

  predictor_cpu #(.MEM_AW(MEM_AW)) u_cpu (
    .clk, .rst_n,
    .tok_valid(c_valid), .tok_ready(c_ready), .tok(c_tok),
    .prog_we, .prog_addr, .prog_data, .start_we, .start_pc, .prog_ready,
    .out_valid(p_valid), .out_ready(p_ready), .out_rec(p_rec),
    .err_unimpl, .n_markers, .n_patches, .n_drain_wait
  );

  // nothing buffered anywhere and the predictor drained
  assign idle = !q_valid && !d_busy && prog_ready && !out_valid;

  trace_merge u_merge (
    .core_valid(p_valid), .core_ready(p_ready), .core_rec(p_rec),
    .byp_valid(b_valid), .byp_ready(b_ready), .byp_upd(b_upd),
    .out_valid(m_valid), .out_ready(m_ready), .out_rec(m_rec)
  );

  sync_fifo #(.T(trec_t), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid(m_valid), .in_ready(m_ready), .in_data(m_rec),
    .out_valid, .out_ready, .out_data(out_rec),
    .level()
  );
endmodule
