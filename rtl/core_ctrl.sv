// core_ctrl: the core controller of the predictor CPU.
//
// It consumes the parser's tokens addressed to the predictor CPU:
//   marker (unimpl = 0, run length COUNT) - adds COUNT issue credits; the
//       prediction core may commit one instruction per credit and halts
//       before issue when none is left (the halt interface).
//   unpredictable record - accepted only once the core has inflated every
//       credited step and emptied its pipeline (credits = 0 and core idle).
//       In the accepting cycle the controller patches the state as the
//       record says: register write, memory write (byte enables), and
//       pc <= npc, npc <= npc + npc_delta. The core then restarts on the
//       next block of credited steps.
// This wait-halt-patch-restart sequence is the ZIP-IO paper's; the credit
// counter and the one-cycle patch are this design's choices. The parser
// hands the same record to the output bypass in the same cycle, so the
// record reaches the output after all earlier predicted records.
//
// A load port writes program words into memory and a start port sets the
// initial pc/npc; both act only while nothing is credited and the core is
// idle (the ZIP-IO paper does not say how the program binary reaches the
// predictor CPU). Statistics count markers, patches and the cycles a
// record waited for the core to drain.
module core_ctrl
  import zipio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // tokens from the parser
  input  logic        tok_valid,
  output logic        tok_ready,
  input  dtok_t       tok,
  // program load / start
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic        start_we,
  input  logic [31:0] start_pc,
  output logic        prog_ready,
  // halt interface to the prediction core
  output logic        issue_ok,
  input  logic        committed,
  input  logic        core_idle,
  // state interface
  input  logic [31:0] cur_npc,
  output logic        pc_we,
  output logic [31:0] pc_wdata,
  output logic [31:0] npc_wdata,
  output logic        flush,
  output logic        rf_we,
  output logic [4:0]  rf_wa,
  output logic [31:0] rf_wd,
  output logic        w_en,
  output logic [3:0]  w_be,
  output logic [31:0] w_addr,
  output logic [31:0] w_data,
  // statistics
  output logic [31:0] n_markers,
  output logic [31:0] n_patches,
  output logic [31:0] n_drain_wait
);
  logic [31:0] credits;

  wire drained = (credits == 0) && core_idle;
  wire is_rec  = tok.unimpl;

  assign tok_ready  = is_rec ? drained : 1'b1;
  wire take_marker  = tok_valid && !is_rec;
  wire take_rec     = tok_valid && is_rec && drained;

  assign prog_ready = drained && !tok_valid;
  wire do_load      = prog_we  && prog_ready;
  wire do_start     = start_we && prog_ready;

  assign issue_ok = (credits != 0);

  // state patches
  always_comb begin
    pc_we     = 1'b0;
    pc_wdata  = '0;
    npc_wdata = '0;
    flush     = 1'b0;
    rf_we     = 1'b0;
    rf_wa     = tok.upd.rd;
    rf_wd     = tok.upd.rd_val;
    w_en      = 1'b0;
    w_be      = tok.upd.mem_be;
    w_addr    = tok.upd.mem_addr;
    w_data    = tok.upd.mem_data;
    if (take_rec) begin
      pc_we     = 1'b1;
      pc_wdata  = cur_npc;
      npc_wdata = cur_npc + tok.upd.npc_delta;
      rf_we     = tok.upd.rd_we && tok.upd.rd != 5'd0;
      w_en      = (tok.upd.mem_op == MEM_WRITE);
      flush     = w_en;
    end else if (do_start) begin
      pc_we     = 1'b1;
      pc_wdata  = start_pc;
      npc_wdata = start_pc + 32'd4;
    end else if (do_load) begin
      w_en   = 1'b1;
      w_be   = 4'hf;
      w_addr = prog_addr;
      w_data = prog_data;
      flush  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credits      <= '0;
      n_markers    <= '0;
      n_patches    <= '0;
      n_drain_wait <= '0;
    end else begin
      credits <= credits + (take_marker ? 32'(tok.count) : 32'd0) - (committed ? 32'd1 : 32'd0);
      if (take_marker) n_markers <= n_markers + 1;
      if (take_rec)    n_patches <= n_patches + 1;
      if (tok_valid && is_rec && !drained) n_drain_wait <= n_drain_wait + 1;
    end
  end

  a_no_commit_without_credit: assert property (@(posedge clk) disable iff (!rst_n)
    committed |-> credits != 0);
endmodule
