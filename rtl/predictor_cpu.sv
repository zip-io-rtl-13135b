// predictor_cpu: the predictor CPU, made of the core controller, the
// architectural state (PC inside the prediction core, the register file,
// and the instruction/data caches) and the prediction core.
//
// Tokens from the decompressor controller enter the core controller;
// predicted records leave from the prediction core's output register.
// The register file and memory each have one write port, shared between
// the prediction core (normal execution) and the core controller
// (patching, program loading); the controller wins, and by construction it
// only writes while the core is halted and idle. MEM_AW sets the memory
// window: 2**MEM_AW words for each of the instruction and data caches.
module predictor_cpu
  import zipio_pkg::*;
#(
  parameter int unsigned MEM_AW = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tok_valid,
  output logic        tok_ready,
  input  dtok_t       tok,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic        start_we,
  input  logic [31:0] start_pc,
  output logic        prog_ready,
  output logic        out_valid,
  input  logic        out_ready,
  output trec_t       out_rec,
  output logic        err_unimpl,
  output logic [31:0] n_markers,
  output logic [31:0] n_patches,
  output logic [31:0] n_drain_wait
);
  logic        issue_ok, committed, core_idle;
  logic        pc_we, flush;
  logic [31:0] pc_wdata, npc_wdata, cur_npc;
  logic        c_rf_we, k_rf_we;
  logic [4:0]  c_rf_wa, k_rf_wa, ra1, ra2;
  logic [31:0] c_rf_wd, k_rf_wd, rd1, rd2;
  logic        c_w_en, k_w_en;
  logic [3:0]  c_w_be;
  logic [31:0] c_w_addr, c_w_data, k_w_addr, k_w_data;
  logic        i_en, d_en;
  logic [31:0] i_addr, i_rdata, d_addr, d_rdata;

  core_ctrl u_ctrl (
    .clk, .rst_n,
    .tok_valid, .tok_ready, .tok,
    .prog_we, .prog_addr, .prog_data, .start_we, .start_pc, .prog_ready,
    .issue_ok, .committed, .core_idle,
    .cur_npc, .pc_we, .pc_wdata, .npc_wdata, .flush,
    .rf_we(c_rf_we), .rf_wa(c_rf_wa), .rf_wd(c_rf_wd),
    .w_en(c_w_en), .w_be(c_w_be), .w_addr(c_w_addr), .w_data(c_w_data),
    .n_markers, .n_patches, .n_drain_wait
  );

  pred_core u_core (
    .clk, .rst_n,
    .issue_ok, .committed, .idle(core_idle), .err_unimpl,
    .pc_we, .pc_wdata, .npc_wdata, .flush, .pc(), .npc(cur_npc),
    .rf_ra1(ra1), .rf_rd1(rd1), .rf_ra2(ra2), .rf_rd2(rd2),
    .rf_we(k_rf_we), .rf_wa(k_rf_wa), .rf_wd(k_rf_wd),
    .i_en, .i_addr, .i_rdata, .d_en, .d_addr, .d_rdata,
    .w_en(k_w_en), .w_addr(k_w_addr), .w_data(k_w_data),
    .out_valid, .out_ready, .out_rec
  );

  regfile u_regs (
    .clk, .rst_n,
    .ra1, .rd1, .ra2, .rd2,
    .we(c_rf_we || k_rf_we),
    .wa(c_rf_we ? c_rf_wa : k_rf_wa),
    .wd(c_rf_we ? c_rf_wd : k_rf_wd)
  );

  pred_mem #(.AW(MEM_AW)) u_mem (
    .clk,
    .i_en, .i_addr, .i_rdata,
    .d_en, .d_addr, .d_rdata,
    .w_en  (c_w_en || k_w_en),
    .w_be  (c_w_en ? c_w_be   : 4'hf),
    .w_addr(c_w_en ? c_w_addr : k_w_addr),
    .w_data(c_w_en ? c_w_data : k_w_data)
  );

  a_single_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(c_w_en && k_w_en) && !(c_rf_we && k_rf_we));
endmodule
