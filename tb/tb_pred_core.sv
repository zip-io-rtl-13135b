// tb_pred_core: the prediction core alone, with the register file, the
// memory and the core controller's role played by the testbench.
//
// The reference model runs the demo program; runs of predicted steps
// become issue credits, and each unpredicted step is applied by the
// testbench as a patch (registers, memory, pc/npc) once the core has
// used its credits and gone idle. Every record the core emits is compared
// with the model's. Afterwards the core is given a credit while it sits
// on an instruction it does not implement: it must raise err_unimpl and
// commit nothing. In a free-flowing stretch the commit rate must reach
// 0.5 per cycle with credit available (one per cycle, two for a load,
// one refetch cycle after each patch).
module tb_pred_core;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;
  localparam int unsigned AW = 12;
  localparam int unsigned NSTEPS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic issue_ok, committed, idle, err_unimpl;
  logic pc_we = 0, flush = 0;
  logic [31:0] pc_wdata = 0, npc_wdata = 0, pc, npc;
  logic [4:0] rf_ra1, rf_ra2, rf_wa;
  logic [31:0] rf_rd1, rf_rd2, rf_wd;
  logic rf_we, i_en, d_en, w_en;
  logic [31:0] i_addr, i_rdata, d_addr, d_rdata, w_addr, w_data;
  logic out_valid, out_ready = 0;
  trec_t out_rec;

  pred_core dut (.*);

  // stand-in register file and memory
  logic [31:0] regs [32];
  logic [31:0] mem [2**AW];
  assign rf_rd1 = rf_ra1 == 0 ? 0 : regs[rf_ra1];
  assign rf_rd2 = rf_ra2 == 0 ? 0 : regs[rf_ra2];
  always @(posedge clk) begin
    if (rf_we && rf_wa != 0) regs[rf_wa] <= rf_wd;
    if (w_en) mem[w_addr[AW+1:2]] <= w_data;
    if (i_en) i_rdata <= mem[i_addr[AW+1:2]];
    if (d_en) d_rdata <= mem[d_addr[AW+1:2]];
  end

  int unsigned credits = 0;
  assign issue_ok = credits != 0;
  always @(posedge clk) if (committed) credits <= credits - 1;

  int checks = 0, failures = 0;
  trec_t exp_q [$];
  int unsigned got = 0, free_cycles = 0, free_commits = 0;
  bit free = 0;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (got >= exp_q.size() || out_rec != exp_q[got]) begin
        failures++;
        if (failures < 10) $display("FAIL: record %0d got %p exp %p", got, out_rec, got < exp_q.size() ? exp_q[got] : '0);
      end
      got <= got + 1;
    end
    if (free && issue_ok) begin
      free_cycles++;
      if (committed) free_commits++;
    end
  end

  always @(posedge clk) out_ready <= free ? 1'b1 : ($urandom_range(0, 2) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mips_iss iss;
    logic [31:0] code [$];
    upd_t u;
    trec_t r;
    int unsigned run;
    logic [31:0] pc0, w;
    iss = new(AW);
    demo_program(code);
    foreach (regs[i]) regs[i] = 0;
    foreach (mem[i]) mem[i] = 0;
    foreach (code[i]) begin iss.mem[i] = code[i]; mem[i] = code[i]; end
    for (int k = 0; k < 64; k++) begin iss.mem[1024 + k] = demo_data(k); mem[1024 + k] = demo_data(k); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    pc_we = 1; pc_wdata = 0; npc_wdata = 4;
    @(posedge clk); #1;
    pc_we = 0;
    run = 0;
    for (int s = 0; s < NSTEPS; s++) begin
      if (s == NSTEPS / 2) free = 1;
      pc0 = iss.pc;
      if (iss.step(u)) begin
        r.predicted = 1; r.pc = pc0; r.upd = u;
        exp_q.push_back(r);
        run++;
      end else begin
        // grant the run, wait for it to be inflated, then patch
        credits = credits + run;
        run = 0;
        while (!(credits == 0 && idle)) begin @(posedge clk); #1; end
        if (u.rd_we && u.rd != 0) regs[u.rd] = u.rd_val;
        if (u.mem_op == MEM_WRITE) begin
          w = mem[u.mem_addr[AW+1:2]];
          for (int b = 0; b < 4; b++) if (u.mem_be[b]) w[8*b +: 8] = u.mem_data[8*b +: 8];
          mem[u.mem_addr[AW+1:2]] = w;
        end
        pc_we = 1; pc_wdata = npc; npc_wdata = npc + u.npc_delta;
        @(posedge clk); #1;
        pc_we = 0;
      end
    end
    credits = credits + run;
    while (!(credits == 0 && idle)) begin @(posedge clk); #1; end
    checks++;
    if (got != exp_q.size() || err_unimpl) begin failures++; $display("FAIL: %0d of %0d records", got, exp_q.size()); end
    checks++;
    if (free_commits * 2 < free_cycles) begin failures++; $display("FAIL: rate %0d/%0d", free_commits, free_cycles); end
    $display("free-flow: %0d commits in %0d cycles with credit", free_commits, free_cycles);
    // run forward to the next unpredicted instruction and give it a credit
    while (1) begin
      pc0 = iss.pc;
      if (!iss.step(u)) break;
      r.predicted = 1; r.pc = pc0; r.upd = u;
      exp_q.push_back(r);
      credits = credits + 1;
      while (!(credits == 0 && idle)) begin @(posedge clk); #1; end
    end
    credits = 1;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (!err_unimpl || credits != 1 || pc != pc0 || got != exp_q.size()) begin
      failures++; $display("FAIL: unimplemented instruction not flagged (err=%b credits=%0d pc=%h/%h)", err_unimpl, credits, pc, pc0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
