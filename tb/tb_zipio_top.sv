// tb_zipio_top: end-to-end test of the trace decompressor at its default
// parameters.
//
// A reference instruction-set model runs the demo program for NSTEPS
// instructions and records the state update of each; a reference Zcompr+
// compressor turns that trace into markers, full records and buffer
// references. The testbench loads the program into the decompressor,
// streams the compressed tokens in and compares every inflated record
// with the reference trace, in order.
//
// Three phases shape the traffic: random gaps on both sides; a long
// output stall that fills the output FIFO, stalls the core and backs up
// the input FIFO; then free flow, where the decompression rate is
// measured and must reach at least 0.15 records per cycle (the 15 MIPS
// quoted for the hardware at a 100 MHz clock). Every mechanism must occur:
// markers, patches, Zcompr+ references and retained records, LRU
// evictions, waits for the core to drain, predicted loads, stores and
// taken branches, and back-pressure on input and output.
module tb_zipio_top;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;

  localparam int unsigned NSTEPS   = 6000;
  localparam int unsigned MEM_AW   = 12;
  localparam int unsigned ENTRIES  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, drv_valid = 0;
  ztok_t       in_tok;
  logic        out_valid, out_ready = 0;
  trec_t       out_rec;
  logic        prog_we = 0, start_we = 0, prog_ready;
  logic [31:0] prog_addr = 0, prog_data = 0, start_pc = 0;
  logic        err_unimpl;
  logic [31:0] n_refs, n_retained, n_markers, n_patches, n_drain_wait;
  logic        idle;

  zipio_top dut (.*);

  int checks = 0, failures = 0;
  trec_t exp_q [$];
  ztok_t tok_q [$];
  int unsigned n_tokens, sent = 0, got = 0, n_exp;
  int unsigned cyc = 0, phase = 0;
  int unsigned m_in_stall = 0, m_out_stall = 0, m_pload = 0, m_pstore = 0, m_taken = 0;
  int unsigned rate_outs = 0, rate_cycles = 0;
  int unsigned ev_compressor;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: timed out (sent %0d of %0d tokens, got %0d of %0d records)", sent, n_tokens, got, n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // input driver
  always @(posedge clk) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (in_valid && !in_ready) m_in_stall <= m_in_stall + 1;
  end
  always_comb begin
    in_tok   = (sent < n_tokens) ? tok_q[sent] : '0;
    in_valid = drv_valid && (sent < n_tokens);
  end

  // output monitor
  always @(posedge clk) begin
    if (out_valid && !out_ready) m_out_stall <= m_out_stall + 1;
    if (out_valid && out_ready) begin
      trec_t e;
      if (got < n_exp) begin
        e = exp_q[got];
        checks++;
        if (out_rec !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: record %0d: got %p expected %p", got, out_rec, e);
        end
        if (out_rec.predicted && out_rec.upd.mem_op == MEM_READ)  m_pload++;
        if (out_rec.predicted && out_rec.upd.mem_op == MEM_WRITE) m_pstore++;
        if (out_rec.predicted && out_rec.upd.npc_delta != 32'd4)  m_taken++;
      end else begin
        failures++;
        $display("FAIL: extra record %p", out_rec);
      end
      got <= got + 1;
      if (phase == 3) rate_outs++;
    end
    if (phase == 3) rate_cycles++;
  end

  initial begin
    mips_iss     iss;
    zcompressor  zc;
    logic [31:0] code [$];
    upd_t        u;
    trec_t       r;
    int unsigned loads [$];

    iss = new(MEM_AW);
    zc  = new(ENTRIES);
    demo_program(code);
    foreach (code[i]) begin
      iss.mem[i] = code[i];
      loads.push_back(i);
    end
    for (int k = 0; k < 64; k++) begin
      iss.mem[1024 + k] = demo_data(k);
      loads.push_back(1024 + k);
    end
    // reference trace and compressed stream
    for (int s = 0; s < NSTEPS; s++) begin
      logic [31:0] pc0;
      pc0 = iss.pc;
      if (iss.step(u)) begin
        r.predicted = 1; r.pc = pc0; r.upd = u;
        zc.predicted();
      end else begin
        r.predicted = 0; r.pc = 0; r.upd = u;
        zc.unpredicted(u);
      end
      exp_q.push_back(r);
    end
    zc.flush_run();
    tok_q = zc.toks;
    n_tokens = tok_q.size();
    n_exp = exp_q.size();
    ev_compressor = zc.n_evict;
    $display("trace: %0d steps, %0d tokens, %0d refs, %0d new records, %0d evictions",
             n_exp, n_tokens, zc.n_ref, zc.n_new, zc.n_evict);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // program load
    foreach (loads[i]) begin
      prog_we <= 1; prog_addr <= loads[i] * 4; prog_data <= iss_word(code, loads[i]);
      @(posedge clk);
      while (!prog_ready) @(posedge clk);
    end
    prog_we <= 0;
    start_we <= 1; start_pc <= 0;
    @(posedge clk);
    start_we <= 0;

    // phase 1: random traffic
    phase = 1;
    while (sent < n_tokens / 3) begin
      drv_valid <= ($urandom_range(0, 3) != 0);
      out_ready <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
    end
    // phase 2: output stall, input keeps coming
    phase = 2;
    drv_valid <= 1; out_ready <= 0;
    repeat (600) @(posedge clk);
    // drain with random ready until two thirds are sent
    while (sent < 2 * n_tokens / 3) begin
      drv_valid <= 1;
      out_ready <= ($urandom_range(0, 1) != 0);
      @(posedge clk);
    end
    out_ready <= 1;
    repeat (200) @(posedge clk);
    // phase 3: free flow, rate measured
    phase = 3;
    drv_valid <= 1;
    while (sent < n_tokens) @(posedge clk);
    drv_valid <= 0;
    phase = 4;
    while (got < n_exp) @(posedge clk);
    repeat (20) @(posedge clk);

    check(got == n_exp, $sformatf("record count %0d vs %0d", got, n_exp));
    check(!err_unimpl, "predictor hit an instruction it does not implement");
    check(n_markers > 0, "no markers");
    check(n_patches == zc.n_ref + zc.n_new, $sformatf("patches %0d", n_patches));
    check(n_refs == zc.n_ref, $sformatf("Zcompr+ references %0d vs %0d", n_refs, zc.n_ref));
    check(n_retained == zc.n_new, $sformatf("retained records %0d vs %0d", n_retained, zc.n_new));
    check(zc.n_ref > 0, "no Zcompr+ reference occurred");
    check(ev_compressor > 0, "no LRU eviction occurred");
    check(n_drain_wait > 0, "no record ever waited for the core to drain");
    check(m_pload > 0, "no predicted load");
    check(m_pstore > 0, "no predicted store");
    check(m_taken > 0, "no predicted taken branch");
    check(m_in_stall > 0, "input never back-pressured");
    check(m_out_stall > 0, "output never back-pressured");
    check(rate_cycles > 0 && real'(rate_outs) / real'(rate_cycles) >= 0.15,
          $sformatf("rate %0d records in %0d cycles", rate_outs, rate_cycles));
    $display("mechanisms: markers=%0d patches=%0d refs=%0d retained=%0d evictions=%0d drain_waits=%0d loads=%0d stores=%0d taken=%0d in_stalls=%0d out_stalls=%0d",
             n_markers, n_patches, n_refs, n_retained, ev_compressor, n_drain_wait, m_pload, m_pstore, m_taken, m_in_stall, m_out_stall);
    $display("free-flow rate: %0d records in %0d cycles", rate_outs, rate_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] iss_word(ref logic [31:0] c [$], input int unsigned w);
    if (w < c.size()) return c[w];
    return demo_data(w - 1024);
  endfunction
endmodule
