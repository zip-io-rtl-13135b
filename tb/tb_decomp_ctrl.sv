// tb_decomp_ctrl: the decompressor controller fed with a reference
// Zcompr+ stream (markers, full records, references), with random ready
// on its two outputs. The predictor-CPU output must carry the original
// markers and records in order; the bypass must carry exactly the
// records, each leaving in the same cycle as its copy to the CPU.
module tb_decomp_ctrl;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, cpu_valid, cpu_ready = 0, byp_valid, byp_ready = 0, drv = 0;
  ztok_t in_tok;
  dtok_t cpu_tok;
  upd_t byp_upd;
  logic [31:0] n_refs, n_retained;
  logic busy;
  int checks = 0, failures = 0;
  ztok_t toks [$];
  dtok_t exp_q [$];
  upd_t rec_q [$];
  int unsigned sent = 0, got = 0, got_b = 0;

  decomp_ctrl #(.IBUF_ENTRIES(N)) dut (.*);

  assign in_valid = drv && sent < toks.size();
  assign in_tok   = sent < toks.size() ? toks[sent] : '0;

  always @(posedge clk) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (cpu_valid && cpu_ready) begin
      checks++;
      if (got >= exp_q.size() || cpu_tok != exp_q[got]) begin failures++; $display("FAIL: cpu token %0d", got); end
      got <= got + 1;
    end
    if (byp_valid && byp_ready) begin
      checks++;
      if (got_b >= rec_q.size() || byp_upd != rec_q[got_b] || !(cpu_valid && cpu_ready)) begin
        failures++; $display("FAIL: bypass record %0d", got_b);
      end
      got_b <= got_b + 1;
    end
  end

  initial begin
    zcompressor zc;
    upd_t pool [6];
    dtok_t d;
    upd_t u;
    int unsigned n;
    zc = new(N);
    foreach (pool[i]) pool[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 1500; i++) begin
      if ($urandom_range(0, 2) == 0) begin
        n = $urandom_range(1, 5);
        repeat (n) zc.predicted();
        zc.flush_run();
        d = '0; d.count = COUNT_W'(n);
      end else begin
        u = pool[$urandom_range(0, 5)];
        zc.unpredicted(u);
        d = '0; d.unimpl = 1; d.upd = u;
        rec_q.push_back(u);
      end
      exp_q.push_back(d);
    end
    toks = zc.toks;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < exp_q.size()) begin
      drv <= $urandom_range(0, 3) != 0;
      cpu_ready <= $urandom_range(0, 3) != 0;
      byp_ready <= $urandom_range(0, 3) != 0;
      @(posedge clk);
    end
    @(posedge clk);
    checks++;
    if (got_b != rec_q.size() || n_refs != zc.n_ref || n_retained != zc.n_new) begin
      failures++; $display("FAIL: bypass %0d/%0d refs %0d/%0d", got_b, rec_q.size(), n_refs, zc.n_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
