// tb_zcompr_plus: feeds a compressed stream made by the reference Zcompr+
// compressor (random records drawn from a small pool so references and
// evictions both happen, interleaved with markers) and checks that the
// expanded output equals the original sequence of markers and records.
// Random valid and ready gaps exercise the handshake.
module tb_zcompr_plus;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready = 0, drv = 0;
  ztok_t in_tok;
  dtok_t out_tok;
  logic [31:0] n_refs, n_retained;
  int checks = 0, failures = 0;
  ztok_t toks [$];
  dtok_t exp_q [$];
  int unsigned sent = 0, got = 0;

  zcompr_plus #(.ENTRIES(N)) dut (.*);

  assign in_valid = drv && sent < toks.size();
  assign in_tok   = sent < toks.size() ? toks[sent] : '0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (out_valid && out_ready) begin
      checks++;
      if (got >= exp_q.size() || out_tok != exp_q[got]) begin
        failures++;
        $display("FAIL: token %0d", got);
      end
      got <= got + 1;
    end
  end

  initial begin
    zcompressor zc = new(N);
    upd_t pool [6];
    dtok_t d;
    foreach (pool[i]) pool[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 1500; i++) begin
      if ($urandom_range(0, 2) == 0) begin
        int unsigned n;
        n = $urandom_range(1, 5);
        repeat (n) zc.predicted();
        zc.flush_run();
        d = '0; d.count = COUNT_W'(n);
      end else begin
        upd_t u;
        u = pool[$urandom_range(0, 5)];
        zc.unpredicted(u);
        d = '0; d.unimpl = 1; d.upd = u;
      end
      exp_q.push_back(d);
    end
    toks = zc.toks;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < exp_q.size()) begin
      drv <= $urandom_range(0, 3) != 0;
      out_ready <= $urandom_range(0, 3) != 0;
      @(posedge clk);
    end
    checks++;
    if (n_refs != zc.n_ref || n_retained != zc.n_new || zc.n_ref == 0 || zc.n_evict == 0) begin
      failures++;
      $display("FAIL: refs %0d/%0d retained %0d/%0d evictions %0d", n_refs, zc.n_ref, n_retained, zc.n_new, zc.n_evict);
    end
    $display("refs=%0d retained=%0d evictions=%0d", zc.n_ref, zc.n_new, zc.n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
