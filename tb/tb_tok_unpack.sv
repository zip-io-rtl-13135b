// tb_tok_unpack: random tokens, with padding words mixed in, are
// serialized into the compressed-file word format and fed with random
// gaps and output stalls; the decoded tokens must match in order.
module tb_tok_unpack;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;

  localparam int N = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, drv = 0, in_ready, out_valid, out_ready = 0, idle;
  logic [31:0] in_data;
  ztok_t       out_tok;

  tok_unpack dut (.*);

  int checks = 0, failures = 0;
  ztok_t       exp_q [$];
  logic [31:0] words [$];
  int unsigned sent = 0, got = 0, n_pad = 0, n_full = 0, n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    in_valid = drv && (sent < words.size());
    in_data  = (sent < words.size()) ? words[sent] : 32'd0;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      checks++;
      if (got >= exp_q.size() || out_tok !== exp_q[got]) begin
        failures++;
        if (failures < 10) $display("FAIL: token %0d: got %p", got, out_tok);
      end
      got <= got + 1;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      ztok_t t;
      t = '0;
      t.kind   = tok_kind_e'($urandom_range(0, 2));
      t.retain = (t.kind == TOK_UNIMPL) ? 1'($urandom) : 1'b0;
      t.idx    = (t.kind == TOK_REF) ? 8'($urandom) : 8'd0;
      t.count  = (t.kind == TOK_PRED) ? 16'($urandom_range(1, 65535)) : 16'd0;
      if (t.kind == TOK_UNIMPL) begin
        t.upd.rd_we = 1'($urandom); t.upd.rd = 5'($urandom);
        t.upd.mem_op = mem_op_e'($urandom_range(0, 2)); t.upd.mem_be = 4'($urandom);
        t.upd.rd_val = $urandom; t.upd.mem_addr = $urandom;
        t.upd.mem_data = $urandom; t.upd.npc_delta = $urandom;
        n_full++;
      end
      if ($urandom_range(0, 7) == 0) begin
        words.push_back({2'b11, 30'($urandom)});
        n_pad++;
      end
      tok_to_words(t, words);
      exp_q.push_back(t);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    check(idle, "not idle after reset");
    while (got < exp_q.size()) begin
      drv       <= ($urandom_range(0, 3) != 0);
      out_ready <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
    end
    drv <= 0;
    repeat (5) @(posedge clk);
    check(got == exp_q.size(), "token count");
    check(idle, "not idle at the end");
    check(n_pad > 0 && n_full > 0 && n_stall > 0, "a mechanism did not occur");
    $display("tokens=%0d full=%0d pads=%0d stalls=%0d", got, n_full, n_pad, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
