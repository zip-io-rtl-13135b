// tb_trace_parser: random stimulus on the parser's three handshakes.
// Checks that markers go only to the predictor CPU, that an unpredictable
// record is offered to both the predictor CPU and the bypass and is
// consumed only when both take it in the same cycle, and that the
// payload arrives unchanged.
module tb_trace_parser;
  import zipio_pkg::*;
  logic in_valid, in_ready, cpu_valid, cpu_ready, byp_valid, byp_ready;
  dtok_t in_tok, cpu_tok;
  upd_t byp_upd;
  int checks = 0, failures = 0;
  int n_fork = 0, n_marker = 0;

  trace_parser dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      in_valid  = $urandom_range(0, 1);
      cpu_ready = $urandom_range(0, 1);
      byp_ready = $urandom_range(0, 1);
      in_tok    = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      chk(cpu_tok == in_tok && byp_upd == in_tok.upd, "payload");
      if (!in_tok.unimpl) begin
        chk(!byp_valid, "marker leaked to bypass");
        chk(cpu_valid == in_valid && in_ready == cpu_ready, "marker handshake");
        if (in_valid && cpu_ready) n_marker++;
      end else begin
        // a side sees valid only if the other side is ready, so both fire together
        chk((cpu_valid && cpu_ready) == (byp_valid && byp_ready), "fork not simultaneous");
        chk((in_valid && in_ready) == (cpu_valid && cpu_ready), "input consumed without fork");
        chk(in_ready == (cpu_ready && byp_ready), "record ready");
        if (in_valid && in_ready) n_fork++;
      end
      #1;
    end
    chk(n_fork > 0 && n_marker > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
