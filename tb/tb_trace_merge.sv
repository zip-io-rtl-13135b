// tb_trace_merge: random stimulus on the output merge. Checks that a
// bypass record wins over a predicted one, leaves with predicted = 0 and
// pc = 0, that a predicted record passes unchanged, and that each source
// is told ready only when its record is actually taken.
module tb_trace_merge;
  import zipio_pkg::*;
  logic core_valid, core_ready, byp_valid, byp_ready, out_valid, out_ready;
  trec_t core_rec, out_rec, e;
  upd_t byp_upd;
  int checks = 0, failures = 0;

  trace_merge dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      core_valid = $urandom_range(0, 1);
      byp_valid  = $urandom_range(0, 1);
      out_ready  = $urandom_range(0, 1);
      core_rec   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      core_rec.predicted = 1'b1;
      byp_upd    = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      chk(out_valid == (core_valid || byp_valid), "valid");
      if (byp_valid) begin
        e.predicted = 0; e.pc = 0; e.upd = byp_upd;
        chk(out_rec == e, "bypass record");
        chk(byp_ready == out_ready && !(core_valid && core_ready), "bypass priority");
      end else if (core_valid) begin
        chk(out_rec == core_rec, "core record");
        chk(core_ready == out_ready, "core ready");
      end
      #1;
    end
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
