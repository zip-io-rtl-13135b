// tb_rec_pack: random records enter with random gaps and the output is
// stalled at random; each record must leave as three two-word beats and a
// final one-word beat whose words decode back to the record that entered,
// in order, and idle must follow the traffic.
module tb_rec_pack;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;

  localparam int N = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, drv = 0, in_ready, out_valid, out_ready = 0, idle, out_two;
  trec_t       in_rec;
  logic [63:0] out_data;

  rec_pack dut (.*);

  int checks = 0, failures = 0;
  trec_t       recs [$];
  logic [31:0] w7 [7];
  int unsigned sent = 0, nw = 0, got = 0, n_stall = 0, n_b2b = 0;

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
    in_valid = drv && (sent < recs.size());
    in_rec   = (sent < recs.size()) ? recs[sent] : '0;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      sent <= sent + 1;
      if (out_valid) n_b2b++;
    end
    if (out_valid && !out_ready) n_stall++;
    if (rst_n) begin
      checks++;
      if (idle !== !out_valid) begin
        failures++;
        if (failures < 10) $display("FAIL: idle %0d with out_valid %0d", idle, out_valid);
      end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_two !== (nw < 6) || (!out_two && out_data[63:32] !== 32'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL: beat at word %0d: two=%0d data=%h", nw, out_two, out_data);
      end
      w7[nw] = out_data[31:0];
      if (out_two && nw < 6) begin
        nw = nw + 1;
        w7[nw] = out_data[63:32];
      end
      if (nw == 6) begin
        checks++;
        if (got >= recs.size() || words_to_rec(w7) !== recs[got]) begin
          failures++;
          if (failures < 10) $display("FAIL: record %0d: got %p", got, words_to_rec(w7));
        end
        got <= got + 1;
        nw = 0;
      end else nw = nw + 1;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      trec_t r;
      r.predicted = 1'($urandom);
      r.pc = $urandom;
      r.upd.rd_we = 1'($urandom); r.upd.rd = 5'($urandom);
      r.upd.mem_op = mem_op_e'($urandom_range(0, 2)); r.upd.mem_be = 4'($urandom);
      r.upd.rd_val = $urandom; r.upd.mem_addr = $urandom;
      r.upd.mem_data = $urandom; r.upd.npc_delta = $urandom;
      recs.push_back(r);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    while (got < N / 2) begin
      drv       <= ($urandom_range(0, 7) == 0);
      out_ready <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
    end
    // full rate: a new record is taken with the last word of the previous
    while (got < N) begin
      drv       <= 1;
      out_ready <= 1;
      @(posedge clk);
    end
    drv <= 0;
    repeat (10) @(posedge clk);
    check(got == N && nw == 0, "record count");
    check(idle, "not idle at the end");
    check(n_stall > 0 && n_b2b > 0, "a mechanism did not occur");
    $display("records=%0d stalls=%0d back_to_back=%0d", got, n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
