// tb_sync_fifo: random push/pop test of sync_fifo against a queue model.
// Checks data order, full/empty flags, the level output and that a word
// written is not visible in the same cycle (one cycle of latency).
module tb_sync_fifo;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = 0, out_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  logic [31:0] model [$];
  int unsigned n_full = 0;
  bit push, pop;

  sync_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int c = 0; c < 4000; c++) begin
      // drive with a bias that changes over time to reach full and empty
      in_valid  = ($urandom_range(0, 9) < ((c / 500) % 2 ? 8 : 3));
      out_ready = ($urandom_range(0, 9) < ((c / 500) % 2 ? 3 : 8));
      in_data   = $urandom;
      #1;
      checks++;
      if (out_valid != (model.size() != 0) || in_ready != (model.size() < DEPTH) || level != model.size()) begin
        failures++;
        $display("FAIL flags: valid=%b ready=%b level=%0d model=%0d", out_valid, in_ready, level, model.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) begin
          failures++;
          $display("FAIL data %h vs %h", out_data, model[0]);
        end
      end
      if (!in_ready) n_full++;
      pop  = out_valid && out_ready;
      push = in_valid && in_ready;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(in_data);
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
