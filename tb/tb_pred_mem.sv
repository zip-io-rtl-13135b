// tb_pred_mem: random byte-enabled writes and synchronous reads on the
// fetch and data ports against an array model. Checks the one-cycle read
// latency, that both copies see every write, and that a read port holds
// its word while its enable is low.
module tb_pred_mem;
  localparam int unsigned AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic i_en = 0, d_en = 0, w_en = 0;
  logic [31:0] i_addr = 0, d_addr = 0, w_addr = 0, w_data = 0, i_rdata, d_rdata;
  logic [3:0] w_be = 0;
  logic [31:0] m [2**AW];
  logic [31:0] ei, ed;
  int checks = 0, failures = 0;

  pred_mem #(.AW(AW)) dut (.*);

  initial begin
    // initialise through the write port
    for (int k = 0; k < 2**AW; k++) begin
      w_en = 1; w_be = 4'hf; w_addr = k * 4; w_data = $urandom; m[k] = w_data;
      @(posedge clk); #1;
    end
    w_en = 0; i_en = 1; d_en = 1; i_addr = 0; d_addr = 4;
    @(posedge clk); #1;
    ei = m[0]; ed = m[1];
    for (int i = 0; i < 3000; i++) begin
      i_en = $urandom_range(0, 1); d_en = $urandom_range(0, 1); w_en = $urandom_range(0, 1);
      i_addr = $urandom; d_addr = $urandom; w_addr = $urandom; w_data = $urandom; w_be = $urandom;
      @(posedge clk);
      // reads see the old contents (read-before-write)
      if (i_en) ei = m[i_addr[AW+1:2]];
      if (d_en) ed = m[d_addr[AW+1:2]];
      if (w_en) for (int b = 0; b < 4; b++) if (w_be[b]) m[w_addr[AW+1:2]][8*b +: 8] = w_data[8*b +: 8];
      #1;
      checks++;
      if (i_rdata != ei || d_rdata != ed) begin
        failures++; $display("FAIL: i %h/%h d %h/%h", i_rdata, ei, d_rdata, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
