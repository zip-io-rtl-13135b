// tb_regfile: random writes and reads of the register file against an
// array model; register 0 must stay zero, and reads are combinational.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] rd1, rd2, wd = 0;
  logic we = 0;
  logic [31:0] m [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  initial begin
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 3000; i++) begin
      we = $urandom_range(0, 1); wa = $urandom; wd = $urandom;
      ra1 = $urandom; ra2 = (i % 5 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks++;
      if (rd1 != m[ra1] || rd2 != m[ra2]) begin
        failures++; $display("FAIL: r%0d=%h r%0d=%h", ra1, rd1, ra2, rd2);
      end
      @(posedge clk);
      if (we && wa != 0) m[wa] = wd;
      #1;
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
