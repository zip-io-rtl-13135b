// regfile: the predictor CPU's MIPS register file ("regs").
//
// 32 registers of 32 bits; register 0 always reads zero and ignores
// writes. Two combinational read ports for the predictor core, one write
// port written at the clock edge. The core controller patches registers
// through the same write port (it only does so while the core is halted,
// and the predictor CPU gives it priority). Reset clears all registers, as
// the ZIP-IO paper does not say how register state starts.
module regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  output logic [31:0] rd1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] r [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) r[i] <= '0;
    end else if (we && wa != 5'd0) begin
      r[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : r[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : r[ra2];
endmodule
