// mips_pkg: MIPS32 opcode and function-field encodings of the instructions
// the prediction core implements (standard MIPS32 encodings).
package mips_pkg;

  // MIPS major opcodes and SPECIAL functions used by the predictor core.
  localparam logic [5:0] OP_SPECIAL = 6'h00, OP_J    = 6'h02, OP_JAL  = 6'h03,
                         OP_BEQ     = 6'h04, OP_BNE  = 6'h05, OP_ADDIU= 6'h09,
                         OP_SLTI    = 6'h0a, OP_SLTIU= 6'h0b, OP_ANDI = 6'h0c,
                         OP_ORI     = 6'h0d, OP_XORI = 6'h0e, OP_LUI  = 6'h0f,
                         OP_LW      = 6'h23, OP_SW   = 6'h2b;
  localparam logic [5:0] FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
                         FN_JR   = 6'h08, FN_ADDU = 6'h21, FN_SUBU = 6'h23,
                         FN_AND  = 6'h24, FN_OR   = 6'h25, FN_XOR  = 6'h26,
                         FN_NOR  = 6'h27, FN_SLT  = 6'h2a, FN_SLTU = 6'h2b;

endpackage
