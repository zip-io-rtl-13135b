// pred_core: the prediction core of the predictor CPU, a pipelined core
// for the frequently executed subset of the MIPS32 integer ISA.
//
// Each instruction it commits is one "inflated" trace step: it updates the
// architectural state and emits a state-update record (trec_t) into its
// output register, the last pipeline stage. The ZIP-IO paper specifies the
// core's role and its two extra control interfaces; the pipeline itself is
// this design's choice:
//   fetch   - synchronous read of the instruction cache at the address
//             the fetch tag f_addr records;
//   execute - decode, register read, ALU, branch resolution, memory access
//             and register write; a load spends one extra cycle here
//             waiting for the data cache;
//   output  - the record register that feeds the output merge.
// Architectural PC state is the MIPS pair (pc, npc). Committing the
// instruction at pc sets pc <= npc and npc <= branch target or npc + 4,
// and fetches at the old npc in the same cycle, so the instruction after a
// branch (its delay slot) is already in flight and no flush is needed.
//
// Control interfaces:
//   issue_ok  - the halt interface: the core commits an instruction only
//               while the core controller holds issue_ok (it has credits);
//               each commit pulses `committed`.
//   pc_we     - the state interface for PC: load pc/npc (registers and
//               memory are patched directly by the core controller); also
//               discards the fetched word.
//   flush     - discards the fetched word (after memory is patched).
// An instruction outside the subset while issue_ok is high cannot be
// inflated: the core stops and raises the sticky err_unimpl.
//
// Implemented: ADDU SUBU AND OR XOR NOR SLT SLTU SLL SRL SRA JR, ADDIU
// SLTI SLTIU ANDI ORI XORI LUI, LW SW, BEQ BNE, J JAL. The ZIP-IO paper gives
// only that a subset near 10% of the ISA is implemented; this list is the
// design's choice.
module pred_core
  import zipio_pkg::*;
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // halt interface
  input  logic        issue_ok,
  output logic        committed,
  output logic        idle,
  output logic        err_unimpl,
  // PC state interface
  input  logic        pc_we,
  input  logic [31:0] pc_wdata,
  input  logic [31:0] npc_wdata,
  input  logic        flush,
  output logic [31:0] pc,
  output logic [31:0] npc,
  // register file
  output logic [4:0]  rf_ra1,
  input  logic [31:0] rf_rd1,
  output logic [4:0]  rf_ra2,
  input  logic [31:0] rf_rd2,
  output logic        rf_we,
  output logic [4:0]  rf_wa,
  output logic [31:0] rf_wd,
  // memory system
  output logic        i_en,
  output logic [31:0] i_addr,
  input  logic [31:0] i_rdata,
  output logic        d_en,
  output logic [31:0] d_addr,
  input  logic [31:0] d_rdata,
  output logic        w_en,
  output logic [31:0] w_addr,
  output logic [31:0] w_data,
  // predicted trace records
  output logic        out_valid,
  input  logic        out_ready,
  output trec_t       out_rec
);
  logic        f_valid;
  logic [31:0] f_addr;
  logic        ld_wait;   // load issued, data arrives next cycle

  // ---------------- decode ----------------
  wire [31:0] ir     = i_rdata;
  wire [5:0]  op     = ir[31:26];
  wire [4:0]  rs     = ir[25:21];
  wire [4:0]  rt     = ir[20:16];
  wire [4:0]  rd     = ir[15:11];
  wire [4:0]  shamt  = ir[10:6];
  wire [5:0]  funct  = ir[5:0];
  wire [31:0] imm_s  = {{16{ir[15]}}, ir[15:0]};
  wire [31:0] imm_z  = {16'h0, ir[15:0]};

  assign rf_ra1 = rs;
  assign rf_ra2 = rt;
  wire [31:0] a = rf_rd1;
  wire [31:0] b = rf_rd2;

  logic        supported;
  logic        wr;          // writes a register
  logic [4:0]  dst;
  logic [31:0] res;
  logic        taken;
  logic [31:0] target;
  logic        is_load, is_store;

  always_comb begin
    supported = 1'b1;
    wr        = 1'b0;
    dst       = rt;
    res       = '0;
    taken     = 1'b0;
    target    = '0;
    is_load   = 1'b0;
    is_store  = 1'b0;
    unique case (op)
      OP_SPECIAL: begin
        dst = rd;
        wr  = 1'b1;
        unique case (funct)
          FN_SLL:  res = b << shamt;
          FN_SRL:  res = b >> shamt;
          FN_SRA:  res = $signed(b) >>> shamt;
          FN_ADDU: res = a + b;
          FN_SUBU: res = a - b;
          FN_AND:  res = a & b;
          FN_OR:   res = a | b;
          FN_XOR:  res = a ^ b;
          FN_NOR:  res = ~(a | b);
          FN_SLT:  res = {31'b0, $signed(a) < $signed(b)};
          FN_SLTU: res = {31'b0, a < b};
          FN_JR: begin
            wr = 1'b0; taken = 1'b1; target = a;
          end
          default: begin
            supported = 1'b0; wr = 1'b0;
          end
        endcase
      end
      OP_ADDIU: begin wr = 1'b1; res = a + imm_s; end
      OP_SLTI:  begin wr = 1'b1; res = {31'b0, $signed(a) < $signed(imm_s)}; end
      OP_SLTIU: begin wr = 1'b1; res = {31'b0, a < imm_s}; end
      OP_ANDI:  begin wr = 1'b1; res = a & imm_z; end
      OP_ORI:   begin wr = 1'b1; res = a | imm_z; end
      OP_XORI:  begin wr = 1'b1; res = a ^ imm_z; end
      OP_LUI:   begin wr = 1'b1; res = {ir[15:0], 16'h0}; end
      OP_LW:    begin wr = 1'b1; is_load = 1'b1; res = d_rdata; end
      OP_SW:    begin is_store = 1'b1; end
      OP_BEQ:   begin taken = (a == b); target = pc + 32'd4 + (imm_s << 2); end
      OP_BNE:   begin taken = (a != b); target = pc + 32'd4 + (imm_s << 2); end
      OP_J:     begin taken = 1'b1; target = {npc[31:28], ir[25:0], 2'b00}; end
      OP_JAL:   begin
        taken = 1'b1; target = {npc[31:28], ir[25:0], 2'b00};
        wr = 1'b1; dst = 5'd31; res = pc + 32'd8;
      end
      default:  supported = 1'b0;
    endcase
  end

  wire [31:0] ea = a + imm_s;   // load/store effective address

  // ---------------- issue / commit ----------------
  wire ir_ok   = f_valid && (f_addr == pc);
  wire out_free = !out_valid || out_ready;
  wire can_go  = issue_ok && ir_ok && supported && !err_unimpl && !pc_we && !flush;
  wire commit  = can_go && out_free && (!is_load || ld_wait);
  wire [31:0] next_npc = taken ? target : npc + 32'd4;

  assign committed = commit;
  assign idle      = !ld_wait && !out_valid;

  // fetch: the word at pc must be present; on commit, fetch the old npc
  assign i_en   = commit || !ir_ok;
  assign i_addr = commit ? npc : pc;

  // load: read the data cache, commit the next cycle
  assign d_en   = can_go && is_load && !ld_wait;
  assign d_addr = ea;

  assign rf_we = commit && wr && dst != 5'd0;
  assign rf_wa = dst;
  assign rf_wd = res;

  assign w_en   = commit && is_store;
  assign w_addr = ea;
  assign w_data = b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      npc        <= 32'd4;
      f_valid    <= 1'b0;
      f_addr     <= '0;
      ld_wait    <= 1'b0;
      err_unimpl <= 1'b0;
      out_valid  <= 1'b0;
      out_rec    <= '0;
    end else begin
      if (pc_we) begin
        pc  <= pc_wdata;
        npc <= npc_wdata;
      end else if (commit) begin
        pc  <= npc;
        npc <= next_npc;
      end

      if (pc_we || flush) f_valid <= 1'b0;
      else if (i_en) begin
        f_valid <= 1'b1;
        f_addr  <= i_addr;
      end

      if (d_en)        ld_wait <= 1'b1;
      else if (commit) ld_wait <= 1'b0;

      if (issue_ok && ir_ok && !supported && !pc_we && !flush) err_unimpl <= 1'b1;

      if (commit) begin
        out_valid              <= 1'b1;
        out_rec.predicted      <= 1'b1;
        out_rec.pc             <= pc;
        out_rec.upd.rd_we      <= wr && dst != 5'd0;
        out_rec.upd.rd         <= (wr && dst != 5'd0) ? dst : 5'd0;
        out_rec.upd.rd_val     <= (wr && dst != 5'd0) ? res : 32'd0;
        out_rec.upd.mem_op     <= is_load ? MEM_READ : (is_store ? MEM_WRITE : MEM_NONE);
        out_rec.upd.mem_be     <= is_store ? 4'hf : 4'h0;
        out_rec.upd.mem_addr   <= (is_load || is_store) ? ea : 32'd0;
        out_rec.upd.mem_data   <= is_store ? b : (is_load ? d_rdata : 32'd0);
        out_rec.upd.npc_delta  <= next_npc - npc;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_rec));
endmodule
