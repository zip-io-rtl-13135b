// zipio_tb_pkg: reference models shared by the decompressor testbenches.
//
//   mips_iss      - instruction-set model of the MIPS32 subset the
//                   prediction core implements, plus six instructions it
//                   does not (MUL, SLLV, LBU, SB, JALR, BGEZ). Each step
//                   returns the state update in the decompressor's record
//                   format and whether the predictor would predict it.
//   zcompressor   - Zcompr+ compressor: markers for runs of predicted
//                   steps; unpredictable records become references when
//                   the LRU table already holds them, else full records
//                   flagged for retention (LRU victim replaced).
//   asm_*         - instruction encoders, and demo_program(), a looping
//                   program that mixes predicted and unpredicted steps.
// Byte lanes are little-endian: byte k of a word is bits [8k+7:8k].
package zipio_tb_pkg;
  import zipio_pkg::*;

  // ---------------- encoders ----------------
  function automatic logic [31:0] asm_r(logic [5:0] fn, logic [4:0] rd, logic [4:0] rs, logic [4:0] rt, logic [4:0] sh = 0);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] asm_i(logic [5:0] op, logic [4:0] rt, logic [4:0] rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] asm_j(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction
  function automatic logic [31:0] asm_mul(logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);
    return {6'h1c, rs, rt, rd, 5'd0, 6'h02};
  endfunction
  function automatic logic [31:0] asm_bgez(logic [4:0] rs, logic [15:0] off);
    return {6'h01, rs, 5'h01, off};
  endfunction

  // ---------------- instruction-set model ----------------
  class mips_iss;
    int unsigned aw;
    logic [31:0] regs [32];
    logic [31:0] mem  [];
    logic [31:0] pc, npc;

    function new(int unsigned aw_ = 12);
      aw = aw_;
      mem = new[1 << aw];
      foreach (mem[i]) mem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      pc = 0; npc = 4;
    endfunction

    function int unsigned widx(logic [31:0] a);
      return int'((a >> 2) & ((32'd1 << aw) - 1));
    endfunction

    // execute the instruction at pc; returns 1 if the predictor implements it
    function bit step(output upd_t u);
      logic [31:0] ir, a, b, ea, res, nn, w;
      logic [4:0]  rs, rt, rd, dst;
      bit wr, impl;
      ir = mem[widx(pc)];
      rs = ir[25:21]; rt = ir[20:16]; rd = ir[15:11];
      a = regs[rs]; b = regs[rt];
      ea = a + {{16{ir[15]}}, ir[15:0]};
      u = '0; wr = 0; dst = rt; res = 0; impl = 1;
      nn = npc + 4;
      case (ir[31:26])
        6'h00: begin
          dst = rd; wr = 1;
          case (ir[5:0])
            6'h00: res = b << ir[10:6];
            6'h02: res = b >> ir[10:6];
            6'h03: res = $signed(b) >>> ir[10:6];
            6'h21: res = a + b;
            6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2a: res = {31'b0, $signed(a) < $signed(b)};
            6'h2b: res = {31'b0, a < b};
            6'h08: begin wr = 0; nn = a; end
            6'h04: begin impl = 0; res = b << a[4:0]; end           // SLLV
            6'h09: begin impl = 0; res = pc + 8; nn = a; end        // JALR
            default: $fatal(1, "iss: unknown SPECIAL %h at %h", ir, pc);
          endcase
        end
        6'h09: begin wr = 1; res = a + {{16{ir[15]}}, ir[15:0]}; end
        6'h0a: begin wr = 1; res = {31'b0, $signed(a) < $signed({{16{ir[15]}}, ir[15:0]})}; end
        6'h0b: begin wr = 1; res = {31'b0, a < {{16{ir[15]}}, ir[15:0]}}; end
        6'h0c: begin wr = 1; res = a & {16'h0, ir[15:0]}; end
        6'h0d: begin wr = 1; res = a | {16'h0, ir[15:0]}; end
        6'h0e: begin wr = 1; res = a ^ {16'h0, ir[15:0]}; end
        6'h0f: begin wr = 1; res = {ir[15:0], 16'h0}; end
        6'h23: begin
          wr = 1; res = mem[widx(ea)];
          u.mem_op = MEM_READ; u.mem_addr = ea; u.mem_data = res;
        end
        6'h2b: begin
          mem[widx(ea)] = b;
          u.mem_op = MEM_WRITE; u.mem_addr = ea; u.mem_data = b; u.mem_be = 4'hf;
        end
        6'h04: if (a == b) nn = pc + 4 + ({{16{ir[15]}}, ir[15:0]} << 2);
        6'h05: if (a != b) nn = pc + 4 + ({{16{ir[15]}}, ir[15:0]} << 2);
        6'h02: nn = {npc[31:28], ir[25:0], 2'b00};
        6'h03: begin nn = {npc[31:28], ir[25:0], 2'b00}; wr = 1; dst = 31; res = pc + 8; end
        6'h1c: begin impl = 0; wr = 1; dst = rd; res = a * b; end                        // MUL
        6'h24: begin                                                                       // LBU
          impl = 0; wr = 1;
          w = mem[widx(ea)]; res = {24'h0, w[8*ea[1:0] +: 8]};
          u.mem_op = MEM_READ; u.mem_addr = ea; u.mem_data = res;
        end
        6'h28: begin                                                                       // SB
          impl = 0;
          w = mem[widx(ea)]; w[8*ea[1:0] +: 8] = b[7:0]; mem[widx(ea)] = w;
          u.mem_op = MEM_WRITE; u.mem_addr = ea; u.mem_data = {4{b[7:0]}};
          u.mem_be = 4'b0001 << ea[1:0];
        end
        6'h01: begin impl = 0; if (!a[31]) nn = pc + 4 + ({{16{ir[15]}}, ir[15:0]} << 2); end // BGEZ
        default: $fatal(1, "iss: unknown opcode %h at %h", ir, pc);
      endcase
      if (wr && dst != 0) begin
        regs[dst] = res;
        u.rd_we = 1; u.rd = dst; u.rd_val = res;
      end
      u.npc_delta = nn - npc;
      pc = npc;
      npc = nn;
      return impl;
    endfunction
  endclass

  // ---------------- Zcompr+ compressor ----------------
  class zcompressor;
    int unsigned entries;
    upd_t        tab [];
    int unsigned age [];
    int unsigned run;
    ztok_t       toks [$];
    int unsigned n_ref, n_new, n_evict;
    int unsigned max_run;

    function new(int unsigned entries_ = 16, int unsigned max_run_ = 65535);
      entries = entries_;
      max_run = max_run_;
      tab = new[entries];
      age = new[entries];
      foreach (tab[i]) begin tab[i] = '0; age[i] = i; end
      run = 0; n_ref = 0; n_new = 0; n_evict = 0;
    endfunction

    function void touch(int unsigned s);
      foreach (age[i]) if (i != s && age[i] < age[s]) age[i]++;
      age[s] = 0;
    endfunction

    function void flush_run();
      ztok_t t;
      if (run == 0) return;
      t = '0; t.kind = TOK_PRED; t.count = COUNT_W'(run);
      toks.push_back(t);
      run = 0;
    endfunction

    function void predicted();
      run++;
      if (run == max_run) flush_run();
    endfunction

    function void unpredicted(upd_t u);
      ztok_t t;
      int hit = -1;
      flush_run();
      foreach (tab[i]) if (tab[i] == u && hit < 0) hit = i;
      t = '0;
      if (hit >= 0) begin
        t.kind = TOK_REF; t.idx = IDX_W'(hit);
        touch(hit);
        n_ref++;
      end else begin
        int unsigned v = 0;
        foreach (age[i]) if (age[i] == entries - 1) v = i;
        if (tab[v] != '0) n_evict++;
        tab[v] = u;
        touch(v);
        t.kind = TOK_UNIMPL; t.retain = 1; t.upd = u;
        n_new++;
      end
      toks.push_back(t);
    endfunction
  endclass

  // ---------------- file formats ----------------
  // token -> words of the compressed trace file
  function automatic void tok_to_words(ztok_t t, ref logic [31:0] q [$]);
    q.push_back({t.kind, t.retain, 5'd0, t.idx, t.count});
    if (t.kind == TOK_UNIMPL) begin
      q.push_back({t.upd.rd_we, t.upd.rd, t.upd.mem_op, t.upd.mem_be, 20'd0});
      q.push_back(t.upd.rd_val);
      q.push_back(t.upd.mem_addr);
      q.push_back(t.upd.mem_data);
      q.push_back(t.upd.npc_delta);
    end
  endfunction

  // seven words of the output file -> record
  function automatic trec_t words_to_rec(logic [31:0] w [7]);
    trec_t r;
    r.predicted      = w[0][31];
    r.pc             = w[1];
    r.upd.rd_we      = w[2][31];
    r.upd.rd         = w[2][30:26];
    r.upd.mem_op     = mem_op_e'(w[2][25:24]);
    r.upd.mem_be     = w[2][23:20];
    r.upd.rd_val     = w[3];
    r.upd.mem_addr   = w[4];
    r.upd.mem_data   = w[5];
    r.upd.npc_delta  = w[6];
    return r;
  endfunction

  // ---------------- demo program ----------------
  // Code at 0x0, data table at 0x1000 (64 words), results from 0x1100.
  // Outer loop forever; inner loop over the table. Mixes ALU, loads,
  // stores, calls through JAL and JALR, and unpredicted MUL/LBU/SB/SLLV/
  // JALR/BGEZ.
  function automatic void demo_program(ref logic [31:0] code [$]);
    code.delete();
    // 0x00
    code.push_back(asm_i(6'h0d, 16, 0, 16'h1000));      // ori   s0, zero, 0x1000
    code.push_back(asm_i(6'h0f, 25, 0, 16'h0000));      // lui   t9, 0
    code.push_back(asm_i(6'h0d, 25, 25, 16'h0100));     // ori   t9, t9, 0x100 (func2)
    code.push_back(asm_i(6'h09, 18, 0, 16'h0000));      // addiu s2, zero, 0
    // 0x10 outer:
    code.push_back(asm_i(6'h09, 17, 0, 16'h0000));      // addiu s1, zero, 0
    // 0x14 loop:
    code.push_back(asm_r(6'h00, 8, 0, 17, 5'd2));       // sll   t0, s1, 2
    code.push_back(asm_r(6'h21, 9, 16, 8));             // addu  t1, s0, t0
    code.push_back(asm_i(6'h23, 10, 9, 16'h0000));      // lw    t2, 0(t1)
    code.push_back(asm_mul(11, 10, 17));                // mul   t3, t2, s1        (U)
    code.push_back(asm_r(6'h21, 18, 18, 11));           // addu  s2, s2, t3
    code.push_back(asm_r(6'h26, 12, 18, 10));           // xor   t4, s2, t2
    code.push_back(asm_i(6'h2b, 12, 9, 16'h0100));      // sw    t4, 0x100(t1)
    code.push_back(asm_i(6'h24, 13, 9, 16'h0001));      // lbu   t5, 1(t1)         (U)
    code.push_back(asm_i(6'h28, 13, 9, 16'h0200));      // sb    t5, 0x200(t1)     (U)
    code.push_back(asm_r(6'h04, 14, 17, 10));           // sllv  t6, t2, s1        (U)
    code.push_back(asm_j(6'h03, 32'h0000_00c0));        // jal   func1
    code.push_back(asm_i(6'h09, 4, 17, 16'h0000));      // addiu a0, s1, 0 (delay slot)
    code.push_back(asm_r(6'h09, 31, 25, 0));            // jalr  ra, t9            (U)
    code.push_back(asm_r(6'h00, 0, 0, 0));              // nop (delay slot)
    code.push_back(asm_i(6'h0c, 15, 17, 16'h0003));     // andi  t7, s1, 3
    code.push_back(asm_i(6'h05, 0, 15, 16'h0002));      // bne   t7, zero, +2 -> skip
    code.push_back(asm_r(6'h00, 0, 0, 0));              // nop (delay slot)
    code.push_back(asm_i(6'h2b, 2, 9, 16'h0300));       // sw    v0, 0x300(t1)
    // skip:
    code.push_back(asm_i(6'h09, 17, 17, 16'h0001));     // addiu s1, s1, 1
    code.push_back(asm_i(6'h0a, 8, 17, 16'h0040));      // slti  t0, s1, 64
    code.push_back(asm_i(6'h05, 0, 8, 16'hffeb));       // bne   t0, zero, loop
    code.push_back(asm_r(6'h00, 0, 0, 0));              // nop (delay slot)
    code.push_back(asm_bgez(0, 16'hffe8));              // bgez  zero, outer       (U)
    code.push_back(asm_r(6'h00, 0, 0, 0));              // nop (delay slot)
    while (code.size() < 48) code.push_back(32'h0);
    // 0xc0 func1: v0 = (a0 << 3) ^ s2 ; sra/nor/sltu/or
    code.push_back(asm_r(6'h00, 2, 0, 4, 5'd3));        // sll   v0, a0, 3
    code.push_back(asm_r(6'h26, 2, 2, 18));             // xor   v0, v0, s2
    code.push_back(asm_r(6'h03, 3, 0, 2, 5'd5));        // sra   v1, v0, 5
    code.push_back(asm_r(6'h27, 3, 3, 4));              // nor   v1, v1, a0
    code.push_back(asm_r(6'h2b, 5, 4, 3));              // sltu  a1, a0, v1
    code.push_back(asm_r(6'h2a, 6, 3, 4));              // slt   a2, v1, a0
    code.push_back(asm_r(6'h25, 2, 2, 5));              // or    v0, v0, a1
    code.push_back(asm_r(6'h08, 0, 31, 0));             // jr    ra
    code.push_back(asm_r(6'h23, 7, 2, 6));              // subu  a3, v0, a2 (delay slot)
    while (code.size() < 64) code.push_back(32'h0);
    // 0x100 func2: sltiu / xori / andi / srl / beq / jr
    code.push_back(asm_i(6'h0b, 8, 4, 16'h0020));       // sltiu t0, a0, 32
    code.push_back(asm_i(6'h0e, 9, 4, 16'h00ff));       // xori  t1, a0, 0xff
    code.push_back(asm_i(6'h04, 8, 0, 16'h0001));       // beq   t0, zero, +1
    code.push_back(asm_r(6'h00, 9, 0, 9, 5'd1));        // srl   t1, t1, 1 (delay slot)
    code.push_back(asm_r(6'h08, 0, 31, 0));             // jr    ra
    code.push_back(asm_r(6'h24, 9, 9, 4));              // and   t1, t1, a0 (delay slot)
  endfunction

  // data word k of the table at 0x1000 (LCG; zero for every eighth word)
  function automatic logic [31:0] demo_data(int unsigned k);
    logic [31:0] x = 32'h1234_5678 ^ (k * 32'h9e37_79b9);
    x = x * 32'd1103515245 + 32'd12345;
    return (k % 8 == 7) ? 32'h0 : x;
  endfunction
endpackage
