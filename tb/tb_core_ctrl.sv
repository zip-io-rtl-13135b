// tb_core_ctrl: the core controller against a stand-in core that commits
// at random while allowed and is busy for a random few cycles after each
// commit. A model tracks credits. Checks that the core may issue exactly
// while credits remain, that a record is refused until credits are spent
// and the core is idle, and that an accepted record patches pc/npc,
// register and memory as it says. Also checks program loading and the
// start port, which act only when the core is drained.
module tb_core_ctrl;
  import zipio_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tok_valid = 0, tok_ready;
  dtok_t tok = '0;
  logic prog_we = 0, start_we = 0, prog_ready;
  logic [31:0] prog_addr = 0, prog_data = 0, start_pc = 0;
  logic issue_ok, core_idle;
  logic committed = 0;
  logic [31:0] cur_npc;
  logic pc_we, flush, rf_we, w_en;
  logic [31:0] pc_wdata, npc_wdata, rf_wd, w_addr, w_data;
  logic [4:0] rf_wa;
  logic [3:0] w_be;
  logic [31:0] n_markers, n_patches, n_drain_wait;
  int checks = 0, failures = 0;
  bit fire;
  int unsigned credits = 0, busy = 0, n_rec = 0, n_mark = 0, n_refused = 0;

  core_ctrl dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  assign core_idle = (busy == 0);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 4000; i++) begin
      // stimulus
      committed = issue_ok && $urandom_range(0, 3) != 0;
      cur_npc   = $urandom;
      tok_valid = $urandom_range(0, 1);
      tok       = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      tok.unimpl = $urandom_range(0, 3) != 0;
      tok.count  = $urandom_range(1, 4);
      tok.upd.mem_op = mem_op_e'($urandom_range(0, 2));
      prog_we   = (i % 300) > 280 && (i % 300) < 299;
      start_we  = (i % 300) == 299;
      prog_addr = $urandom; prog_data = $urandom; start_pc = $urandom;
      #1;
      chk(issue_ok == (credits != 0), "issue_ok");
      if (tok_valid && tok.unimpl) begin
        chk(tok_ready == (credits == 0 && busy == 0), "record acceptance");
        if (!tok_ready) n_refused++;
        if (tok_ready) begin
          chk(pc_we && pc_wdata == cur_npc && npc_wdata == cur_npc + tok.upd.npc_delta, "pc patch");
          chk(rf_we == (tok.upd.rd_we && tok.upd.rd != 0) && rf_wa == tok.upd.rd && rf_wd == tok.upd.rd_val, "reg patch");
          chk(w_en == (tok.upd.mem_op == MEM_WRITE), "mem patch enable");
          if (w_en) chk(w_addr == tok.upd.mem_addr && w_data == tok.upd.mem_data && w_be == tok.upd.mem_be, "mem patch");
        end
      end else if (tok_valid) begin
        chk(tok_ready, "marker refused");
        chk(!pc_we && !rf_we, "marker patched state");
      end else begin
        chk(!rf_we, "idle register write");
        chk(prog_ready == (credits == 0 && busy == 0), "prog_ready");
        if (prog_we && prog_ready)
          chk(w_en && w_be == 4'hf && w_addr == prog_addr && w_data == prog_data, "program load");
        else if (start_we && prog_ready)
          chk(pc_we && pc_wdata == start_pc && npc_wdata == start_pc + 4, "start");
        else
          chk(!w_en && !pc_we, "spurious write");
      end
      // model update
      fire = tok_valid && tok_ready;
      @(posedge clk);
      if (fire) begin
        if (tok.unimpl) n_rec++;
        else begin credits += tok.count; n_mark++; end
      end
      if (committed) begin credits--; busy <= $urandom_range(0, 2); end
      else if (busy > 0) busy <= busy - 1;
      #1;
    end
    chk(n_markers == n_mark && n_patches == n_rec && n_rec > 0 && n_refused > 0, "statistics and coverage");
    $display("markers=%0d/%0d records=%0d/%0d refused=%0d", n_mark, n_markers, n_rec, n_patches, n_refused);
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
