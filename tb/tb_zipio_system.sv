// tb_zipio_system: end-to-end test of the decompressor behind its
// standard-I/O channel, at default parameters.
//
// The reference instruction-set model runs the demo program; the reference
// Zcompr+ compressor turns its trace into tokens, which are serialized into
// the words of the input file (with a few padding words mixed in). A
// behavioural host answers FOPEN, FREAD, FWRITE and FCLOSE with random
// latency. The testbench loads the program, starts the core, waits for
// done and decodes the output file into records, which must equal the
// reference trace. It also checks that several reads were in flight at
// once, that the reader prefetched before the core was started, that the
// file end was seen through a short read, and that the output file was
// closed, that the summary was printed to the log, and that the whole run, from start to done, reaches the
// 0.15 records per cycle that 15 MIPS at 100 MHz takes.
module tb_zipio_system;
  import zipio_pkg::*;
  import stdio_pkg::*;
  import zipio_tb_pkg::*;

  localparam int unsigned NSTEPS  = 6000;
  localparam int unsigned MEM_AW  = 12;
  localparam int unsigned ENTRIES = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sio_req_valid, sio_req_ready, sio_rsp_valid, sio_rsp_ready;
  sio_req_t    sio_req;
  sio_rsp_t    sio_rsp;
  logic        prog_we = 0, start_we = 0, prog_ready;
  logic [31:0] prog_addr = 0, prog_data = 0, start_pc = 0;
  logic        done, err_unimpl;
  logic [31:0] n_refs, n_retained, n_markers, n_patches, n_drain_wait;
  logic [7:0]  max_reads_inflight;

  zipio_system dut (.*);

  stdio_host_model #(.IN_STR(16'd0), .OUT_STR(16'd1), .LAT_MIN(10), .LAT_MAX(60)) host (
    .clk, .rst_n,
    .req_valid(sio_req_valid), .req_ready(sio_req_ready), .req(sio_req),
    .rsp_valid(sio_rsp_valid), .rsp_ready(sio_rsp_ready), .rsp(sio_rsp)
  );

  int checks = 0, failures = 0;
  trec_t exp_q [$];
  int unsigned n_pad = 0, reads_before_start = 0;
  longint      t_start, t_done;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: timed out (%0d output words, done=%0d)", host.out_file.size(), done);
    $display("end-to-end rate: %0d records in %0d cycles", exp_q.size(), t_done - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mips_iss     iss;
    zcompressor  zc;
    logic [31:0] code [$];
    logic [31:0] words [$];
    logic [31:0] w7 [7];
    upd_t        u;
    trec_t       r, g;
    int unsigned loads [$];
    int unsigned n_rec, gap;

    iss = new(MEM_AW);
    zc  = new(ENTRIES);
    demo_program(code);
    foreach (code[i]) begin
      iss.mem[i] = code[i];
      loads.push_back(i);
    end
    for (int k = 0; k < 64; k++) begin
      iss.mem[1024 + k] = demo_data(k);
      loads.push_back(1024 + k);
    end
    for (int s = 0; s < NSTEPS; s++) begin
      logic [31:0] pc0;
      pc0 = iss.pc;
      if (iss.step(u)) begin
        r.predicted = 1; r.pc = pc0; r.upd = u;
        zc.predicted();
      end else begin
        r.predicted = 0; r.pc = 0; r.upd = u;
        zc.unpredicted(u);
      end
      exp_q.push_back(r);
    end
    zc.flush_run();
    foreach (zc.toks[i]) begin
      if ($urandom_range(0, 15) == 0) begin
        words.push_back({2'b11, 30'($urandom)});
        n_pad++;
      end
      tok_to_words(zc.toks[i], words);
    end
    host.in_file = words;
    $display("input file: %0d tokens, %0d words (%0d padding); %0d records expected",
             zc.toks.size(), words.size(), n_pad, exp_q.size());

    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // the reader opens and prefetches while the program is loaded slowly
    foreach (loads[i]) begin
      prog_we <= 1; prog_addr <= loads[i] * 4; prog_data <= (loads[i] < code.size()) ? code[loads[i]] : demo_data(loads[i] - 1024);
      @(posedge clk);
      while (!prog_ready) @(posedge clk);
      gap = $urandom_range(0, 3);
      if (gap != 0) begin
        prog_we <= 0;
        repeat (gap) @(posedge clk);
      end
    end
    prog_we <= 0;
    reads_before_start = host.n_fread;
    start_we <= 1; start_pc <= 0;
    @(posedge clk);
    start_we <= 0;
    t_start = host.now;

    while (!done) @(posedge clk);
    t_done = host.now;
    repeat (10) @(posedge clk);

    n_rec = host.out_file.size() / 7;
    check(host.out_file.size() == 7 * exp_q.size(),
          $sformatf("output file has %0d words, expected %0d", host.out_file.size(), 7 * exp_q.size()));
    for (int i = 0; i < n_rec && i < exp_q.size(); i++) begin
      for (int k = 0; k < 7; k++) w7[k] = host.out_file[7 * i + k];
      g = words_to_rec(w7);
      checks++;
      if (g !== exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: record %0d: got %p expected %p", i, g, exp_q[i]);
      end
    end
    check(!err_unimpl, "predictor hit an instruction it does not implement");
    check(host.rd_pos == words.size(), "input file not read to the end");
    check(host.out_closed, "output file not closed");
    check(host.n_bad == 0, "write to a handle that is not the output file");
    check(max_reads_inflight > 1, $sformatf("at most %0d reads in flight", max_reads_inflight));
    check(reads_before_start > 0, "no read was issued before the core started");
    check(host.n_short > 0, "the file end was never reached through a short read");
    check(n_pad > 0, "no padding word in the input file");
    check(n_refs == zc.n_ref, $sformatf("Zcompr+ references %0d vs %0d", n_refs, zc.n_ref));
    check(n_retained == zc.n_new, $sformatf("retained records %0d vs %0d", n_retained, zc.n_new));
    check(n_patches == zc.n_ref + zc.n_new, $sformatf("patches %0d", n_patches));
    check(n_markers > 0, "no markers");
    // debug log: the summary only, with the final statistics
    check(host.log_q.size() == 2, $sformatf("%0d log lines printed", host.log_q.size()));
    if (host.log_q.size() == 2) begin
      check(host.log_q[0].handle == 16'd2 && host.log_q[0].fmt == 16'd3 &&
            host.log_q[0].args == {n_patches, n_markers}, "first summary line");
      check(host.log_q[1].handle == 16'd2 && host.log_q[1].fmt == 16'd4 &&
            host.log_q[1].args == {n_retained, n_refs}, "second summary line");
    end
    // 15 MIPS at 100 MHz: at least 0.15 records per cycle end to end,
    // with the host throttling requests and delaying reads at random
    check(real'(exp_q.size()) / real'(t_done - t_start) >= 0.15,
          $sformatf("rate %0d records in %0d cycles", exp_q.size(), t_done - t_start));
    $display("mechanisms: freads=%0d (before start %0d) max_in_flight=%0d short_reads=%0d pads=%0d refs=%0d retained=%0d markers=%0d drain_waits=%0d",
             host.n_fread, reads_before_start, max_reads_inflight, host.n_short, n_pad, n_refs, n_retained, n_markers, n_drain_wait);
    $display("end-to-end rate: %0d records in %0d cycles", exp_q.size(), t_done - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
