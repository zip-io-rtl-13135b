// tb_stdio_reader: the reader opens a file through the behavioural host
// and streams it out with random output stalls. Small chunk and buffer
// sizes make the buffer-room rule limit the reads in flight. Several
// files are read, one per reset: empty, an exact multiple of the chunk and
// odd lengths. The words must arrive in order, eof must rise only after
// the last one, the buffer must never be offered a word it cannot take,
// and more than one read must have been in flight.
module tb_stdio_reader;
  import stdio_pkg::*;

  localparam int unsigned CHUNK = 4, MAX_OUT = 3, BUF_WORDS = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, rsp_valid, rsp_ready;
  sio_req_t    req;
  sio_rsp_t    rsp;
  logic        out_valid, out_ready = 0, eof;
  logic [31:0] out_data;
  logic [7:0]  max_inflight;

  stdio_reader #(.CLIENT(2'd0), .NAME_STR(16'd0), .CHUNK(CHUNK), .MAX_OUT(MAX_OUT),
                 .BUF_WORDS(BUF_WORDS)) dut (.*);
  stdio_host_model #(.IN_STR(16'd0), .OUT_STR(16'd1), .LAT_MIN(2), .LAT_MAX(30)) host (.*);

  int checks = 0, failures = 0;
  logic [31:0] words [$];
  int unsigned got = 0, n_stall = 0, n_limit = 0, best = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      checks++;
      if (got >= words.size() || out_data !== words[got]) begin
        failures++;
        if (failures < 10) $display("FAIL: word %0d: got %h", got, out_data);
      end
      got <= got + 1;
    end
    if (rst_n) begin
      checks++;
      if (eof && (got < words.size() || out_valid)) begin
        failures++;
        if (failures < 10) $display("FAIL: eof with %0d of %0d words delivered", got, words.size());
      end
      if (rsp_valid && rsp.op == SIO_FREAD && !rsp.nodata) begin
        checks++;
        if (!dut.u_buf.in_ready) begin
          failures++;
          if (failures < 10) $display("FAIL: response word arrived with the buffer full");
        end
      end
      if (dut.state == 2'd2 && !dut.buf_room && 32'(dut.inflight) < MAX_OUT && !dut.seen_eof) n_limit++;
    end
  end

  task automatic run_file(int unsigned len, int unsigned stall_pct);
    words.delete();
    for (int i = 0; i < len; i++) words.push_back($urandom);
    host.in_file = words;
    host.rd_pos = 0;
    host.jobs.delete();
    host.active = 0;
    got = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    while (!eof) begin
      out_ready <= ($urandom_range(0, 99) >= stall_pct);
      @(posedge clk);
    end
    repeat (50) @(posedge clk);
    check(got == len, $sformatf("file of %0d words: %0d delivered", len, got));
    check(host.jobs.size() == 0, "reads left unanswered");
    if (max_inflight > best) best = max_inflight;
  endtask

  initial begin
    rsp_ready = 1;
    run_file(0, 10);
    run_file(4 * CHUNK, 10);
    run_file(1, 50);
    run_file(999, 10);
    run_file(777, 70);
    run_file(1000, 0);
    check(best > 1, $sformatf("at most %0d reads in flight", best));
    check(n_stall > 0, "output never stalled");
    check(n_limit > 0, "buffer room never limited the reads");
    check(host.n_short > 0, "no short read");
    $display("max_in_flight=%0d stalls=%0d room_limited=%0d short_reads=%0d", best, n_stall, n_limit, host.n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
