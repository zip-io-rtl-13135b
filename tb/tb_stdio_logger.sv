// tb_stdio_logger: the logger prints through a randomly back-pressured
// channel while its counters change every cycle. Several runs, one per
// reset: no error, an error long before finish, an error in the same
// cycle as finish, and an error after the summary. Each accepted PRINTF
// must carry the right stream, format handle and the counter values of
// that cycle; the lines must come in the order error (at most once),
// summary 1, summary 2; log_done must rise only after summary 2.
module tb_stdio_logger;
  import stdio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready = 0, err = 0, finish = 0, log_done;
  sio_req_t    req;
  logic [31:0] n_markers = 0, n_patches = 0, n_refs = 0, n_retained = 0;

  stdio_logger #(.CLIENT(2'd2), .LOG_HANDLE(16'd9), .ERR_STR(16'd20),
                 .SUM1_STR(16'd21), .SUM2_STR(16'd22)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] lines [$];
  int unsigned n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (req_valid && !req_ready) n_stall++;
    if (rst_n) begin
      checks++;
      if (log_done !== (16'd22 inside {lines})) begin
        failures++;
        if (failures < 10) $display("FAIL: log_done %0d after %0d lines", log_done, lines.size());
      end
    end
    if (rst_n && req_valid && req_ready) begin
      logic [63:0] want;
      want = (req.arg == 16'd22) ? {n_retained, n_refs} : {n_patches, n_markers};
      checks++;
      if (req.op !== SIO_PRINTF || req.client !== 2'd2 || req.handle !== 16'd9 ||
          !(req.arg inside {16'd20, 16'd21, 16'd22}) || req.data !== want) begin
        failures++;
        if (failures < 10) $display("FAIL: request %p", req);
      end
      lines.push_back(req.arg);
    end
  end

  always @(posedge clk) begin
    n_markers  <= $urandom; n_patches <= $urandom;
    n_refs     <= $urandom; n_retained <= $urandom;
    req_ready  <= ($urandom_range(0, 2) != 0);
  end

  // err_at / fin_at: cycles after reset; 0 means never
  task automatic run(int unsigned err_at, int unsigned fin_at, bit err_first);
    lines.delete();
    err <= 0; finish <= 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int c = 1; c <= 200; c++) begin
      if (c == err_at) err <= 1;
      if (c == fin_at) finish <= 1;
      @(posedge clk);
    end
    if (err_at != 0) begin
      check(lines.size() == 3, $sformatf("%0d lines with an error", lines.size()));
      if (lines.size() == 3) begin
        if (err_first) check(lines[0] == 16'd20 && lines[1] == 16'd21 && lines[2] == 16'd22, "order error, summary");
        else           check(lines[0] == 16'd21 && lines[1] == 16'd22 && lines[2] == 16'd20, "order summary, error");
      end
    end else begin
      check(lines.size() == 2 && lines[0] == 16'd21 && lines[1] == 16'd22, "summary only");
    end
    check(log_done, "log_done not raised");
  endtask

  initial begin
    run(0, 30, 0);
    run(10, 80, 1);
    run(50, 50, 1);
    run(150, 40, 0);
    check(n_stall > 0, "channel never stalled");
    $display("stalls=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
