// tb_stdio_writer: the writer opens its file through the behavioural
// host, writes a random stream of one- and two-word transfers offered
// with random gaps while
// the host back-pressures, and closes the file only after close is raised
// and no word is pending. The host's output file must equal the stream.
module tb_stdio_writer;
  import stdio_pkg::*;

  localparam int N = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, rsp_valid, rsp_ready;
  sio_req_t    req;
  sio_rsp_t    rsp;
  logic        in_valid, drv = 0, in_ready, close = 0, done, in_two;
  logic [63:0] in_data;

  stdio_writer #(.CLIENT(2'd1), .NAME_STR(16'd1)) dut (.*);
  stdio_host_model #(.IN_STR(16'd0), .OUT_STR(16'd1)) host (.*);

  int checks = 0, failures = 0;
  logic [63:0] beats [$];
  logic        twos [$];
  logic [31:0] words [$];
  int unsigned sent = 0, n_stall = 0, n_open = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    in_valid = drv && (sent < beats.size());
    in_data  = (sent < beats.size()) ? beats[sent] : 64'd0;
    in_two   = (sent < beats.size()) ? twos[sent] : 1'b0;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (in_valid && !in_ready) n_stall++;
    if (req_valid && req_ready && req.op == SIO_FOPEN) begin
      n_open++;
      checks++;
      if (req.client !== 2'd1 || req.arg !== 16'd1 || req.data !== 64'd1) begin
        failures++;
        $display("FAIL: open request %p", req);
      end
    end
    if (req_valid && req_ready && req.op == SIO_FWRITE) begin
      checks++;
      if (req.handle !== 16'h22 || req.client !== 2'd1 || req.arg !== (in_two ? 16'd2 : 16'd1)) begin
        failures++;
        if (failures < 10) $display("FAIL: write request %p", req);
      end
    end
    if (rst_n) begin
      checks++;
      if (done && (sent < beats.size() || !close)) begin
        failures++;
        if (failures < 10) $display("FAIL: done before the stream ended");
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      logic [63:0] b;
      logic        t;
      b = {$urandom, $urandom};
      t = 1'($urandom);
      if (!t) b[63:32] = $urandom;  // the upper half must be ignored
      beats.push_back(b);
      twos.push_back(t);
      words.push_back(b[31:0]);
      if (t) words.push_back(b[63:32]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // close is raised early while the last words are still offered
    // without gaps: the writer must wait for them
    while (sent < beats.size()) begin
      drv   <= (sent > N - 20) || ($urandom_range(0, 3) != 0);
      close <= (sent > N - 20);
      @(posedge clk);
    end
    drv <= 0;
    close <= 1;
    while (!done) @(posedge clk);
    repeat (5) @(posedge clk);
    check(host.out_file.size() == words.size(), $sformatf("%0d words written", host.out_file.size()));
    for (int i = 0; i < words.size() && i < host.out_file.size(); i++) check(host.out_file[i] == words[i], $sformatf("word %0d", i));
    check(host.out_closed, "file not closed");
    check(host.n_bad == 0, "write to a wrong handle");
    check(n_open == 1 && n_stall > 0, "a mechanism did not occur");
    $display("words=%0d stalls=%0d", host.out_file.size(), n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
