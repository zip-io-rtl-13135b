// tb_stdio_mux: three clients offer numbered requests with random gaps
// while the channel back-pressures at random. Each client's requests must
// leave exactly once and in order, and the grant must follow the
// round-robin rule: after client g, the first waiting client among g+1,
// g+2, ... wins. Random responses must be steered by their client tag.
module tb_stdio_mux;
  import stdio_pkg::*;

  localparam int unsigned N = 3;
  localparam int unsigned M = 2000;   // requests per client

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     c_req_valid [N], c_req_ready [N], c_rsp_valid [N];
  sio_req_t c_req [N];
  logic     req_valid, req_ready = 0, rsp_valid = 0, rsp_ready;
  sio_req_t req;
  sio_rsp_t rsp = '0;
  logic     d [N];

  stdio_mux #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned s [N], e [N];
  int unsigned last = N - 1, n_multi = 0, n_stall = 0;

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

  // requests carry the client in client and handle, the sequence number in data
  always_comb begin
    for (int i = 0; i < N; i++) begin
      c_req_valid[i] = d[i] && s[i] < M;
      c_req[i] = '0;
      c_req[i].op = sio_op_e'(i);
      c_req[i].client = client_t'(i);
      c_req[i].handle = 16'(i);
      c_req[i].data = 64'(s[i]);
    end
  end

  always @(posedge clk) begin
    int unsigned want, nv;
    bit found;
    if (req_valid && !req_ready) n_stall++;
    // expected winner
    found = 0; want = 0; nv = 0;
    for (int k = 1; k <= N; k++) begin
      int unsigned i;
      i = (last + k) % N;
      if (c_req_valid[i]) begin
        nv++;
        if (!found) begin found = 1; want = i; end
      end
    end
    if (rst_n) begin
      checks++;
      if (req_valid !== found || rsp_ready !== 1'b1) begin
        failures++;
        if (failures < 10) $display("FAIL: req_valid %0d expected %0d", req_valid, found);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (c_req_ready[i] !== (req_ready && found && want == i) ||
            c_rsp_valid[i] !== (rsp_valid && rsp.client == client_t'(i))) begin
          failures++;
          if (failures < 10) $display("FAIL: client %0d ready or response steering", i);
        end
      end
    end
    if (req_valid && req_ready) begin
      int unsigned c;
      c = req.handle;
      checks++;
      if (!found || c != want || req !== c_req[want] || req.data != 64'(e[c])) begin
        failures++;
        if (failures < 10) $display("FAIL: granted client %0d request %0d, expected client %0d request %0d", c, req.data, want, e[want]);
      end
      if (nv > 1) n_multi++;
      if (c < N) e[c]++;
      last = want;
    end
    for (int i = 0; i < N; i++) if (c_req_valid[i] && c_req_ready[i]) s[i] <= s[i] + 1;
  end

  initial begin
    bit busy;
    for (int i = 0; i < N; i++) begin s[i] = 0; e[i] = 0; d[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    do begin
      // keep a request up until it is taken (valid may not drop)
      for (int i = 0; i < N; i++)
        if (!(c_req_valid[i] && !c_req_ready[i])) d[i] <= ($urandom_range(0, 2) != 0);
      req_ready <= ($urandom_range(0, 4) != 0);
      rsp_valid <= 1'($urandom);
      rsp       <= sio_rsp_t'({$urandom, $urandom});
      @(posedge clk);
      busy = 0;
      for (int i = 0; i < N; i++) if (s[i] < M) busy = 1;
    end while (busy);
    for (int i = 0; i < N; i++) d[i] <= 0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) check(e[i] == M, $sformatf("client %0d: %0d requests through", i, e[i]));
    check(n_multi > 0 && n_stall > 0, "a mechanism did not occur");
    $display("contended_grants=%0d stalls=%0d", n_multi, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
