// tb_predictor_cpu: the predictor CPU (core controller, register file,
// memory and prediction core together), fed the expanded token stream of
// the demo program: markers and full unpredictable records, in program
// order, with random gaps. The program is written through the load port
// and started through the start port. Every predicted record the CPU
// emits must equal the reference model's, and the controller's marker and
// patch counts must match the stream.
module tb_predictor_cpu;
  import zipio_pkg::*;
  import zipio_tb_pkg::*;
  localparam int unsigned AW = 12;
  localparam int unsigned NSTEPS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tok_valid, tok_ready, drv = 0;
  dtok_t tok;
  logic prog_we = 0, start_we = 0, prog_ready;
  logic [31:0] prog_addr = 0, prog_data = 0, start_pc = 0;
  logic out_valid, out_ready = 0, err_unimpl;
  trec_t out_rec;
  logic [31:0] n_markers, n_patches, n_drain_wait;

  predictor_cpu #(.MEM_AW(AW)) dut (.*);

  dtok_t toks [$];
  trec_t exp_q [$];
  int unsigned sent = 0, got = 0, n_m = 0, n_r = 0;
  int checks = 0, failures = 0;

  assign tok_valid = drv && sent < toks.size();
  assign tok = sent < toks.size() ? toks[sent] : '0;

  always @(posedge clk) begin
    if (tok_valid && tok_ready) sent <= sent + 1;
    out_ready <= $urandom_range(0, 3) != 0;
    if (out_valid && out_ready) begin
      checks++;
      if (got >= exp_q.size() || out_rec != exp_q[got]) begin
        failures++;
        if (failures < 10) $display("FAIL: record %0d", got);
      end
      got <= got + 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mips_iss iss;
    logic [31:0] code [$];
    upd_t u;
    trec_t r;
    dtok_t d;
    int unsigned run;
    logic [31:0] pc0;
    iss = new(AW);
    demo_program(code);
    foreach (code[i]) iss.mem[i] = code[i];
    for (int k = 0; k < 64; k++) iss.mem[1024 + k] = demo_data(k);
    run = 0;
    for (int s = 0; s < NSTEPS; s++) begin
      pc0 = iss.pc;
      if (iss.step(u)) begin
        r.predicted = 1; r.pc = pc0; r.upd = u;
        exp_q.push_back(r);
        run++;
      end else begin
        if (run > 0) begin d = '0; d.count = COUNT_W'(run); toks.push_back(d); n_m++; end
        run = 0;
        d = '0; d.unimpl = 1; d.upd = u; toks.push_back(d); n_r++;
      end
    end
    if (run > 0) begin d = '0; d.count = COUNT_W'(run); toks.push_back(d); n_m++; end

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    foreach (code[i]) begin
      prog_we <= 1; prog_addr <= i * 4; prog_data <= code[i];
      do @(posedge clk); while (!prog_ready);
    end
    for (int k = 0; k < 64; k++) begin
      prog_we <= 1; prog_addr <= (1024 + k) * 4; prog_data <= demo_data(k);
      do @(posedge clk); while (!prog_ready);
    end
    prog_we <= 0; start_we <= 1; start_pc <= 0;
    @(posedge clk);
    start_we <= 0;
    while (got < exp_q.size() || sent < toks.size()) begin
      drv <= $urandom_range(0, 3) != 0;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != exp_q.size() || err_unimpl || n_markers != n_m || n_patches != n_r || n_drain_wait == 0) begin
      failures++;
      $display("FAIL: got %0d/%0d err=%b markers %0d/%0d patches %0d/%0d", got, exp_q.size(), err_unimpl, n_markers, n_m, n_patches, n_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
