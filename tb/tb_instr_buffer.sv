// tb_instr_buffer: tests the Zcompr+ instruction buffer's LRU replacement
// and lookup against an independent recency-list model: random writes
// and reads; the written slot must be the model's least recently used one
// and every read must return what the model holds.
module tb_instr_buffer;
  import zipio_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  upd_t wr_data = '0, rd_data;
  logic [$clog2(N)-1:0] wr_slot, rd_idx = 0;
  int checks = 0, failures = 0;
  int unsigned order [$];   // front = most recent
  upd_t model [N];

  instr_buffer #(.ENTRIES(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void touch(int unsigned s);
    foreach (order[i]) if (order[i] == s) begin order.delete(i); break; end
    order.push_front(s);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin order.push_back(i); model[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int c = 0; c < 3000; c++) begin
      wr_en = 0; rd_en = 0;
      if ($urandom_range(0, 2) == 0) begin
        wr_en = 1;
        wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      end else begin
        rd_en = 1;
        rd_idx = $urandom_range(0, N - 1);
      end
      #1;
      checks++;
      if (wr_en) begin
        if (wr_slot != order[N-1]) begin
          failures++; $display("FAIL: victim %0d, expected %0d", wr_slot, order[N-1]);
        end
      end else if (rd_data != model[rd_idx]) begin
        failures++; $display("FAIL: slot %0d read mismatch", rd_idx);
      end
      @(posedge clk);
      if (wr_en) begin
        int unsigned v;
        v = order[N-1];
        model[v] = wr_data;
        touch(v);
      end else touch(rd_idx);
      #1;
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
