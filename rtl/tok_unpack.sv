// tok_unpack: rebuilds compressed-trace tokens from the 32-bit words read
// from the trace file.
//
// Word layout of a token (this design's own file format):
//   header  [31:30] kind (0 marker, 1 full record, 2 reference)
//           [29] retain, [23:16] buffer index, [15:0] marker run length
//   a full record is followed by five words of state update:
//           [31] rd_we, [30:26] rd, [25:24] mem_op, [23:20] mem_be
//           rd_val, mem_addr, mem_data, npc_delta
// A header with kind 3 is a padding word and is skipped. The unpacker
// collects one token in a register and hands it on with valid/ready; it
// accepts the next word only once the previous token is taken (one token
// per 1 or 6 words). idle is high when no token is held or half-read.
module tok_unpack
  import zipio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output ztok_t       out_tok,
  output logic        idle
);
  logic [2:0] pos;   // 0: header expected, 1..5: update words

  assign in_ready = !out_valid || out_ready;
  assign idle     = !out_valid && pos == 3'd0;
  wire take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        unique case (pos)
          3'd0: begin
            out_tok        <= '0;
            out_tok.kind   <= tok_kind_e'(in_data[31:30]);
            out_tok.retain <= in_data[29];
            out_tok.idx    <= in_data[23:16];
            out_tok.count  <= in_data[15:0];
            if (in_data[31:30] == 2'd1)      pos <= 3'd1;
            else if (in_data[31:30] != 2'd3) out_valid <= 1'b1;
          end
          3'd1: begin
            out_tok.upd.rd_we  <= in_data[31];
            out_tok.upd.rd     <= in_data[30:26];
            out_tok.upd.mem_op <= mem_op_e'(in_data[25:24]);
            out_tok.upd.mem_be <= in_data[23:20];
            pos <= 3'd2;
          end
          3'd2: begin out_tok.upd.rd_val   <= in_data; pos <= 3'd3; end
          3'd3: begin out_tok.upd.mem_addr <= in_data; pos <= 3'd4; end
          3'd4: begin out_tok.upd.mem_data <= in_data; pos <= 3'd5; end
          default: begin
            out_tok.upd.npc_delta <= in_data;
            pos       <= 3'd0;
            out_valid <= 1'b1;
          end
        endcase
      end
    end
  end
endmodule
