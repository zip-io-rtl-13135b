// rec_pack: serialises inflated trace records into 32-bit words for the
// output file, two words per transfer.
//
// Each record becomes seven words (this design's own format; the paper
// does not publish the record layout its host-side translator reads):
//   [31] predicted, pc,
//   [31] rd_we / [30:26] rd / [25:24] mem_op / [23:20] mem_be,
//   rd_val, mem_addr, mem_data, npc_delta
// They leave as four beats under valid/ready: words 0-1, 2-3, 4-5 and
// word 6 alone (out_two low, upper half zero); the lower half of a beat is
// the earlier word. Two words per beat let a record leave in four cycles,
// so the output keeps up with the 0.15 records per cycle the paper quotes.
// A record is taken with the last beat of the previous one. idle is high
// when nothing is held.
module rec_pack
  import zipio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  trec_t       in_rec,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic        out_two,
  output logic        idle
);
  trec_t      r;
  logic [1:0] pos;
  logic       busy;

  assign in_ready  = !busy || (out_ready && pos == 2'd3);
  assign out_valid = busy;
  assign idle      = !busy;

  always_comb begin
    out_two = 1'b1;
    unique case (pos)
      2'd0:    out_data = {r.pc, r.predicted, 31'd0};
      2'd1:    out_data = {r.upd.rd_val, r.upd.rd_we, r.upd.rd, r.upd.mem_op, r.upd.mem_be, 20'd0};
      2'd2:    out_data = {r.upd.mem_data, r.upd.mem_addr};
      default: begin
        out_data = {32'd0, r.upd.npc_delta};
        out_two  = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      pos  <= '0;
      r    <= '0;
    end else begin
      if (busy && out_ready) begin
        if (pos == 2'd3) begin
          busy <= 1'b0;
          pos  <= '0;
        end else begin
          pos <= pos + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        r    <= in_rec;
        busy <= 1'b1;
        pos  <= '0;
      end
    end
  end
endmodule
