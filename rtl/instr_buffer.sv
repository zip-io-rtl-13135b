// instr_buffer: the Zcompr+ instruction buffer, a small fully associative
// store of previously seen unimplemented-instruction records with
// least-recently-used slot tracking.
//
// The compressor keeps the same table and uses LRU to choose which
// records to retain; the decompressor must mirror its choices exactly, so
// this buffer replays the LRU order from the stream itself:
//   - wr_en  : store wr_data in the least recently used slot, which then
//              becomes the most recently used one; wr_slot reports it.
//   - rd_en  : rd_data = slot rd_idx (combinational), and the slot
//              becomes the most recently used one at the clock edge.
// wr_en and rd_en are never raised together. Recency is an age per slot
// (0 = most recent, ENTRIES-1 = victim); reset gives slot i age i, so an
// empty buffer fills in slot order 0, 1, 2, ... Record contents start at
// zero. The ZIP-IO paper names the buffer and its LRU policy; its size and
// this encoding of recency are this design's choices.
module instr_buffer
  import zipio_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_en,
  input  upd_t wr_data,
  output logic [$clog2(ENTRIES)-1:0] wr_slot,
  input  logic rd_en,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output upd_t rd_data
);
  localparam int unsigned SW = $clog2(ENTRIES);

  upd_t          slot [ENTRIES];
  logic [SW-1:0] age  [ENTRIES];

  // victim: the slot whose age is the oldest
  always_comb begin
    wr_slot = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (age[i] == SW'(ENTRIES - 1)) wr_slot = SW'(i);
  end

  assign rd_data = slot[rd_idx];

  wire [SW-1:0] touch     = wr_en ? wr_slot : rd_idx;
  wire          touch_en  = wr_en || rd_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) age[i] <= SW'(i);
    end else if (touch_en) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (SW'(i) == touch)              age[i] <= '0;
        else if (age[i] < age[touch])     age[i] <= age[i] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) slot[i] <= '0;
    end else if (wr_en) begin
      slot[wr_slot] <= wr_data;
    end
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && rd_en));
endmodule
