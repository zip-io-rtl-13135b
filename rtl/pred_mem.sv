// pred_mem: memory system of the predictor CPU, holding the instruction
// cache and the data cache.
//
// Both are word arrays of 2**AW words, indexed by byte address bits
// [AW+1:2]; higher address bits are ignored, so the program must fit in
// the window. Every write (a store of the core, a patch from the core
// controller, or program loading) goes to both arrays with byte enables,
// which keeps instruction and data copies coherent. Reads are synchronous
// with an enable: rdata is the word addressed in the last cycle with the
// enable high and holds otherwise, as block RAM does. The ZIP-IO paper calls
// these structures caches but gives no miss path; here they are the whole
// memory, with no backing store. Array contents are not reset; the program
// loader writes what is read.
module pred_mem #(
  parameter int unsigned AW = 12
) (
  input  logic        clk,
  // instruction fetch port
  input  logic        i_en,
  input  logic [31:0] i_addr,
  output logic [31:0] i_rdata,
  // data read port
  input  logic        d_en,
  input  logic [31:0] d_addr,
  output logic [31:0] d_rdata,
  // shared write port
  input  logic        w_en,
  input  logic [3:0]  w_be,
  input  logic [31:0] w_addr,
  input  logic [31:0] w_data
);
  logic [31:0] icache [2**AW];
  logic [31:0] dcache [2**AW];

  wire [AW-1:0] wi = w_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (w_en) begin
      for (int b = 0; b < 4; b++) begin
        if (w_be[b]) begin
          icache[wi][8*b +: 8] <= w_data[8*b +: 8];
          dcache[wi][8*b +: 8] <= w_data[8*b +: 8];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (i_en) i_rdata <= icache[i_addr[AW+1:2]];
    if (d_en) d_rdata <= dcache[d_addr[AW+1:2]];
  end
endmodule
