// zipio_pkg: types and constants shared by the trace decompressor.
//
// The decompressor turns a compressed instruction trace back into one
// state-update record per executed instruction. Three kinds of token arrive
// in the compressed stream (the token layout is this design's own choice,
// the ZIP-IO paper gives only their meaning):
//   TOK_PRED   - predictable-trace marker: the next COUNT instructions are
//                produced by the predictor CPU itself.
//   TOK_UNIMPL - the full state update of one instruction the predictor CPU
//                does not implement; RETAIN asks the decompressor to keep it
//                in the Zcompr+ instruction buffer.
//   TOK_REF    - Zcompr+ reference: repeat the record held in buffer slot IDX.
// A state update (upd_t) is relative where the ZIP-IO paper calls out repeated
// behaviour: the next-PC effect is a delta, so "advance by four" records
// repeat exactly.
package zipio_pkg;

  typedef enum logic [1:0] {
    MEM_NONE  = 2'd0,
    MEM_READ  = 2'd1,
    MEM_WRITE = 2'd2
  } mem_op_e;

  // Architectural effect of one instruction.
  //   rd_we/rd/rd_val : register write (rd 0 is never written)
  //   mem_op/mem_addr : memory access seen by the instruction (for a
  //                     cache simulator downstream)
  //   mem_be/mem_data : written bytes and data for MEM_WRITE
  //   npc_delta       : new_npc = old_npc + npc_delta (new_pc = old_npc)
  typedef struct packed {
    logic        rd_we;
    logic [4:0]  rd;
    logic [31:0] rd_val;
    mem_op_e     mem_op;
    logic [3:0]  mem_be;
    logic [31:0] mem_addr;
    logic [31:0] mem_data;
    logic [31:0] npc_delta;
  } upd_t;

  typedef enum logic [1:0] {
    TOK_PRED   = 2'd0,
    TOK_UNIMPL = 2'd1,
    TOK_REF    = 2'd2
  } tok_kind_e;

  localparam int unsigned COUNT_W = 16;  // run length of one marker
  localparam int unsigned IDX_W   = 8;   // widest buffer index carried

  // Compressed-trace token as read from the input stream.
  typedef struct packed {
    tok_kind_e          kind;
    logic               retain;   // TOK_UNIMPL: store in instruction buffer
    logic [IDX_W-1:0]   idx;      // TOK_REF: buffer slot
    logic [COUNT_W-1:0] count;    // TOK_PRED: number of predicted steps
    upd_t               upd;      // TOK_UNIMPL: the state update
  } ztok_t;

  // Token after Zcompr+ expansion: only markers and full records remain.
  typedef struct packed {
    logic               unimpl;   // 1: upd holds an unpredictable record
    logic [COUNT_W-1:0] count;    // marker run length when unimpl = 0
    upd_t               upd;
  } dtok_t;

  // Inflated trace record, one per executed instruction.
  // pc is filled in for predicted records; for unpredictable records it
  // is zero and the consumer takes it from the preceding record's next PC.
  typedef struct packed {
    logic        predicted;
    logic [31:0] pc;
    upd_t        upd;
  } trec_t;

endpackage
