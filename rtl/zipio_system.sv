// zipio_system: the complete FPGA side of ZIP-IO: the trace decompressor
// fed from, and writing back to, host files through the standard-I/O
// channel.
//
//   host file (compressed trace words) --FREAD--> stdio_reader
//     -> tok_unpack -> zipio_top (decompressor) -> rec_pack
//     -> stdio_writer --FWRITE--> host file or pipe (inflated records)
// The reader, the writer and the logger share one request/response
// channel through stdio_mux. Both open their files by string handle at reset
// (TRACE_IN_STR, TRACE_OUT_STR). The program image is loaded through
// prog_*. Tokens are held back until start_we sets the entry point; the
// reader may already prefetch meanwhile. When the input file has ended and
// every token has been inflated and written, the writer closes its file,
// the logger prints its summary to the host stream LOG_HANDLE, and done
// rises. The logger also prints a line if the predictor core meets an
// instruction it does not implement.
// Timing: the shared channel takes one request per cycle and a record
// costs four write requests, so the output is capped at 0.25 records per
// cycle, above the 0.15 that 15 MIPS at 100 MHz takes.
//
// The paper gives the structure (decompressor between STDIO input and
// output) and the split-phase reads; the file formats, chunk size and
// number of reads in flight are this design's choices.
module zipio_system
  import zipio_pkg::*;
  import stdio_pkg::*;
#(
  parameter int unsigned IN_DEPTH      = 64,
  parameter int unsigned OUT_DEPTH     = 64,
  parameter int unsigned IBUF_ENTRIES  = 16,
  parameter int unsigned MEM_AW        = 12,
  parameter logic [15:0] TRACE_IN_STR  = 16'd0,
  parameter logic [15:0] TRACE_OUT_STR = 16'd1,
  parameter int unsigned READ_CHUNK    = 16,
  parameter int unsigned MAX_READS     = 4,
  parameter int unsigned READ_BUF      = 128,
  parameter logic [15:0] LOG_HANDLE    = 16'd2,
  parameter logic [15:0] LOG_ERR_STR   = 16'd2,
  parameter logic [15:0] LOG_SUM1_STR  = 16'd3,
  parameter logic [15:0] LOG_SUM2_STR  = 16'd4
) (
  input  logic        clk,
  input  logic        rst_n,
  // standard-I/O channel to the host
  output logic        sio_req_valid,
  input  logic        sio_req_ready,
  output sio_req_t    sio_req,
  input  logic        sio_rsp_valid,
  output logic        sio_rsp_ready,
  input  sio_rsp_t    sio_rsp,
  // program image and start
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic        start_we,
  input  logic [31:0] start_pc,
  output logic        prog_ready,
  // status
  output logic        done,
  output logic        err_unimpl,
  output logic [31:0] n_refs,
  output logic [31:0] n_retained,
  output logic [31:0] n_markers,
  output logic [31:0] n_patches,
  output logic [31:0] n_drain_wait,
  output logic [7:0]  max_reads_inflight
);
  logic     r_req_valid, r_req_ready, w_req_valid, w_req_ready, r_rsp_valid, w_rsp_valid;
  sio_req_t r_req, w_req;
  logic        rw_valid, rw_ready, eof;
  logic [31:0] rw_data;
  logic        t_valid, t_ready, u_idle;
  ztok_t       t_tok;
  logic        o_valid, o_ready, core_idle, p_idle;
  trec_t       o_rec;
  logic        pw_valid, pw_ready, pw_two;
  logic [63:0] pw_data;
  logic        started;

  // channel clients: 0 reader, 1 writer, 2 logger
  logic     m_req_valid [3], m_req_ready [3], m_rsp_valid [3];
  sio_req_t m_req [3];
  logic     l_req_valid, l_req_ready, w_done;
  sio_req_t l_req;

  always_comb begin
    m_req_valid[0] = r_req_valid;  m_req[0] = r_req;
    m_req_valid[1] = w_req_valid;  m_req[1] = w_req;
    m_req_valid[2] = l_req_valid;  m_req[2] = l_req;
    r_req_ready = m_req_ready[0];
    w_req_ready = m_req_ready[1];
    l_req_ready = m_req_ready[2];
    r_rsp_valid = m_rsp_valid[0];
    w_rsp_valid = m_rsp_valid[1];
  end

  stdio_mux #(.N(3)) u_mux (
    .clk, .rst_n,
    .c_req_valid(m_req_valid), .c_req_ready(m_req_ready), .c_req(m_req),
    .c_rsp_valid(m_rsp_valid),
    .req_valid(sio_req_valid), .req_ready(sio_req_ready), .req(sio_req),
    .rsp_valid(sio_rsp_valid), .rsp_ready(sio_rsp_ready), .rsp(sio_rsp)
  );

  stdio_reader #(.CLIENT(2'd0), .NAME_STR(TRACE_IN_STR), .CHUNK(READ_CHUNK),
                 .MAX_OUT(MAX_READS), .BUF_WORDS(READ_BUF)) u_reader (
    .clk, .rst_n,
    .req_valid(r_req_valid), .req_ready(r_req_ready), .req(r_req),
    .rsp_valid(r_rsp_valid), .rsp(sio_rsp),
    .out_valid(rw_valid), .out_ready(rw_ready), .out_data(rw_data),
    .eof, .max_inflight(max_reads_inflight)
  );

  tok_unpack u_unpack (
    .clk, .rst_n,
    .in_valid(rw_valid), .in_ready(rw_ready), .in_data(rw_data),
    .out_valid(t_valid), .out_ready(t_ready), .out_tok(t_tok),
    .idle(u_idle)
  );

  // tokens wait until the program is loaded and started
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       started <= 1'b0;
    else if (start_we && prog_ready)  started <= 1'b1;
  end

  logic dq_ready;
  assign t_ready = started && dq_ready;

  zipio_top #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .IBUF_ENTRIES(IBUF_ENTRIES),
              .MEM_AW(MEM_AW)) u_zip (
    .clk, .rst_n,
    .in_valid(t_valid && started), .in_ready(dq_ready), .in_tok(t_tok),
    .out_valid(o_valid), .out_ready(o_ready), .out_rec(o_rec),
    .prog_we, .prog_addr, .prog_data, .start_we, .start_pc, .prog_ready,
    .err_unimpl, .n_refs, .n_retained, .n_markers, .n_patches, .n_drain_wait,
    .idle(core_idle)
  );

  rec_pack u_pack (
    .clk, .rst_n,
    .in_valid(o_valid), .in_ready(o_ready), .in_rec(o_rec),
    .out_valid(pw_valid), .out_ready(pw_ready), .out_data(pw_data), .out_two(pw_two),
    .idle(p_idle)
  );

  stdio_writer #(.CLIENT(2'd1), .NAME_STR(TRACE_OUT_STR)) u_writer (
    .clk, .rst_n,
    .req_valid(w_req_valid), .req_ready(w_req_ready), .req(w_req),
    .rsp_valid(w_rsp_valid), .rsp(sio_rsp),
    .in_valid(pw_valid), .in_ready(pw_ready), .in_data(pw_data), .in_two(pw_two),
    .close(started && eof && u_idle && core_idle && p_idle),
    .done(w_done)
  );

  stdio_logger #(.CLIENT(2'd2), .LOG_HANDLE(LOG_HANDLE), .ERR_STR(LOG_ERR_STR),
                 .SUM1_STR(LOG_SUM1_STR), .SUM2_STR(LOG_SUM2_STR)) u_logger (
    .clk, .rst_n,
    .req_valid(l_req_valid), .req_ready(l_req_ready), .req(l_req),
    .err(err_unimpl), .finish(w_done),
    .n_markers, .n_patches, .n_refs, .n_retained,
    .log_done(done)
  );
endmodule
