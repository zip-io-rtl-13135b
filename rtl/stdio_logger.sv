// stdio_logger: debug log of the decompressor, printed through the
// standard-I/O PRINTF request.
//
// Format strings are never sent as text: each message names a format in
// the shared string table by its string handle (ERR_STR, SUM1_STR,
// SUM2_STR) and carries two 32-bit arguments; the host formats and
// writes the line to its stream LOG_HANDLE. Messages:
//   ERR_STR   once, when err rises: arguments n_markers, n_patches
//   SUM1_STR  when finish rises: arguments n_markers, n_patches
//   SUM2_STR  right after SUM1: arguments n_refs, n_retained
// After SUM2 has been accepted, log_done rises and stays high. The
// arguments are sampled when a message is accepted. An error message is
// sent before a summary that is due in the same cycle.
// The paper gives formatted printing with string-handle format strings
// and says the decompressor writes debug log files through STDIO; which
// events are logged, and the use of an already open host stream, are this
// design's choices.
module stdio_logger
  import stdio_pkg::*;
#(
  parameter client_t     CLIENT     = 2'd2,
  parameter logic [15:0] LOG_HANDLE = 16'd2,
  parameter logic [15:0] ERR_STR    = 16'd2,
  parameter logic [15:0] SUM1_STR   = 16'd3,
  parameter logic [15:0] SUM2_STR   = 16'd4
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        req_valid,
  input  logic        req_ready,
  output sio_req_t    req,
  // events and values to log
  input  logic        err,
  input  logic        finish,
  input  logic [31:0] n_markers,
  input  logic [31:0] n_patches,
  input  logic [31:0] n_refs,
  input  logic [31:0] n_retained,
  output logic        log_done
);
  typedef enum logic [1:0] {S_RUN, S_SUM2, S_DONE} state_e;
  state_e state;
  logic   err_logged;

  wire send_err  = err && !err_logged;
  wire send_sum1 = state == S_RUN && finish && !send_err;

  always_comb begin
    req        = '0;
    req.op     = SIO_PRINTF;
    req.client = CLIENT;
    req.handle = LOG_HANDLE;
    req_valid  = 1'b1;
    if (send_err) begin
      req.arg  = ERR_STR;
      req.data = {n_patches, n_markers};
    end else if (send_sum1) begin
      req.arg  = SUM1_STR;
      req.data = {n_patches, n_markers};
    end else if (state == S_SUM2) begin
      req.arg  = SUM2_STR;
      req.data = {n_retained, n_refs};
    end else begin
      req_valid = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      err_logged <= 1'b0;
    end else if (req_valid && req_ready) begin
      if (send_err)              err_logged <= 1'b1;
      else if (send_sum1)        state      <= S_SUM2;
      else if (state == S_SUM2)  state      <= S_DONE;
    end
  end

  assign log_done = (state == S_DONE);
endmodule
