// stdio_writer: hardware side of a standard-I/O file write.
//
// After reset it opens the file named by string handle NAME_STR for
// writing and waits for the handle. It then turns every transfer of its
// input stream (one or two words, as in_two says) into one FWRITE
// request, in order. When `close` is raised and
// the input is empty, it sends FCLOSE and raises done. The paper states
// that the STDIO library offers raw I/O on file and pipe handles; the
// request format is this design's choice. Timing: one transfer per cycle
// when the request channel is free; in_ready follows req_ready.
module stdio_writer
  import stdio_pkg::*;
#(
  parameter client_t     CLIENT   = 2'd1,
  parameter logic [15:0] NAME_STR = 16'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        req_valid,
  input  logic        req_ready,
  output sio_req_t    req,
  input  logic        rsp_valid,
  input  sio_rsp_t    rsp,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  input  logic        in_two,
  input  logic        close,
  output logic        done
);
  typedef enum logic [2:0] {S_OPEN, S_OPEN_WAIT, S_WRITE, S_CLOSE, S_DONE} state_e;
  state_e state;
  logic [15:0] handle;

  always_comb begin
    req        = '0;
    req.client = CLIENT;
    req.handle = handle;
    req_valid  = 1'b0;
    in_ready   = 1'b0;
    unique case (state)
      S_OPEN: begin
        req_valid = 1'b1;
        req.op    = SIO_FOPEN;
        req.arg   = NAME_STR;
        req.data  = 64'd1;
      end
      S_WRITE: begin
        req_valid = in_valid;
        req.op    = SIO_FWRITE;
        req.arg   = in_two ? 16'd2 : 16'd1;
        req.data  = in_two ? in_data : {32'd0, in_data[31:0]};
        in_ready  = req_ready;
      end
      S_CLOSE: begin
        req_valid = 1'b1;
        req.op    = SIO_FCLOSE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_OPEN;
      handle <= '0;
    end else begin
      unique case (state)
        S_OPEN:      if (req_ready) state <= S_OPEN_WAIT;
        S_OPEN_WAIT: if (rsp_valid && rsp.op == SIO_FOPEN) begin
                       handle <= rsp.data[15:0];
                       state  <= S_WRITE;
                     end
        S_WRITE:     if (close && !in_valid) state <= S_CLOSE;
        S_CLOSE:     if (req_ready) state <= S_DONE;
        S_DONE:      ;
        default:     state <= S_DONE;
      endcase
    end
  end

  assign done = (state == S_DONE);
endmodule
