// stdio_pkg: request and response formats of the standard-I/O channel
// between the decompressor and the host.
//
// The ZIP-IO paper describes a host-backed STDIO service: file and pipe
// handles opened by name, where names are handles into a string table
// shared by hardware and software, and split-phase reads, so that
// hardware can keep several reads in flight. The field layout below is
// this design's own; the paper does not publish one.
//   FOPEN  arg = string handle of the file name, data[0] = 1 for writing;
//          answered by one response whose data is the file handle.
//   FREAD  handle, arg = number of 32-bit words wanted; answered by up
//          to arg responses of one word each, the final one marked last.
//          eof on the final response means the file ended; a final
//          response with nodata set carries no word.
//   FWRITE handle, arg = 1 or 2 words, data[31:0] = first word,
//          data[63:32] = second word; no response.
//   FCLOSE handle; no response.
//   PRINTF handle, arg = string handle of the format, data[31:0] and
//          data[63:32] = first and second argument; no response. The
//          host formats the text with its own printf.
// client tags every request, and is echoed in its responses, so that
// several hardware clients can share one channel.
package stdio_pkg;

  localparam int unsigned CLIENT_W = 2;
  typedef logic [CLIENT_W-1:0] client_t;

  typedef enum logic [2:0] {
    SIO_FOPEN  = 3'd0,
    SIO_FREAD  = 3'd1,
    SIO_FWRITE = 3'd2,
    SIO_FCLOSE = 3'd3,
    SIO_PRINTF = 3'd4
  } sio_op_e;

  typedef struct packed {
    sio_op_e     op;
    client_t     client;
    logic [15:0] handle;
    logic [15:0] arg;
    logic [63:0] data;
  } sio_req_t;

  typedef struct packed {
    sio_op_e     op;
    client_t     client;
    logic [31:0] data;
    logic        last;
    logic        eof;
    logic        nodata;
  } sio_rsp_t;

endpackage
