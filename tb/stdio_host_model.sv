// stdio_host_model: behavioural model of the host's standard-I/O service
// for testbenches (not synthesizable, not part of the design).
//
// Files are queues of words: in_file is read through FREAD, out_file
// collects FWRITE words (one or two per request, as arg says). FOPEN of
// string handle IN_STR answers handle 16'h11, of OUT_STR 16'h22. Requests are served strictly in order; each
// FREAD starts answering a random LAT_MIN..LAT_MAX cycles after it was
// accepted, then returns one word per cycle with random gaps, marking the
// last word, and eof plus a short count when the file runs out. PRINTF
// requests are recorded in log_q (stream, format handle, arguments).
// req_ready drops now and then to exercise back-pressure.
module stdio_host_model
  import stdio_pkg::*;
#(
  parameter logic [15:0] IN_STR  = 16'd0,
  parameter logic [15:0] OUT_STR = 16'd1,
  parameter int unsigned LAT_MIN = 10,
  parameter int unsigned LAT_MAX = 40
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  sio_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output sio_rsp_t rsp
);
  typedef struct { logic [15:0] handle; logic [15:0] fmt; logic [63:0] args; } log_t;
  log_t        log_q [$];   // PRINTF requests, in order
  logic [31:0] in_file  [$];
  logic [31:0] out_file [$];
  int unsigned rd_pos = 0;
  bit          out_closed = 0;
  int unsigned n_fread = 0, n_short = 0, n_fwrite = 0, n_bad = 0;

  typedef struct { sio_req_t r; longint due; } job_t;
  job_t jobs [$];
  longint now = 0;
  int unsigned left = 0;   // words still to send for the head FREAD
  bit          active = 0;

  always @(posedge clk) now <= now + 1;

  initial req_ready = 0;
  always @(posedge clk) req_ready <= rst_n && ($urandom_range(0, 7) != 0);

  always @(posedge clk) begin
    if (req_valid && req_ready) begin
      job_t j;
      j.r = req;
      j.due = now + $urandom_range(LAT_MIN, LAT_MAX);
      case (req.op)
        SIO_FWRITE: begin
          if (req.handle == 16'h22 && !out_closed && (req.arg == 16'd1 || req.arg == 16'd2)) begin
            out_file.push_back(req.data[31:0]);
            if (req.arg == 16'd2) out_file.push_back(req.data[63:32]);
            n_fwrite++;
          end else n_bad++;
        end
        SIO_FCLOSE: if (req.handle == 16'h22) out_closed = 1;
        SIO_PRINTF: begin
          log_t l;
          l.handle = req.handle; l.fmt = req.arg; l.args = req.data;
          log_q.push_back(l);
        end
        default: jobs.push_back(j);
      endcase
    end
  end

  // response generator: one response per cycle at most
  initial rsp_valid = 0;
  always @(posedge clk) begin
    bit free;
    free = !rsp_valid || rsp_ready;
    if (rsp_valid && rsp_ready) begin
      if (rsp.op == SIO_FOPEN || rsp.last) begin
        void'(jobs.pop_front());
        active = 0;
      end
      rsp_valid <= 0;
    end
    if (free && jobs.size() > 0 && jobs[0].due <= now && $urandom_range(0, 3) != 0) begin
      sio_rsp_t o;
      o = '0;
      o.op = jobs[0].r.op;
      o.client = jobs[0].r.client;
      if (jobs[0].r.op == SIO_FOPEN) begin
        o.data = (jobs[0].r.arg == IN_STR) ? 32'h11 : (jobs[0].r.arg == OUT_STR ? 32'h22 : 32'hffff);
        o.last = 1;
      end else begin
        if (!active) begin
          active = 1; left = jobs[0].r.arg; n_fread++;
        end
        if (rd_pos >= in_file.size()) begin
          o.nodata = 1; o.last = 1; o.eof = 1; n_short++;
        end else begin
          o.data = in_file[rd_pos]; rd_pos++; left--;
          o.eof  = (rd_pos >= in_file.size());
          o.last = (left == 0) || o.eof;
          if (o.eof && left != 0) n_short++;
        end
      end
      rsp <= o;
      rsp_valid <= 1;
    end
  end
endmodule
