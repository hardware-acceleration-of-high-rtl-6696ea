// fe_sequencer: window control of a feature extractor.
//
// A window goes through three phases (fe_pkg::fe_phase_e):
//   LOAD  `in_ready` is high; each accepted sample is written to the window
//         buffer and forwarded on the load stream (s_*), on which the
//         streaming features (coastline, fractal-dimension accumulators, sum,
//         sum of absolute values) work.
//   READ  the buffer is read back once, in order, on the read stream (r_*),
//         for the parts that need the window's mean or mean absolute value
//         before they can start (deviation squares, minimum and maximum).
//   POST  the sequencer waits for `post_done` from the extractor, whose
//         iterative units (square root, divider, CORDIC) finish here.
// The buffer is a synchronous-read memory, so the read stream lags the
// addresses by one cycle. How the phases are ordered is this design's choice;
// only the window length and the buffering are taken from the architecture.
//
// The load stream and the buffer write data are the accepted input sample
// itself (s_data = in_data, buf_wdata = in_data sign-extended), so those
// outputs are wires from the input. The buffer is 16 bits wide as in the
// architecture; only the low DATA_W bits of a read word are used.
//
// Timing: with `in_valid` held high, LOAD takes N cycles and READ N cycles;
// `r_last` is high 2N cycles after the first sample was accepted.
module fe_sequencer
  import fe_pkg::*;
#(
  parameter int unsigned N      = WINDOW_N,
  parameter int unsigned DATA_W = SAMPLE_W,
  parameter int unsigned WIDTH  = BUF_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sample input
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  // load stream
  output logic                     s_valid,
  output logic                     s_first,
  output logic                     s_last,
  output logic signed [DATA_W-1:0] s_data,
  // read-back stream
  output logic                     r_valid,
  output logic                     r_first,
  output logic                     r_last,
  output logic signed [DATA_W-1:0] r_data,
  // window buffer port
  output logic                     buf_we,
  output logic                     buf_re,
  output logic [$clog2(N)-1:0]     buf_addr,
  output logic [WIDTH-1:0]         buf_wdata,
  input  logic [WIDTH-1:0]         buf_rdata,
  // end of post-processing
  input  logic                     post_done,
  output fe_phase_e                phase
);

  localparam int unsigned AW = $clog2(N);

  logic [AW-1:0] cnt_q;
  logic          cnt_last;

  assign cnt_last  = (cnt_q == AW'(N - 1));
  assign in_ready  = (phase == PH_LOAD);

  always_comb begin
    s_valid   = in_valid && in_ready;
    s_first   = s_valid && (cnt_q == '0);
    s_last    = s_valid && cnt_last;
    s_data    = in_data;
    buf_we    = s_valid;
    buf_re    = (phase == PH_READ);
    buf_addr  = cnt_q;
    buf_wdata = WIDTH'(in_data);
    if (WIDTH > DATA_W) buf_wdata = {{(WIDTH-DATA_W){in_data[DATA_W-1]}}, in_data};
    r_data    = buf_rdata[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_LOAD;
      cnt_q   <= '0;
      r_valid <= 1'b0;
      r_first <= 1'b0;
      r_last  <= 1'b0;
    end else begin
      r_valid <= buf_re;
      r_first <= buf_re && (cnt_q == '0);
      r_last  <= buf_re && cnt_last;
      unique case (phase)
        PH_LOAD: if (s_valid) begin
          cnt_q <= cnt_last ? '0 : cnt_q + 1'b1;
          if (cnt_last) phase <= PH_READ;
        end
        PH_READ: begin
          cnt_q <= cnt_last ? '0 : cnt_q + 1'b1;
          if (cnt_last) phase <= PH_POST;
        end
        PH_POST: if (post_done) phase <= PH_LOAD;
        default: phase <= PH_LOAD;
      endcase
    end
  end

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0) else $error("fe_sequencer: N must be a power of two");
    assert (WIDTH >= DATA_W) else $error("fe_sequencer: buffer narrower than a sample");
  end

endmodule
