// hurst_approx: Hurst-exponent feature of the approximate extractor,
//   H = sqrt(R).
//
// The approximate extractor drops the division by the standard deviation
// (and with it the whole standard-deviation datapath) and replaces the
// logarithm by a square root, a cheaper curve of similar shape. R comes from
// hurst_range with a 10-bit mean absolute value, 10-bit deviations and a
// 10-bit R; the 5-bit output is its integer square root.
//
// What follows the architecture: MAV, the range R from the MAV-referenced
// extremes with the absolute values in the order drawn, no standard
// deviation, a square root of R, 10-bit MAV and R and a 5-bit output. Own
// choice: the MAV is the mean of absolute values (one reading of the source).
//
// Interface: s_*/r_* streams of fe_sequencer. `valid` pulses with `h`
// (held) 8 cycles after the cycle with `r_last` (1 for R, 7 for the root).
module hurst_approx #(
  parameter int unsigned DATA_W = fe_pkg::SAMPLE_W,
  parameter int unsigned N      = fe_pkg::WINDOW_N,
  parameter int unsigned R_W    = 10,
  parameter int unsigned OUT_W  = R_W / 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  input  logic                     s_first,
  input  logic signed [DATA_W-1:0] s_data,
  input  logic                     r_valid,
  input  logic                     r_first,
  input  logic                     r_last,
  input  logic signed [DATA_W-1:0] r_data,
  output logic                     valid,
  output logic [OUT_W-1:0]         h,
  output logic [R_W-1:0]           r_dbg
);

  logic           r_vld, sq_busy;
  logic [R_W-1:0] mav_unused;

  hurst_range #(.DATA_W(DATA_W), .N(N), .MAV_W(R_W), .DEV_W(R_W), .R_W(R_W)) u_range (
    .clk, .rst_n, .s_valid, .s_first, .s_data, .r_valid, .r_first, .r_last, .r_data,
    .valid (r_vld),
    .r_out (r_dbg),
    .mav   (mav_unused)
  );

  isqrt #(.IN_W(R_W), .OUT_W(OUT_W)) u_sqrt (
    .clk, .rst_n,
    .start    (r_vld),
    .radicand (r_dbg),
    .busy     (sq_busy),
    .done     (valid),
    .root     (h)
  );

endmodule
