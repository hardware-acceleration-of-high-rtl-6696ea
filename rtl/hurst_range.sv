// hurst_range: range term R of the Hurst exponent.
//
//   MAV = (sum |x|) >> log2(N)                      (pass 1, load stream)
//   R   = | |max(x - MAV)| - |min(x - MAV)| |        (pass 2, read stream)
// The mean absolute value is built while the window streams in; once it is
// known, the read-back pass subtracts it from every sample and tracks the
// largest and smallest difference. The absolute values are taken on the
// extremes and on their difference, in that order, as in the architecture.
// Deviations are DEV_W = 10 bits signed, wide enough for any 8-bit sample
// minus a mean absolute value of up to 128. R saturates at R_W bits.
//
// Interface: s_* and r_* streams of fe_sequencer. `valid` pulses one cycle
// after the cycle with `r_last`; `r_out` and `mav` hold until the next window.
module hurst_range #(
  parameter int unsigned DATA_W = fe_pkg::SAMPLE_W,
  parameter int unsigned N      = fe_pkg::WINDOW_N,
  parameter int unsigned MAV_W  = 8,
  parameter int unsigned DEV_W  = 10,
  parameter int unsigned R_W    = 8
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
  output logic [R_W-1:0]           r_out,
  output logic [MAV_W-1:0]         mav
);

  localparam int unsigned LOG2N = $clog2(N);
  localparam int unsigned ASUM_W = DATA_W + LOG2N;

  logic [ASUM_W-1:0]       asum_q;
  logic [DATA_W-1:0]       mag;
  logic signed [DEV_W-1:0] dev, max_q, min_q, max_n, min_n;
  logic [DEV_W-1:0]        amax, amin, rdiff;

  always_comb begin
    mag   = s_data[DATA_W-1] ? DATA_W'(-s_data) : DATA_W'(s_data);
    dev   = DEV_W'(r_data) - DEV_W'(mav);
    max_n = (r_first || dev > max_q) ? dev : max_q;
    min_n = (r_first || dev < min_q) ? dev : min_q;
    amax  = max_n[DEV_W-1] ? DEV_W'(-max_n) : DEV_W'(max_n);
    amin  = min_n[DEV_W-1] ? DEV_W'(-min_n) : DEV_W'(min_n);
    rdiff = (amax >= amin) ? amax - amin : amin - amax;
  end

  assign mav = MAV_W'(asum_q >> LOG2N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asum_q <= '0;
      max_q  <= '0;
      min_q  <= '0;
      valid  <= 1'b0;
      r_out  <= '0;
    end else begin
      valid <= 1'b0;
      if (s_valid) asum_q <= (s_first ? '0 : asum_q) + ASUM_W'(mag);
      if (r_valid) begin
        max_q <= max_n;
        min_q <= min_n;
        if (r_last) begin
          valid <= 1'b1;
          r_out <= (|(rdiff >> R_W)) ? '1 : R_W'(rdiff);  // saturate
        end
      end
    end
  end

  initial begin
    assert (DEV_W > R_W || DEV_W == R_W) else $error("hurst_range: R_W wider than DEV_W");
  end

endmodule
