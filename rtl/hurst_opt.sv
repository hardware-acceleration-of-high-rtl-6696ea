// hurst_opt: Hurst-exponent feature of the optimized extractor,
//   H = atanh(R * 2^16 / S).
//
// R comes from hurst_range (8 bits), S from std_dev (15 bits). The constant
// divisions of the textbook formula (by log T, by N-1) are dropped, and
// ln(R/S) is replaced by atanh(R/S), dropping the factor 2 of
// ln(v) = 2 atanh((v-1)/(v+1)); both only rescale the feature. R is shifted
// left by 16 so that the 24-bit quotient of the sequential divider is R/S as
// a 16-bit binary fraction. The quotient is moved to the CORDIC format and
// clamped to 0.8, inside the convergence range of hyperbolic CORDIC (R/S is
// normally about 0.2 because S is not divided by N). The 8-bit output is the
// CORDIC angle with 7 fraction bits.
//
// What follows the architecture: R scaled by 2^16 and divided by S, the 8-bit
// R and output, 15-bit S and 24-bit quotient, atanh in place of the
// logarithm. Own choices: the restoring divider, the clamp at 0.8 (the
// architecture does not say how R/S is kept inside the CORDIC's range), and
// the Q1.7 output.
//
// Interface: s_*/r_* streams of fe_sequencer. `valid` pulses with `h`
// (held) after S is ready: divider (26 cycles) then CORDIC (26 cycles).
// `clamped` is high with `valid` when the quotient had to be clamped.
module hurst_opt
  import fe_pkg::*;
#(
  parameter int unsigned DATA_W = SAMPLE_W,
  parameter int unsigned N      = WINDOW_N,
  parameter int unsigned R_W    = 8,
  parameter int unsigned SHIFT  = 16,
  parameter int unsigned S_W    = 15,
  parameter int unsigned OUT_W  = 8
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
  output logic                     clamped,
  output logic [R_W-1:0]           r_dbg,
  output logic [S_W-1:0]           s_dbg
);

  localparam int unsigned Q_W = R_W + SHIFT;         // 24: dividend, quotient
  localparam int unsigned CW  = CORDIC_W;
  localparam int unsigned CF  = CORDIC_FRAC;
  localparam logic signed [CW-1:0] ONE  = CW'(1) <<< CF;
  // 0.8 in the CORDIC format
  localparam logic signed [CW-1:0] YMAX = CW'((longint'(1) <<< CF) * 4 / 5);

  logic             r_vld, s_vld;
  logic [R_W-1:0]   r_val;
  logic [S_W-1:0]   s_val;
  logic [DATA_W-1:0] mav_unused;
  logic signed [DATA_W-1:0] mean_unused;
  logic             have_r_q, have_s_q;
  logic             div_start, div_busy, div_done;
  logic [Q_W-1:0]   quo;
  logic [S_W-1:0]   rem_unused;
  logic             cor_start, cor_busy, cor_done;
  logic signed [CW-1:0] y_in, z;
  logic             clamp_q;
  logic signed [CW+Q_W:0] quo_scaled;

  hurst_range #(.DATA_W(DATA_W), .N(N), .MAV_W(DATA_W), .DEV_W(DATA_W + 2), .R_W(R_W)) u_range (
    .clk, .rst_n, .s_valid, .s_first, .s_data, .r_valid, .r_first, .r_last, .r_data,
    .valid (r_vld),
    .r_out (r_val),
    .mav   (mav_unused)
  );

  std_dev #(.DATA_W(DATA_W), .N(N), .ACC_W(2 * S_W), .OUT_W(S_W)) u_std (
    .clk, .rst_n, .s_valid, .s_first, .s_data, .r_valid, .r_first, .r_last, .r_data,
    .valid (s_vld),
    .s_out (s_val),
    .mean  (mean_unused)
  );

  divider #(.N_W(Q_W), .D_W(S_W)) u_div (
    .clk, .rst_n,
    .start     (div_start),
    .dividend  ({r_dbg, SHIFT'(0)}),
    .divisor   (s_dbg),
    .busy      (div_busy),
    .done      (div_done),
    .quotient  (quo),
    .remainder (rem_unused)
  );

  // quotient (SHIFT fraction bits) -> CORDIC format (CF fraction bits), clamped
  always_comb begin
    quo_scaled = (CW+Q_W+1)'(quo) <<< (CF - SHIFT);
    if (quo_scaled > (CW+Q_W+1)'(YMAX)) y_in = YMAX;
    else                                y_in = CW'(quo_scaled);
  end

  cordic_atanh #(.W(CW), .FRAC(CF), .ITER(CF)) u_cordic (
    .clk, .rst_n,
    .start (cor_start),
    .x0    (ONE),
    .y0    (y_in),
    .busy  (cor_busy),
    .done  (cor_done),
    .z     (z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_r_q  <= 1'b0;
      have_s_q  <= 1'b0;
      r_dbg     <= '0;
      s_dbg     <= '0;
      div_start <= 1'b0;
      cor_start <= 1'b0;
      clamp_q   <= 1'b0;
      valid     <= 1'b0;
      h         <= '0;
      clamped   <= 1'b0;
    end else begin
      div_start <= 1'b0;
      cor_start <= 1'b0;
      valid     <= 1'b0;
      if (r_vld) begin r_dbg <= r_val; have_r_q <= 1'b1; end
      if (s_vld) begin s_dbg <= s_val; have_s_q <= 1'b1; end
      if (have_r_q && have_s_q) begin
        have_r_q  <= 1'b0;
        have_s_q  <= 1'b0;
        div_start <= 1'b1;
      end
      if (div_done) begin
        cor_start <= 1'b1;
        clamp_q   <= (quo_scaled > (CW+Q_W+1)'(YMAX));
      end
      if (cor_done) begin
        valid   <= 1'b1;
        clamped <= clamp_q;
        h       <= (z < 0) ? '0 : OUT_W'(z >>> (CF - (OUT_W - 1)));
      end
    end
  end

endmodule
