// fe_optimized: optimized feature extractor (coastline, fractal dimension,
// Hurst exponent), the high-accuracy configuration of the detector.
//
// One window of N 8-bit samples is taken in, stored in the window buffer and
// reduced to three features:
//   cl  coastline, sum |x(n+1) - x(n)|                         20 bits
//   fd  sum over the 5 Higuchi curve lengths of ln(L)/2       16 bits, Q8.8
//   he  atanh((R << 16) / S), R the MAV-referenced range,      8 bits, Q1.7
//       S the root of the sum of squared deviations
// Divisions and multiplications by constants are removed (they only rescale
// a feature), divisions by N are shifts, and the logarithms are computed with
// a hyperbolic CORDIC. fe_sequencer runs the window: a load pass (coastline,
// fractal-dimension accumulators, sums), a read-back pass (squared deviations,
// min/max) and a post-processing phase. The three results are registered and
// presented together.
//
// What follows the architecture: the three features, the removal of constant
// factors, shifts for the divisions by N, R scaled by 2^16 before the division
// by S, logarithms by atanh CORDIC, the 1024 x 16-bit window buffer and the
// 8-bit Hurst output. Own choices: the two-pass window control, the handshake,
// the Q8.8 fd output, and out_valid once all three features are ready; the
// reference implementation needs about 3N+60 cycles per window, this one 2N+75.
//
// Interface: valid/ready sample input (a sample is taken when both are high;
// in_ready is low between the end of a window and its features). `out_valid`
// pulses for one cycle with cl/fd/he, which hold until the next window.
// Timing at the defaults with a sample every cycle: out_valid comes
// 2N + 75 cycles after the window's first sample (Hurst path: read-back,
// square root, divider, CORDIC).
module fe_optimized
  import fe_pkg::*;
#(
  parameter int unsigned N      = WINDOW_N,
  parameter int unsigned DATA_W = SAMPLE_W,
  parameter int unsigned CL_W   = 20,
  parameter int unsigned FD_W   = 16,
  parameter int unsigned HE_W   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic [CL_W-1:0]          cl,
  output logic [FD_W-1:0]          fd,
  output logic [HE_W-1:0]          he,
  output logic                     he_clamped
);

  logic s_valid, s_first, s_last, r_valid, r_first, r_last;
  logic signed [DATA_W-1:0] s_data, r_data;
  logic buf_we, buf_re;
  logic [$clog2(N)-1:0] buf_addr;
  logic [BUF_W-1:0] buf_wdata, buf_rdata;
  fe_phase_e phase;

  logic cl_vld, fd_vld, he_vld, he_clamp;
  logic [CL_W-1:0] cl_val;
  logic [FD_W-1:0] fd_val;
  logic [HE_W-1:0] he_val;
  logic [15:0]     lm_unused [FD_K];
  logic [7:0]      r_unused;
  logic [14:0]     s_unused;
  logic have_cl_q, have_fd_q, have_he_q, all_done;
  // each feature is captured when it is ready; the outputs change together
  logic [CL_W-1:0] cl_hold;
  logic [FD_W-1:0] fd_hold;
  logic [HE_W-1:0] he_hold;
  logic            clamp_hold;

  fe_sequencer #(.N(N), .DATA_W(DATA_W), .WIDTH(BUF_W)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .s_valid, .s_first, .s_last, .s_data,
    .r_valid, .r_first, .r_last, .r_data,
    .buf_we, .buf_re, .buf_addr, .buf_wdata, .buf_rdata,
    .post_done (all_done),
    .phase
  );

  window_buffer #(.DEPTH(N), .WIDTH(BUF_W)) u_buf (
    .clk, .we (buf_we), .re (buf_re), .addr (buf_addr), .wdata (buf_wdata), .rdata (buf_rdata)
  );

  coastline #(.DATA_W(DATA_W), .OUT_W(CL_W)) u_cl (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data,
    .valid (cl_vld), .cl (cl_val)
  );

  fractal_dim_opt #(.DATA_W(DATA_W), .K(FD_K), .ACC_W(16), .OUT_W(FD_W)) u_fd (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data,
    .valid (fd_vld), .fd (fd_val), .lm_dbg (lm_unused)
  );

  hurst_opt #(.DATA_W(DATA_W), .N(N), .R_W(8), .SHIFT(16), .S_W(15), .OUT_W(HE_W)) u_he (
    .clk, .rst_n, .s_valid, .s_first, .s_data, .r_valid, .r_first, .r_last, .r_data,
    .valid (he_vld), .h (he_val), .clamped (he_clamp), .r_dbg (r_unused), .s_dbg (s_unused)
  );

  assign all_done = (have_cl_q || cl_vld) && (have_fd_q || fd_vld) && (have_he_q || he_vld)
                    && (phase == PH_POST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_cl_q  <= 1'b0;
      have_fd_q  <= 1'b0;
      have_he_q  <= 1'b0;
      out_valid  <= 1'b0;
      cl         <= '0;
      fd         <= '0;
      he         <= '0;
      he_clamped <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (cl_vld) have_cl_q <= 1'b1;
      if (fd_vld) have_fd_q <= 1'b1;
      if (he_vld) have_he_q <= 1'b1;
      if (all_done) begin
        have_cl_q  <= 1'b0;
        have_fd_q  <= 1'b0;
        have_he_q  <= 1'b0;
        out_valid  <= 1'b1;
        cl         <= cl_vld ? cl_val : cl_hold;
        fd         <= fd_vld ? fd_val : fd_hold;
        he         <= he_vld ? he_val : he_hold;
        he_clamped <= he_vld ? he_clamp : clamp_hold;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cl_hold    <= '0;
      fd_hold    <= '0;
      he_hold    <= '0;
      clamp_hold <= 1'b0;
    end else begin
      if (cl_vld) cl_hold <= cl_val;
      if (fd_vld) fd_hold <= fd_val;
      if (he_vld) begin he_hold <= he_val; clamp_hold <= he_clamp; end
    end
  end

endmodule
