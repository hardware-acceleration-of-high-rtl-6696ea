// seizure_detector_top: power-aware EEG seizure detector.
//
// An EEG channel is cut into windows of N samples; each window is reduced to
// three features (coastline, fractal dimension, Hurst exponent) and a linear
// SVM decides whether the window shows a seizure. Two feature extractors
// trade accuracy for power: fe_optimized (logarithms by CORDIC, Hurst
// exponent normalised by the standard deviation) and fe_approximate (square
// roots instead of logarithms, no standard deviation, shorter words). On the
// FPGA the two are swapped into one reconfigurable region by partial
// reconfiguration, depending on the battery level and on how critical the
// patient's activity is. Here both are present and `mode_approx` selects the
// active one; the other gets no samples and stays idle. The mode is sampled
// only between windows, so a window is never split between extractors.
// The classifier weights and biases come from off-line (SMO) training, one
// set per extractor, and enter as ports.
//
// What follows the architecture: the two extractors, their selection by
// available power or activity, and a linear SVM on three features. Own
// choices: a mode input and a multiplexer in place of partial
// reconfiguration of one FPGA region, the mode timing, and weights as ports.
//
// Interface: valid/ready sample input. `feat_valid` pulses with the active
// extractor's features (unused high bits zero: the approximate extractor
// gives a 7-bit fd and a 5-bit he), `feat_mode` tells which extractor made
// them. `result_valid` pulses 5 cycles later with `seizure` and `score`.
// `mode_approx` is sampled in a cycle with no open window and no sample
// accepted; a change must therefore be applied at least one cycle before the
// first sample of the window it is meant for, and a change during a window
// waits until that window's features are out.
module seizure_detector_top
  import fe_pkg::*;
#(
  parameter int unsigned N       = WINDOW_N,
  parameter int unsigned W_W     = 16,
  parameter int unsigned SCORE_W = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [SAMPLE_W-1:0] in_data,
  input  logic                      mode_approx,
  input  logic signed [W_W-1:0]     w_opt [3],
  input  logic signed [SCORE_W-1:0] b_opt,
  input  logic signed [W_W-1:0]     w_apx [3],
  input  logic signed [SCORE_W-1:0] b_apx,
  output logic                      feat_valid,
  output logic                      feat_mode,
  output logic [19:0]               feat_cl,
  output logic [15:0]               feat_fd,
  output logic [7:0]                feat_he,
  output logic                      he_clamped,
  output logic                      result_valid,
  output logic                      result_mode,
  output logic                      seizure,
  output logic signed [SCORE_W-1:0] score
);

  logic mode_q, win_open_q;

  logic opt_in_valid, opt_in_ready, opt_out_valid, opt_clamped;
  logic [19:0] opt_cl;
  logic [15:0] opt_fd;
  logic [7:0]  opt_he;
  logic apx_in_valid, apx_in_ready, apx_out_valid;
  logic [19:0] apx_cl;
  logic [6:0]  apx_fd;
  logic [4:0]  apx_he;

  logic                      cls_busy;
  logic [19:0]               cls_feat [3];
  logic signed [W_W-1:0]     cls_w    [3];
  logic signed [SCORE_W-1:0] cls_b;
  logic                      cls_mode_q;

  // extractor selection
  assign opt_in_valid = in_valid && !mode_q;
  assign apx_in_valid = in_valid &&  mode_q;
  assign in_ready     = mode_q ? apx_in_ready : opt_in_ready;

  fe_optimized #(.N(N)) u_fe_opt (
    .clk, .rst_n,
    .in_valid (opt_in_valid), .in_ready (opt_in_ready), .in_data,
    .out_valid (opt_out_valid), .cl (opt_cl), .fd (opt_fd), .he (opt_he),
    .he_clamped (opt_clamped)
  );

  fe_approximate #(.N(N)) u_fe_apx (
    .clk, .rst_n,
    .in_valid (apx_in_valid), .in_ready (apx_in_ready), .in_data,
    .out_valid (apx_out_valid), .cl (apx_cl), .fd (apx_fd), .he (apx_he)
  );

  // the mode may change only while no window is open
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q     <= 1'b0;
      win_open_q <= 1'b0;
    end else begin
      if (opt_out_valid || apx_out_valid) win_open_q <= 1'b0;
      else if (in_valid && in_ready)      win_open_q <= 1'b1;
      if (!win_open_q && !(in_valid && in_ready) && !cls_busy) mode_q <= mode_approx;
    end
  end

  // feature vector of the active extractor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_valid <= 1'b0;
      feat_mode  <= 1'b0;
      feat_cl    <= '0;
      feat_fd    <= '0;
      feat_he    <= '0;
      he_clamped <= 1'b0;
    end else begin
      feat_valid <= opt_out_valid || apx_out_valid;
      if (opt_out_valid) begin
        feat_mode  <= 1'b0;
        feat_cl    <= opt_cl;
        feat_fd    <= opt_fd;
        feat_he    <= opt_he;
        he_clamped <= opt_clamped;
      end else if (apx_out_valid) begin
        feat_mode  <= 1'b1;
        feat_cl    <= apx_cl;
        feat_fd    <= 16'(apx_fd);
        feat_he    <= 8'(apx_he);
        he_clamped <= 1'b0;
      end
    end
  end

  always_comb begin
    cls_feat[0] = feat_cl;
    cls_feat[1] = 20'(feat_fd);
    cls_feat[2] = 20'(feat_he);
    cls_w       = feat_mode ? w_apx : w_opt;
    cls_b       = feat_mode ? b_apx : b_opt;
  end

  svm_classifier #(.NF(3), .F_W(20), .W_W(W_W), .SCORE_W(SCORE_W)) u_svm (
    .clk, .rst_n,
    .start   (feat_valid),
    .feat    (cls_feat),
    .weight  (cls_w),
    .bias    (cls_b),
    .busy    (cls_busy),
    .done    (result_valid),
    .score   (score),
    .seizure (seizure)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cls_mode_q <= 1'b0;
    else if (feat_valid) cls_mode_q <= feat_mode;
  end
  assign result_mode = cls_mode_q;

endmodule
