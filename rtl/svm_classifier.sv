// svm_classifier: linear-kernel support-vector-machine decision.
//
//   score = sum_i w_i * f_i + b,   seizure = (score > 0)
// For a linear kernel the trained support vectors collapse into one weight
// per feature and a bias, so classification is a dot product. The features
// (unsigned) and the trained weights and bias (signed) are inputs; training
// itself happens elsewhere. One multiply-accumulate per clock keeps the unit
// small: the NF products are summed on consecutive cycles.
//
// What follows the architecture: a linear kernel on the three features with
// trained weights. Own choices: all widths, the serial multiply-accumulate,
// and a zero score counting as non-seizure.
//
// Interface: pulse `start` while `busy` is low; features, weights and bias
// are captured with it. `done` pulses with `score` and `seizure` (held) NF+2
// cycles after the start cycle (5 cycles for three features).
module svm_classifier #(
  parameter int unsigned NF      = 3,
  parameter int unsigned F_W     = 20,
  parameter int unsigned W_W     = 16,
  parameter int unsigned SCORE_W = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [F_W-1:0]            feat   [NF],
  input  logic signed [W_W-1:0]     weight [NF],
  input  logic signed [SCORE_W-1:0] bias,
  output logic                      busy,
  output logic                      done,
  output logic signed [SCORE_W-1:0] score,
  output logic                      seizure
);

  localparam int unsigned IW = $clog2(NF + 1);

  logic [F_W-1:0]            f_q [NF];
  logic signed [W_W-1:0]     w_q [NF];
  logic signed [SCORE_W-1:0] acc_q;
  logic [IW-1:0]             idx_q;
  logic [F_W-1:0]            f_cur;
  logic signed [W_W-1:0]     w_cur;
  logic signed [SCORE_W-1:0] w_ext, f_ext, prod;

  always_comb begin
    f_cur = '0;
    w_cur = '0;
    for (int i = 0; i < int'(NF); i++)
      if (idx_q == IW'(i)) begin
        f_cur = f_q[i];
        w_cur = w_q[i];
      end
    w_ext = SCORE_W'(w_cur);
    f_ext = $signed({{(SCORE_W-F_W){1'b0}}, f_cur});
    prod  = w_ext * f_ext;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NF); i++) begin
        f_q[i] <= '0;
        w_q[i] <= '0;
      end
      acc_q   <= '0;
      idx_q   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      score   <= '0;
      seizure <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          f_q   <= feat;
          w_q   <= weight;
          acc_q <= bias;
          idx_q <= '0;
          busy  <= 1'b1;
        end
      end else if (idx_q != IW'(NF)) begin
        acc_q <= acc_q + prod;
        idx_q <= idx_q + 1'b1;
      end else begin
        busy    <= 1'b0;
        done    <= 1'b1;
        score   <= acc_q;
        seizure <= (acc_q > 0);
      end
    end
  end

endmodule
