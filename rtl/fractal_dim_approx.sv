// fractal_dim_approx: fractal-dimension feature of the approximate extractor,
//   FD = sum_{m=1..k} sqrt(L_m(k)).
//
// Same Higuchi curve lengths as the optimized extractor (fd_accum), but the
// five accumulators keep only ACC_W = 8 low bits, and the logarithm is
// replaced by an integer square root. The five roots are taken one after the
// other on one isqrt unit and summed; with 4-bit roots the sum fits 7 bits.
//
// What follows the architecture: a square root applied to the five curve
// lengths one after the other, and the five roots added. Own choices: floor
// roots (4 bits) and the 7-bit sum.
//
// Interface: s_* load stream of fe_sequencer. `valid` pulses with `fd`
// (held) after five square roots of ACC_W/2 + 2 cycles each, plus one
// start cycle each.
module fractal_dim_approx #(
  parameter int unsigned DATA_W = fe_pkg::SAMPLE_W,
  parameter int unsigned K      = fe_pkg::FD_K,
  parameter int unsigned ACC_W  = 8,
  parameter int unsigned OUT_W  = ACC_W / 2 + $clog2(K)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  input  logic                     s_first,
  input  logic                     s_last,
  input  logic signed [DATA_W-1:0] s_data,
  output logic                     valid,
  output logic [OUT_W-1:0]         fd,
  output logic [ACC_W-1:0]         lm_dbg [K]
);

  localparam int unsigned RW = ACC_W / 2;
  localparam int unsigned IW = $clog2(K + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_e;

  state_e            state_q;
  logic              acc_vld;
  logic [IW-1:0]     idx_q;
  logic [OUT_W-1:0]  sum_q;
  logic [ACC_W-1:0]  l_cur;
  logic              sq_start, sq_busy, sq_done;
  logic [RW-1:0]     root;

  fd_accum #(.DATA_W(DATA_W), .K(K), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data,
    .valid (acc_vld),
    .lm    (lm_dbg)
  );

  always_comb begin
    l_cur = '0;
    for (int i = 0; i < int'(K); i++)
      if (idx_q == IW'(i)) l_cur = lm_dbg[i];
  end

  assign sq_start = (state_q == S_START);

  isqrt #(.IN_W(ACC_W), .OUT_W(RW)) u_sqrt (
    .clk, .rst_n,
    .start    (sq_start),
    .radicand (l_cur),
    .busy     (sq_busy),
    .done     (sq_done),
    .root     (root)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      sum_q   <= '0;
      valid   <= 1'b0;
      fd      <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (acc_vld) begin
          idx_q   <= '0;
          sum_q   <= '0;
          state_q <= S_START;
        end
        S_START: state_q <= S_WAIT;
        S_WAIT: if (sq_done) begin
          if (idx_q == IW'(K - 1)) begin
            valid   <= 1'b1;
            fd      <= sum_q + OUT_W'(root);
            state_q <= S_IDLE;
          end else begin
            sum_q   <= sum_q + OUT_W'(root);
            idx_q   <= idx_q + 1'b1;
            state_q <= S_START;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
