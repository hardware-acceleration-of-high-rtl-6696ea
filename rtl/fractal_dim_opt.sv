// fractal_dim_opt: fractal-dimension feature of the optimized extractor,
//   FD = sum_{m=1..k} ln(L_m(k)) / 2.
//
// fd_accum builds the k = 5 Higuchi curve lengths in one pass over the
// window. Their logarithms are then taken one after the other on a single
// hyperbolic CORDIC: each L is split as L = 2^e * f with f in [1, 2)
// (range expansion), and ln(L)/2 = e*ln(2)/2 + atanh((f-1)/(f+1)), where the
// CORDIC is fed x0 = (f+1)/2, y0 = (f-1)/2 so that no divider is needed. The
// division by ln(1/k) and the normalisations of Higuchi's formula are dropped,
// as is the factor 2 of ln(v) = 2 atanh((v-1)/(v+1)): all scale the feature
// by constants. A zero curve length (flat signal) is taken as 1, giving a
// zero term. The result is given with 8 fraction bits in OUT_W = 16 bits.
//
// What follows the architecture: the logarithm of each of the five curve
// lengths taken one after the other with an atanh CORDIC, constant factors
// dropped, the five terms added. Own choices: the range expansion by a
// leading-one split (the architecture only says range expansion is used), the
// value taken for a zero curve length, and the output format.
//
// Interface: s_* load stream of fe_sequencer. `valid` pulses with `fd`
// (held) about k * 28 cycles after the window's last sample.
module fractal_dim_opt
  import fe_pkg::*;
#(
  parameter int unsigned DATA_W = SAMPLE_W,
  parameter int unsigned K      = FD_K,
  parameter int unsigned ACC_W  = 16,
  parameter int unsigned OUT_W  = 16
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

  localparam int unsigned CW    = CORDIC_W;
  localparam int unsigned CF    = CORDIC_FRAC;
  localparam int unsigned SUM_W = CF + 8;
  localparam int unsigned IW    = $clog2(K + 1);
  localparam int unsigned EW    = $clog2(ACC_W);
  localparam logic signed [CW-1:0]    ONE  = CW'(1) <<< CF;
  localparam logic signed [SUM_W-1:0] LN2H = SUM_W'(ln2_half_q(int'(CF)));

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_e;

  state_e                  state_q;
  logic                    acc_vld;
  logic [IW-1:0]           idx_q;
  logic signed [SUM_W-1:0] sum_q;
  logic [ACC_W-1:0]        l_cur;
  logic [EW-1:0]           e;
  logic [ACC_W+CF-1:0]     f_wide;
  logic signed [CW-1:0]    f, x0, y0, z;
  logic signed [CW:0]      fx;
  logic                    cor_start, cor_busy, cor_done;
  logic [EW-1:0]           e_q;

  fd_accum #(.DATA_W(DATA_W), .K(K), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data,
    .valid (acc_vld),
    .lm    (lm_dbg)
  );

  // normalisation of the current curve length: L = 2^e * f, f in [1, 2)
  always_comb begin
    l_cur = '0;
    for (int i = 0; i < int'(K); i++)
      if (idx_q == IW'(i)) l_cur = lm_dbg[i];
    if (l_cur == '0) l_cur = ACC_W'(1);
    e = '0;
    for (int b = 0; b < int'(ACC_W); b++)
      if (l_cur[b]) e = EW'(b);
    f_wide = ((ACC_W+CF)'(l_cur) << CF) >> e;
    f      = CW'(f_wide);
    fx     = (CW+1)'(f) + (CW+1)'(ONE);   // one bit wider: f + 1 reaches 3
    x0     = CW'(fx >>> 1);
    y0     = (f - ONE) >>> 1;
  end

  assign cor_start = (state_q == S_START);

  cordic_atanh #(.W(CW), .FRAC(CF), .ITER(CF)) u_cordic (
    .clk, .rst_n,
    .start (cor_start),
    .x0    (x0),
    .y0    (y0),
    .busy  (cor_busy),
    .done  (cor_done),
    .z     (z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      sum_q   <= '0;
      e_q     <= '0;
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
        S_START: begin
          e_q     <= e;
          state_q <= S_WAIT;
        end
        S_WAIT: if (cor_done) begin
          logic signed [SUM_W-1:0] s;
          s = sum_q + SUM_W'(z) + SUM_W'(e_q) * LN2H;
          sum_q <= s;
          if (idx_q == IW'(K - 1)) begin
            valid   <= 1'b1;
            fd      <= OUT_W'(s >>> (CF - 8));
            state_q <= S_IDLE;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_START;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (ACC_W < CW - 1) else $error("fractal_dim_opt: ACC_W too wide for the CORDIC word");
  end

endmodule
