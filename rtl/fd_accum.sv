// fd_accum: Higuchi curve-length accumulators of the fractal dimension.
//
// For scale k and offset m = 1..k it forms
//   L_m(k) = sum_{i=1}^{floor((N-m)/k)} |x(m+ik) - x(m+(i-1)k)|
// without the constant normalisations of Higuchi's method, which only scale
// the feature. The sample stream passes through a k-deep delay line; sample n
// (1-based, n > k) contributes |x(n) - x(n-k)| to accumulator
// m = ((n-1) mod k) + 1, so all k sums are built in one pass.
// The accumulators are ACC_W bits wide and wrap: the approximate extractor
// keeps only their 8 low bits, as its word-length study did; the optimized
// extractor uses 16 bits, enough for a 1024-sample window.
//
// What follows the architecture: k = 5 accumulators of |x(m+ik) - x(m+(i-1)k)|
// with the normalising constants removed, and (approximate extractor) 8-bit
// accumulators that keep only their low bits. Own choices: the delay line that
// lets all five curve lengths be built in one pass, and the 16-bit width of the
// optimized extractor's accumulators.
//
// Interface: s_* is the window's sample stream. `valid` pulses one cycle
// after `s_last`; lm[m-1] holds L_m(k) until the next window ends.
module fd_accum #(
  parameter int unsigned DATA_W = fe_pkg::SAMPLE_W,
  parameter int unsigned K      = fe_pkg::FD_K,
  parameter int unsigned ACC_W  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  input  logic                     s_first,
  input  logic                     s_last,
  input  logic signed [DATA_W-1:0] s_data,
  output logic                     valid,
  output logic [ACC_W-1:0]         lm [K]
);

  localparam int unsigned PW = $clog2(K + 1);

  logic signed [DATA_W-1:0] dly_q [K];  // dly_q[K-1] is x(n-k)
  logic [ACC_W-1:0]         acc_q [K];
  logic [PW-1:0]            ph_q;       // (n-1) mod k of the incoming sample
  logic                     full_q;     // k samples already seen
  logic [PW-1:0]            ph;
  logic                     full;
  logic signed [DATA_W:0]   diff;
  logic [DATA_W-1:0]        mag;

  always_comb begin
    ph   = s_first ? '0 : ph_q;
    full = s_first ? 1'b0 : full_q;
    diff = (DATA_W+1)'(s_data) - (DATA_W+1)'(dly_q[K-1]);
    mag  = diff[DATA_W] ? DATA_W'(-diff) : DATA_W'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(K); i++) begin
        dly_q[i] <= '0;
        acc_q[i] <= '0;
        lm[i]    <= '0;
      end
      ph_q   <= '0;
      full_q <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (s_valid) begin
        dly_q[0] <= s_data;
        for (int i = 1; i < int'(K); i++) dly_q[i] <= dly_q[i-1];
        ph_q <= (ph == PW'(K - 1)) ? '0 : ph + 1'b1;
        if (ph == PW'(K - 1)) full_q <= 1'b1;
        else                  full_q <= full;
        for (int i = 0; i < int'(K); i++) begin
          logic [ACC_W-1:0] a;
          a = s_first ? '0 : acc_q[i];
          if (full && ph == PW'(i)) a = a + ACC_W'(mag);
          acc_q[i] <= a;
          if (s_last) lm[i] <= a;
        end
        if (s_last) valid <= 1'b1;
      end
    end
  end

endmodule
