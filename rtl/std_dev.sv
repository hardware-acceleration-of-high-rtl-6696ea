// std_dev: standard-deviation term S = sqrt(sum (x - mean)^2) of a window.
//
// Pass 1 (load stream) sums the samples into a SUM_W = 19-bit register; at
// the end of the window the mean is the sum shifted right by log2(N), so N
// must be a power of two. Pass 2 (read-back stream) subtracts the mean from
// each sample, squares the difference (16 bits) and accumulates it in an
// ACC_W = 30-bit register. The final square root gives the 15-bit S. The
// divisions by N-1 inside the square root are left out: they scale every
// window alike and only move the classifier's hyperplane.
//
// What follows the architecture: the 19-bit sum, the division by N as a shift
// by log2(N) = 10 (the figure of the reference design prints a shift of 11;
// the accompanying text's 2^10 is followed), the 16-bit square, the 30-bit
// accumulator and the 15-bit root. Own choices: the 9-bit deviation and the
// dropped division by N-1.
//
// Interface: s_* and r_* are the two sample streams of fe_sequencer. `valid`
// pulses with `s_out` (held) 18 cycles after the cycle with `r_last` at the
// defaults (one accumulate cycle plus the square root).
module std_dev #(
  parameter int unsigned DATA_W = fe_pkg::SAMPLE_W,
  parameter int unsigned N      = fe_pkg::WINDOW_N,
  parameter int unsigned ACC_W  = 30,
  parameter int unsigned OUT_W  = ACC_W / 2
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
  output logic [OUT_W-1:0]         s_out,
  output logic signed [DATA_W-1:0] mean
);

  localparam int unsigned LOG2N = $clog2(N);
  localparam int unsigned SUM_W = DATA_W + LOG2N + 1;
  localparam int unsigned SQ_W  = 2 * DATA_W;

  logic signed [SUM_W-1:0]  sum_q;
  logic signed [SUM_W-1:0]  sum_next;
  logic signed [DATA_W:0]   dev;
  logic [SQ_W-1:0]          sq;
  logic [ACC_W-1:0]         acc_q, acc_next;
  logic                     sqrt_start;
  logic                     sqrt_busy;

  always_comb begin
    sum_next = (s_first ? '0 : sum_q) + SUM_W'(s_data);
    dev      = (DATA_W+1)'(r_data) - (DATA_W+1)'(mean);
    sq       = SQ_W'(dev * dev);
    acc_next = (r_first ? '0 : acc_q) + ACC_W'(sq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q      <= '0;
      acc_q      <= '0;
      sqrt_start <= 1'b0;
    end else begin
      sqrt_start <= 1'b0;
      if (s_valid) sum_q <= sum_next;
      if (r_valid) begin
        acc_q <= acc_next;
        if (r_last) sqrt_start <= 1'b1;
      end
    end
  end

  // The mean follows the running sum; it is final before pass 2 begins.
  assign mean = DATA_W'(sum_q >>> LOG2N);

  isqrt #(.IN_W(ACC_W), .OUT_W(OUT_W)) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (sqrt_start),
    .radicand (acc_q),
    .busy     (sqrt_busy),
    .done     (valid),
    .root     (s_out)
  );

endmodule
