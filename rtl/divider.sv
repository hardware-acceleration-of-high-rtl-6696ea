// divider: unsigned sequential divider, quotient = floor(dividend / divisor).
//
// Restoring division, one quotient bit per clock, most significant first.
// The Hurst-exponent path of the optimized extractor uses it to form R/S,
// with R pre-scaled by 2^16 so that the quotient is a 16-bit binary fraction.
// A zero divisor gives an all-ones quotient (saturation); this is the
// design's own convention.
//
// Interface: pulse `start` with operands while `busy` is low; `done` pulses
// for one cycle with `quotient` and `remainder` valid; they hold until the
// next start. Timing: `done` is high N_W+2 cycles after the start cycle.
module divider #(
  parameter int unsigned N_W = 24,  // dividend and quotient width
  parameter int unsigned D_W = 15   // divisor and remainder width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] dividend,
  input  logic [D_W-1:0] divisor,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quotient,
  output logic [D_W-1:0] remainder
);

  localparam int unsigned CNT_W = $clog2(N_W + 1);

  logic [N_W-1:0] num_q;   // dividend bits still to shift in, then quotient
  logic [D_W:0]   rem_q;
  logic [D_W-1:0] den_q;
  logic [CNT_W-1:0] cnt_q;

  logic [D_W:0] rem_shift, rem_sub;
  logic         fits;

  always_comb begin
    rem_shift = {rem_q[D_W-1:0], num_q[N_W-1]};
    rem_sub   = rem_shift - {1'b0, den_q};
    fits      = rem_shift >= {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q     <= '0;
      rem_q     <= '0;
      den_q     <= '0;
      cnt_q     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          num_q <= dividend;
          den_q <= divisor;
          rem_q <= '0;
          cnt_q <= CNT_W'(N_W);
          busy  <= 1'b1;
        end
      end else if (cnt_q != '0) begin
        rem_q <= fits ? rem_sub : rem_shift;
        num_q <= {num_q[N_W-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
      end else begin
        busy      <= 1'b0;
        done      <= 1'b1;
        quotient  <= (den_q == '0) ? '1 : num_q;
        remainder <= (den_q == '0) ? '0 : rem_q[D_W-1:0];
      end
    end
  end

endmodule
