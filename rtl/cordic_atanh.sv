// cordic_atanh: hyperbolic CORDIC in vectoring mode, z = atanh(y0 / x0).
//
// Each iteration i applies, with d = -sign(y):
//   x <- x - d*y*2^-i,   y <- y - d*x*2^-i,   z <- z + d*atanh(2^-i)
// so y is driven to zero and z accumulates atanh(y0/x0). Iterations 4 and 13
// are executed twice, as hyperbolic CORDIC needs for convergence. The
// angle constants atanh(2^-i) come from a table computed at elaboration.
// The unit is iterative: one adder/shifter set, one iteration per clock.
// Both extractors' optimized variant use it: the Hurst path feeds x0 = 1.0,
// y0 = R/S; the fractal-dimension path feeds x0 = (m+1)/2, y0 = (m-1)/2 so
// that z = ln(m)/2. Convergence needs |y0/x0| below about 0.8; the caller
// keeps its inputs in that range.
//
// What follows the architecture: vectoring-mode hyperbolic CORDIC with shift,
// add/subtract and an angle table, iterations 4 and 13 repeated, 24-bit words.
// Own choices: 22 fraction bits and 22 iterations, and the iterative form,
// which takes 26 cycles where the reference implementation reports 30.
//
// Interface: x0 > 0 and y0 are signed W-bit values with FRAC fraction bits.
// Pulse `start` while `busy` is low; `done` pulses for one cycle with `z`
// valid (same format), held until the next start.
// Timing: ITER + (number of repeated steps) iterations; `done` is high
// ITER+REPEATS+2 cycles after the start cycle (26 cycles at the defaults).
module cordic_atanh #(
  parameter int unsigned W    = fe_pkg::CORDIC_W,
  parameter int unsigned FRAC = fe_pkg::CORDIC_FRAC,
  parameter int unsigned ITER = fe_pkg::CORDIC_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] y0,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] z
);

  localparam int unsigned SH_W = $clog2(ITER + 1);

  typedef logic signed [W-1:0] word_t;

  typedef word_t ang_tab_t [ITER+1];

  // Angle table: entry i = atanh(2^-i) in the same fixed-point format.
  function automatic ang_tab_t make_angles();
    ang_tab_t t;
    t[0] = '0;
    for (int unsigned i = 1; i <= ITER; i++)
      t[i] = word_t'(fe_pkg::atanh_pow2_q(int'(i), int'(FRAC)));
    return t;
  endfunction

  localparam ang_tab_t ANGLE = make_angles();

  word_t x_q, y_q, z_q;
  logic [SH_W-1:0] i_q;     // current shift amount, 1..ITER
  logic            rep_q;   // this shift amount has already been used once

  word_t x_sh, y_sh, ang;
  logic  last_step, repeat_step;

  always_comb begin
    x_sh = x_q >>> i_q;
    y_sh = y_q >>> i_q;
    ang  = (int'(i_q) <= int'(ITER)) ? ANGLE[i_q] : '0;
    repeat_step = ((i_q == SH_W'(4)) || (i_q == SH_W'(13))) && !rep_q;
    last_step   = (i_q == SH_W'(ITER)) && !repeat_step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      z_q   <= '0;
      i_q   <= '0;
      rep_q <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      z     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x_q   <= x0;
          y_q   <= y0;
          z_q   <= '0;
          i_q   <= SH_W'(1);
          rep_q <= 1'b0;
          busy  <= 1'b1;
        end
      end else if (i_q != '0) begin
        if (y_q >= 0) begin   // d = -1
          x_q <= x_q - y_sh;
          y_q <= y_q - x_sh;
          z_q <= z_q + ang;
        end else begin        // d = +1
          x_q <= x_q + y_sh;
          y_q <= y_q + x_sh;
          z_q <= z_q - ang;
        end
        if (repeat_step) begin
          rep_q <= 1'b1;
        end else begin
          rep_q <= 1'b0;
          i_q   <= last_step ? '0 : i_q + 1'b1;
        end
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        z    <= z_q;
      end
    end
  end

  initial begin
    assert (ITER < W) else $error("cordic_atanh: ITER must be below W");
  end

endmodule
