// isqrt: integer square root, root = floor(sqrt(radicand)).
//
// Restoring digit recurrence, one root bit per clock: the radicand is fed two
// bits at a time into a partial remainder, the trial value {root, 01} is
// subtracted, and the sign of the result selects the next root digit. This is
// the classic shift/subtract square-root datapath; the design uses it for the
// standard deviation and, in the approximate extractor, in place of the
// logarithm.
//
// What follows the architecture: a digit-by-digit square root built from trial
// subtractions of the partial remainder, 14 cycles for a 24-bit radicand.
// Own choice: radix 2 and the restoring form.
//
// Interface: pulse `start` with `radicand` while `busy` is low. `done` pulses
// for one cycle with `root` valid; `root` holds until the next start.
// Timing: `done` is high OUT_W+2 cycles after the cycle in which `start` was
// high (14 cycles for a 24-bit radicand). A start while busy is ignored.
module isqrt #(
  parameter int unsigned IN_W  = 24,
  parameter int unsigned OUT_W = IN_W / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IN_W-1:0]  radicand,
  output logic             busy,
  output logic             done,
  output logic [OUT_W-1:0] root
);

  localparam int unsigned RAD_W = 2 * OUT_W;
  localparam int unsigned REM_W = OUT_W + 2;
  localparam int unsigned CNT_W = $clog2(OUT_W + 1);

  logic [RAD_W-1:0] rad_q;
  logic [REM_W-1:0] rem_q;
  logic [OUT_W-1:0] root_q;
  logic [CNT_W-1:0] cnt_q;

  logic [REM_W-1:0] rem_shift, trial, rem_sub;
  logic             fits;

  always_comb begin
    rem_shift = {rem_q[REM_W-3:0], rad_q[RAD_W-1 -: 2]};
    trial     = {root_q, 2'b01};
    rem_sub   = rem_shift - trial;
    fits      = rem_shift >= trial;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q  <= '0;
      rem_q  <= '0;
      root_q <= '0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      root   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rad_q  <= RAD_W'(radicand);
          rem_q  <= '0;
          root_q <= '0;
          cnt_q  <= CNT_W'(OUT_W);
          busy   <= 1'b1;
        end
      end else if (cnt_q != '0) begin
        rad_q  <= rad_q << 2;
        rem_q  <= fits ? rem_sub : rem_shift;
        root_q <= {root_q[OUT_W-2:0], fits};
        cnt_q  <= cnt_q - 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        root <= root_q;
      end
    end
  end

  initial begin
    assert (IN_W <= 2 * OUT_W) else $error("isqrt: OUT_W too small for IN_W");
    assert (OUT_W >= 2) else $error("isqrt: OUT_W must be at least 2");
  end

endmodule
