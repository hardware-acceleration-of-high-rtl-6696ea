// tb_cordic_atanh: checks z = atanh(y0/x0) of the hyperbolic CORDIC against
// the real-valued atanh for ratios across the convergence range (|y/x| up to
// 0.8), positive and negative, with x0 = 1.0 and with other x0 values. The
// error limit is 2^-18 (the word has 22 fraction bits). Also checks the
// 26-cycle latency.
//
// Expected values come from the real-valued atanh; the tolerance is this
// testbench's own choice.
module tb_cordic_atanh;
  import fe_ref_pkg::*;
  localparam int W = 24, FRAC = 22;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [W-1:0] x0, y0, z;
  int checks = 0, failures = 0;

  cordic_atanh #(.W(W), .FRAC(FRAC), .ITER(FRAC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real x, input real y);
    int cyc;
    real got, exp_v;
    @(negedge clk);
    x0 = W'(longint'(x * 2.0 ** FRAC));
    y0 = W'(longint'(y * 2.0 ** FRAC));
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    got   = real'(z) / 2.0 ** FRAC;
    exp_v = atanh_r(real'(y0) / real'(x0));
    checks++;
    if ((got - exp_v) > 2.0 ** -16 || (exp_v - got) > 2.0 ** -16) begin
      failures++;
      $display("FAIL atanh(%f/%f) = %f, expected %f", x, y, got, exp_v);
    end
    checks++;
    if (cyc != 26) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    x0 = '0; y0 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1.0, 0.0); run(1.0, 0.5); run(1.0, -0.5); run(1.0, 0.8); run(1.0, 0.1);
    run(1.25, 0.25); run(0.75, 0.0625);
    for (int i = 0; i < 200; i++) begin
      real x, r;
      x = 0.5 + real'($urandom_range(1000)) / 1000.0;      // 0.5 .. 1.5
      r = (real'($urandom_range(1600)) - 800.0) / 1000.0;   // -0.8 .. 0.8
      run(x, x * r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
