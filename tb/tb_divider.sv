// tb_divider: checks quotient and remainder of the sequential divider
// against the simulator's integer division (24-bit by 15-bit operands),
// the all-ones quotient for a zero divisor, and the N_W+2 cycle latency.
//
// Expected values come from integer division; stimuli are this testbench's own.
module tb_divider;
  localparam int N_W = 24, D_W = 15;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [N_W-1:0] dividend, quotient;
  logic [D_W-1:0] divisor, remainder;
  int checks = 0, failures = 0;

  divider #(.N_W(N_W), .D_W(D_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint a, input longint b);
    int cyc;
    longint eq, er;
    @(negedge clk);
    dividend = N_W'(a);
    divisor  = D_W'(b);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    eq = (b == 0) ? (1 << N_W) - 1 : a / b;
    er = (b == 0) ? 0 : a % b;
    checks++;
    if (quotient != N_W'(eq) || remainder != D_W'(er)) begin
      failures++;
      $display("FAIL %0d / %0d = %0d r %0d, expected %0d r %0d", a, b, quotient, remainder, eq, er);
    end
    checks++;
    if (cyc != N_W + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 1); run(100, 7); run(24'hFFFFFF, 1); run(24'hFFFFFF, 15'h7FFF); run(5, 0);
    run(255 << 16, 1000); run(17 << 16, 4095);
    for (int i = 0; i < 300; i++)
      run(longint'($urandom_range(24'hFFFFFF)), longint'($urandom_range(15'h7FFF)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
