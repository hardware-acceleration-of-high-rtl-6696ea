// tb_isqrt: checks the integer square root against a reference loop for
// edge values and random 24-bit radicands, and checks the 14-cycle latency
// from start to done for a 24-bit radicand.
//
// Expected values come from a counting integer root search; the latency
// of 14 cycles for a 24-bit radicand matches the published figure.
module tb_isqrt;
  import fe_ref_pkg::*;
  localparam int IN_W = 24, OUT_W = 12;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [IN_W-1:0] radicand;
  logic [OUT_W-1:0] root;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint v);
    int cyc;
    @(negedge clk);
    radicand = IN_W'(v);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (root != OUT_W'(isqrt_ref(v))) begin
      failures++;
      $display("FAIL sqrt(%0d) = %0d, expected %0d", v, root, isqrt_ref(v));
    end
    checks++;
    if (cyc != OUT_W + 2) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, OUT_W + 2);
    end
  endtask

  initial begin
    radicand = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(15); run(16); run(24'hFFFFFF);
    run(1 << 22); run((1 << 22) - 1);
    for (int i = 0; i < 300; i++) run(longint'($urandom_range(24'hFFFFFF)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
