// tb_std_dev: drives a window on the load stream, then the same window on
// the read-back stream, and checks the mean (sum >> 10) and
// S = floor(sqrt(sum (x - mean)^2)) against the reference, and that S comes
// 18 cycles after r_last.
//
// Expected values come from the root of the sum of squared deviations about
// the shifted mean; the latency checked is this design's own.
module tb_std_dev;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_first = 0, r_valid = 0, r_first = 0, r_last = 0, valid;
  logic signed [7:0] s_data = '0, r_data = '0, mean;
  logic [14:0] s_out;
  int checks = 0, failures = 0;

  std_dev #(.DATA_W(8), .N(N), .ACC_W(30), .OUT_W(15)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(input int kind);
    sample_q_t x;
    int cyc;
    x = make_window(N, kind, 0);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      s_valid = 1; s_first = (i == 0); s_data = 8'(x[i]);
    end
    @(negedge clk);
    s_valid = 0; s_first = 0;
    checks++;
    if (int'(mean) != mean_ref(x)) begin
      failures++; $display("FAIL kind %0d mean %0d expected %0d", kind, mean, mean_ref(x));
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      r_valid = 1; r_first = (i == 0); r_last = (i == N - 1); r_data = 8'(x[i]);
    end
    @(negedge clk);
    r_valid = 0; r_first = 0; r_last = 0;
    cyc = 1;
    while (!valid && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(s_out) != s_ref(x)) begin
      failures++; $display("FAIL kind %0d S %0d expected %0d", kind, s_out, s_ref(x));
    end
    checks++;
    if (cyc != 18) begin failures++; $display("FAIL S latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 4; k++) window(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
