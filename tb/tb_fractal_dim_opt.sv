// tb_fractal_dim_opt: streams windows and checks the five curve lengths
// exactly and FD = sum ln(L_m)/2 in Q8.8 against the real-valued logarithm
// (within 2 LSB), including a flat window (all L_m = 0, taken as 1).
//
// Expected values come from the real-valued sum of ln(L)/2; the tolerance is
// this testbench's own.
module tb_fractal_dim_opt;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0, s_valid = 0, s_first = 0, s_last = 0, valid;
  logic signed [7:0] s_data = '0;
  logic [15:0] fd;
  logic [15:0] lm_dbg [5];
  int checks = 0, failures = 0;

  fractal_dim_opt #(.DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int kind);
    sample_q_t x;
    real e;
    x = make_window(N, kind, 0);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      s_valid = 1; s_first = (i == 0); s_last = (i == N - 1); s_data = 8'(x[i]);
    end
    @(negedge clk);
    s_valid = 0; s_first = 0; s_last = 0;
    while (!valid) @(negedge clk);
    for (int m = 1; m <= 5; m++) begin
      checks++;
      if (lm_dbg[m-1] != 16'(lm_ref(x, 5, m))) begin failures++; $display("FAIL L%0d", m); end
    end
    e = fd_opt_ref(x);
    checks++;
    if (real'(fd) > e + 2.0 || real'(fd) < e - 2.0) begin
      failures++; $display("FAIL kind %0d FD %0d expected %f", kind, fd, e);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 4; k++) run(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
