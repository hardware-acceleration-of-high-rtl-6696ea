// tb_fractal_dim_approx: streams windows and checks the five 8-bit curve
// lengths and FD = sum floor(sqrt(L_m mod 256)) exactly.
//
// Expected values come from the sum of square roots of 8-bit curve lengths.
module tb_fractal_dim_approx;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0, s_valid = 0, s_first = 0, s_last = 0, valid;
  logic signed [7:0] s_data = '0;
  logic [6:0] fd;
  logic [7:0] lm_dbg [5];
  int checks = 0, failures = 0;

  fractal_dim_approx #(.DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int kind);
    sample_q_t x;
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
      if (lm_dbg[m-1] != 8'(lm_ref(x, 5, m))) begin failures++; $display("FAIL L%0d", m); end
    end
    checks++;
    if (int'(fd) != fd_apx_ref(x)) begin
      failures++; $display("FAIL kind %0d FD %0d expected %0d", kind, fd, fd_apx_ref(x));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 4; k++) run(k);
    run(2); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
