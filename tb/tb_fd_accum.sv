// tb_fd_accum: streams windows of several signal kinds and checks the five
// Higuchi curve lengths L_m(5) against the reference, once with 16-bit
// accumulators and once with 8-bit (wrapping) ones.
//
// Expected values come from Higuchi's curve-length sums with k = 5; stimuli
// are this testbench's own.
module tb_fd_accum;
  import fe_ref_pkg::*;
  localparam int N = 1024, K = 5;
  logic clk = 0, rst_n = 0, s_valid = 0, s_first = 0, s_last = 0, valid, valid8;
  logic signed [7:0] s_data = '0;
  logic [15:0] lm [K];
  logic [7:0]  lm8 [K];
  int checks = 0, failures = 0;

  fd_accum #(.DATA_W(8), .K(K), .ACC_W(16)) dut (.*);
  fd_accum #(.DATA_W(8), .K(K), .ACC_W(8)) dut8 (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data, .valid (valid8), .lm (lm8));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(input int kind);
    sample_q_t x;
    x = make_window(N, kind, 0);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if ($urandom_range(4) == 0) begin s_valid = 0; @(negedge clk); end
      s_valid = 1; s_first = (i == 0); s_last = (i == N - 1); s_data = 8'(x[i]);
    end
    @(negedge clk);
    s_valid = 0; s_first = 0; s_last = 0;
    checks++;
    if (!valid || !valid8) begin failures++; $display("FAIL valid missing"); end
    for (int m = 1; m <= K; m++) begin
      checks += 2;
      if (lm[m-1] != 16'(lm_ref(x, K, m))) begin
        failures++;
        $display("FAIL kind %0d m %0d: %0d expected %0d", kind, m, lm[m-1], lm_ref(x, K, m));
      end
      if (lm8[m-1] != 8'(lm_ref(x, K, m))) begin
        failures++;
        $display("FAIL 8-bit kind %0d m %0d", kind, m);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 4; k++) window(k);
    window(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
