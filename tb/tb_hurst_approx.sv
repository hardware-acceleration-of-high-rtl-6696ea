// tb_hurst_approx: drives windows on both streams and checks R (10 bits)
// and H = floor(sqrt(R)) exactly, and the 8-cycle latency after r_last.
//
// Expected values come from sqrt(R) with a 10-bit R.
module tb_hurst_approx;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_first = 0, r_valid = 0, r_first = 0, r_last = 0, valid;
  logic signed [7:0] s_data = '0, r_data = '0;
  logic [4:0] h;
  logic [9:0] r_dbg;
  int checks = 0, failures = 0;

  hurst_approx #(.DATA_W(8), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input sample_q_t x);
    int cyc;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      s_valid = 1; s_first = (i == 0); s_data = 8'(x[i]);
    end
    @(negedge clk);
    s_valid = 0; s_first = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      r_valid = 1; r_first = (i == 0); r_last = (i == N - 1); r_data = 8'(x[i]);
    end
    @(negedge clk);
    r_valid = 0; r_first = 0; r_last = 0;
    cyc = 1;
    while (!valid && cyc < 100) begin @(negedge clk); cyc++; end
    checks += 3;
    if (int'(r_dbg) != r_ref(x, 1023)) begin failures++; $display("FAIL R %0d expected %0d", r_dbg, r_ref(x, 1023)); end
    if (int'(h) != he_apx_ref(x)) begin failures++; $display("FAIL H %0d expected %0d", h, he_apx_ref(x)); end
    if (cyc != 8) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    sample_q_t x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 4; k++) run(make_window(N, k, 0));
    x = make_window(N, 3, 0);
    x[5] = -128;
    run(x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
