// tb_hurst_opt: drives windows on the load and read-back streams and checks
// the range R (exact, saturated at 255), the standard-deviation term S
// (exact) and H = atanh(R*2^16/S) in Q1.7 against a real-valued reference
// (within one LSB), including a window whose R/S is clamped to 0.8.
//
// Expected values come from atanh((R << 16) / S) computed in real arithmetic,
// with this design's clamp at 0.8; the tolerance is this testbench's own.
module tb_hurst_opt;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_first = 0, r_valid = 0, r_first = 0, r_last = 0, valid, clamped;
  logic signed [7:0] s_data = '0, r_data = '0;
  logic [7:0] h, r_dbg;
  logic [14:0] s_dbg;
  int checks = 0, failures = 0, n_clamped = 0;

  hurst_opt #(.DATA_W(8), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input sample_q_t x);
    int er;
    longint es;
    real eh;
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
    while (!valid) @(negedge clk);
    er = r_ref(x, 255);
    es = s_ref(x);
    eh = he_opt_ref(er, es);
    checks += 3;
    if (int'(r_dbg) != er) begin failures++; $display("FAIL R %0d expected %0d", r_dbg, er); end
    if (longint'(s_dbg) != es) begin failures++; $display("FAIL S %0d expected %0d", s_dbg, es); end
    if (real'(h) > eh + 1.0 || real'(h) < eh - 1.0) begin
      failures++; $display("FAIL H %0d expected %f (R %0d S %0d)", h, eh, er, es);
    end
    if (clamped) n_clamped++;
  endtask

  initial begin
    sample_q_t x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 2; k++) run(make_window(N, k, 0));
    // a window that is flat except for one large step: big R, small S
    x = make_window(N, 3, 0);
    x[N-1] = 120;
    run(x);
    run(make_window(N, 4, 0));
    checks++;
    if (n_clamped == 0) begin failures++; $display("FAIL clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
