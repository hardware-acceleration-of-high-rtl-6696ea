// tb_coastline: streams windows of sine, spiky, random, flat and
// full-swing alternating samples (with idle gaps) and checks the coastline
// sum against the reference, plus the one-cycle latency after s_last.
//
// Expected values come from the coastline formula; the stimuli are this
// testbench's own.
module tb_coastline;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0, s_valid = 0, s_first = 0, s_last = 0, valid;
  logic signed [7:0] s_data = '0;
  logic [19:0] cl;
  int checks = 0, failures = 0;

  coastline #(.DATA_W(8), .OUT_W(20)) dut (.*);
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
      if ($urandom_range(3) == 0) begin
        s_valid = 0; s_data = 8'($urandom);   // idle cycle, data ignored
        @(negedge clk);
      end
      s_valid = 1; s_first = (i == 0); s_last = (i == N - 1); s_data = 8'(x[i]);
    end
    @(negedge clk);
    s_valid = 0; s_first = 0; s_last = 0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid not one cycle after s_last"); end
    checks++;
    if (cl != 20'(coastline_ref(x))) begin
      failures++;
      $display("FAIL kind %0d: cl %0d expected %0d", kind, cl, coastline_ref(x));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 4; k++) window(k);
    window(2); window(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
