// tb_fe_optimized: end-to-end test of the optimized extractor at its default
// window of 1024 samples. Several windows (sine, spiky, random, flat with a
// step, full swing) are streamed, some with input gaps; coastline is checked
// exactly, FD within 2 LSB and H within 1 LSB of real-valued references.
// With continuous input, out_valid must come LAT cycles after the window's
// first sample.
//
// Expected values come from the optimized feature formulas; the latency
// checked is this design's own (2N+75), not the published 3N+60.
module tb_fe_optimized;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  localparam int LAT = 2 * N + 75;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, he_clamped;
  logic signed [7:0] in_data = '0;
  logic [19:0] cl;
  logic [15:0] fd;
  logic [7:0] he;
  int checks = 0, failures = 0, cyc = 0;

  fe_optimized dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input sample_q_t x, input bit gaps);
    int i, t0, lat;
    real efd, ehe;
    i = 0;
    while (i < N) begin
      @(negedge clk);
      in_valid = gaps ? ($urandom_range(3) != 0) : 1'b1;
      in_data  = 8'(x[i]);
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (i == 0) t0 = cyc;
        i++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(posedge clk);
    lat = cyc - t0;
    @(negedge clk);
    efd = fd_opt_ref(x);
    ehe = he_opt_ref(r_ref(x, 255), s_ref(x));
    checks += 3;
    if (longint'(cl) != coastline_ref(x)) begin failures++; $display("FAIL CL %0d expected %0d", cl, coastline_ref(x)); end
    if (real'(fd) > efd + 2.0 || real'(fd) < efd - 2.0) begin failures++; $display("FAIL FD %0d expected %f", fd, efd); end
    if (real'(he) > ehe + 1.0 || real'(he) < ehe - 1.0) begin failures++; $display("FAIL HE %0d expected %f", he, ehe); end
    if (!gaps) begin
      checks++;
      if (lat != LAT) begin failures++; $display("FAIL latency %0d expected %0d", lat, LAT); end
    end
  endtask

  initial begin
    sample_q_t x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(make_window(N, 0, 0), 0);
    run(make_window(N, 1, 0), 1);
    run(make_window(N, 2, 0), 0);
    x = make_window(N, 3, 0);
    x[N/2] = -100;
    run(x, 0);
    run(make_window(N, 4, 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
