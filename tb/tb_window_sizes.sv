// tb_window_sizes: runs both feature extractors at the three window lengths
// the architecture is evaluated with: 256, 512 and 1024 samples (1, 2 and 4
// seconds of EEG at 256 samples/s). For each length one optimized and one
// approximate extractor are instantiated, each fed by its own driver with
// three windows (sine plus noise, spiky seizure-like wave, random) at one
// sample per clock.
//
// Checks per window: coastline exact; optimized FD within 2 LSB and H within
// 1 LSB of real-valued references; approximate FD and H exact against integer
// references; and the window latency, first accepted sample to out_valid,
// equal to 2N+75 (optimized) or 2N+9 (approximate) cycles. The extra
// cycles after the two passes over the window do not depend on N.
module tb_window_sizes;
  import fe_ref_pkg::*;

  localparam int NSIZES = 3;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;
  bit [2*NSIZES-1:0] finished = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int NS = 256 << g;

    // ---------------- optimized extractor ----------------
    logic o_valid = 0, o_ready, o_out_valid, o_clamped;
    logic signed [7:0] o_data = '0;
    logic [19:0] o_cl;
    logic [15:0] o_fd;
    logic [7:0]  o_he;

    fe_optimized #(.N(NS)) u_opt (
      .clk(clk), .rst_n(rst_n), .in_valid(o_valid), .in_ready(o_ready),
      .in_data(o_data), .out_valid(o_out_valid), .cl(o_cl), .fd(o_fd),
      .he(o_he), .he_clamped(o_clamped)
    );

    initial begin
      sample_q_t x;
      int i, t0, lat;
      real efd, ehe;
      wait (rst_n);
      for (int w = 0; w < 3; w++) begin
        x = make_window(NS, w, 0);
        i = 0;
        while (i < NS) begin
          @(negedge clk);
          o_valid = 1'b1;
          o_data  = 8'(x[i]);
          @(posedge clk);
          if (o_ready) begin
            if (i == 0) t0 = cyc;
            i++;
          end
        end
        @(negedge clk);
        o_valid = 1'b0;
        while (!o_out_valid) @(posedge clk);
        lat = cyc - t0;
        @(negedge clk);
        efd = fd_opt_ref(x);
        ehe = he_opt_ref(r_ref(x, 255), s_ref(x));
        checks += 4;
        if (longint'(o_cl) != coastline_ref(x)) begin
          failures++; $display("FAIL N=%0d opt CL %0d expected %0d", NS, o_cl, coastline_ref(x));
        end
        if (real'(o_fd) > efd + 2.0 || real'(o_fd) < efd - 2.0) begin
          failures++; $display("FAIL N=%0d opt FD %0d expected %f", NS, o_fd, efd);
        end
        if (real'(o_he) > ehe + 1.0 || real'(o_he) < ehe - 1.0) begin
          failures++; $display("FAIL N=%0d opt HE %0d expected %f", NS, o_he, ehe);
        end
        if (lat != 2 * NS + 75) begin
          failures++; $display("FAIL N=%0d opt latency %0d expected %0d", NS, lat, 2 * NS + 75);
        end
      end
      finished[2*g] = 1'b1;
    end

    // ---------------- approximate extractor ----------------
    logic a_valid = 0, a_ready, a_out_valid;
    logic signed [7:0] a_data = '0;
    logic [19:0] a_cl;
    logic [6:0]  a_fd;
    logic [4:0]  a_he;

    fe_approximate #(.N(NS)) u_apx (
      .clk(clk), .rst_n(rst_n), .in_valid(a_valid), .in_ready(a_ready),
      .in_data(a_data), .out_valid(a_out_valid), .cl(a_cl), .fd(a_fd),
      .he(a_he)
    );

    initial begin
      sample_q_t x;
      int i, t0, lat;
      wait (rst_n);
      for (int w = 0; w < 3; w++) begin
        x = make_window(NS, w, 0);
        i = 0;
        while (i < NS) begin
          @(negedge clk);
          a_valid = 1'b1;
          a_data  = 8'(x[i]);
          @(posedge clk);
          if (a_ready) begin
            if (i == 0) t0 = cyc;
            i++;
          end
        end
        @(negedge clk);
        a_valid = 1'b0;
        while (!a_out_valid) @(posedge clk);
        lat = cyc - t0;
        @(negedge clk);
        checks += 4;
        if (longint'(a_cl) != coastline_ref(x)) begin
          failures++; $display("FAIL N=%0d apx CL %0d expected %0d", NS, a_cl, coastline_ref(x));
        end
        if (int'(a_fd) != fd_apx_ref(x)) begin
          failures++; $display("FAIL N=%0d apx FD %0d expected %0d", NS, a_fd, fd_apx_ref(x));
        end
        if (int'(a_he) != he_apx_ref(x)) begin
          failures++; $display("FAIL N=%0d apx HE %0d expected %0d", NS, a_he, he_apx_ref(x));
        end
        if (lat != 2 * NS + 9) begin
          failures++; $display("FAIL N=%0d apx latency %0d expected %0d", NS, lat, 2 * NS + 9);
        end
      end
      finished[2*g+1] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
