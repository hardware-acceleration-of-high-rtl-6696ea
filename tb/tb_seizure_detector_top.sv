// tb_seizure_detector_top: end-to-end test of the detector at its default
// parameters (1024-sample windows). Normal (sine plus noise) and
// seizure-like (large spiky) windows are streamed through both extractors.
// For every window it checks the features against the reference model, the
// extractor that made them, the classifier score against a dot product
// computed here from the reported features and the mode's weights, the
// decision, and the 5-cycle classifier latency. It also counts the design's
// mechanisms and fails if one never happened: windows in each mode, a mode
// request during a window that must wait for the window's end, input
// back-pressure (in_ready low while in_valid is high), both decisions, and a
// clamped R/S in the optimized Hurst path.
//
// Expected features and decisions come from the reference formulas; the
// mode timing checked is this design's own choice.
module tb_seizure_detector_top;
  import fe_ref_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, mode_approx = 0;
  logic signed [7:0] in_data = '0;
  logic signed [15:0] w_opt [3], w_apx [3];
  logic signed [39:0] b_opt, b_apx, score;
  logic feat_valid, feat_mode, he_clamped, result_valid, result_mode, seizure;
  logic [19:0] feat_cl;
  logic [15:0] feat_fd;
  logic [7:0] feat_he;
  int checks = 0, failures = 0, cyc = 0;
  int n_opt = 0, n_apx = 0, n_deferred = 0, n_stall = 0, n_pos = 0, n_neg = 0, n_clamp = 0;

  seizure_detector_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && !in_ready) n_stall++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream one window; optionally flip the mode request half way through
  task automatic run(input sample_q_t x, input bit want_apx, input bit flip_mid);
    int i, tf;
    longint e;
    bit mode_used;
    @(negedge clk);
    mode_approx = want_apx;       // the mode is taken between windows
    @(negedge clk);
    i = 0;
    while (i < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(7) != 0);
      in_data  = 8'(x[i]);
      if (flip_mid && i == N / 2) mode_approx = !want_apx;
      @(posedge clk);
      if (in_valid && in_ready) i++;
    end
    @(negedge clk);
    in_valid = 1;                 // offer more samples: they must be held off
    in_data  = 8'($urandom);
    repeat (100) @(negedge clk);
    in_valid = 0;
    while (!feat_valid) @(posedge clk);
    tf = cyc;
    mode_used = feat_mode;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (mode_used != want_apx) begin failures++; $display("FAIL window ran in mode %0d", mode_used); end
    if (flip_mid) n_deferred++;
    if (!mode_used) begin
      real efd, ehe;
      n_opt++;
      efd = fd_opt_ref(x);
      ehe = he_opt_ref(r_ref(x, 255), s_ref(x));
      checks += 2;
      if (real'(feat_fd) > efd + 2.0 || real'(feat_fd) < efd - 2.0) begin failures++; $display("FAIL FD %0d exp %f", feat_fd, efd); end
      if (real'(feat_he) > ehe + 1.0 || real'(feat_he) < ehe - 1.0) begin failures++; $display("FAIL HE %0d exp %f", feat_he, ehe); end
      if (he_clamped) n_clamp++;
      e = longint'(b_opt) + longint'(w_opt[0]) * feat_cl + longint'(w_opt[1]) * feat_fd + longint'(w_opt[2]) * feat_he;
    end else begin
      n_apx++;
      checks += 2;
      if (int'(feat_fd) != fd_apx_ref(x)) begin failures++; $display("FAIL FD %0d exp %0d", feat_fd, fd_apx_ref(x)); end
      if (int'(feat_he) != he_apx_ref(x)) begin failures++; $display("FAIL HE %0d exp %0d", feat_he, he_apx_ref(x)); end
      e = longint'(b_apx) + longint'(w_apx[0]) * feat_cl + longint'(w_apx[1]) * feat_fd + longint'(w_apx[2]) * feat_he;
    end
    checks++;
    if (longint'(feat_cl) != coastline_ref(x)) begin failures++; $display("FAIL CL %0d exp %0d", feat_cl, coastline_ref(x)); end
    while (!result_valid) @(posedge clk);
    checks += 3;
    if (cyc - tf != 5) begin failures++; $display("FAIL classifier latency %0d", cyc - tf); end
    if (score != 40'(e) || seizure != (e > 0)) begin failures++; $display("FAIL score %0d exp %0d", score, e); end
    if (result_mode != mode_used) begin failures++; $display("FAIL result_mode"); end
    if (seizure) n_pos++; else n_neg++;
    @(negedge clk);
  endtask

  initial begin
    sample_q_t x;
    // coastline dominates: seizure-like windows have a much longer line
    w_opt[0] = 16'sd4;  w_opt[1] = 16'sd1; w_opt[2] = -16'sd8;  b_opt = -40'sd80000;
    w_apx[0] = 16'sd4;  w_apx[1] = 16'sd2; w_apx[2] = -16'sd1;  b_apx = -40'sd80000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(make_window(N, 0, 0), 0, 0);   // normal, optimized
    run(make_window(N, 1, 0), 0, 1);   // seizure, optimized; approx requested mid-window
    run(make_window(N, 1, 0), 1, 0);   // seizure, approximate
    run(make_window(N, 0, 0), 1, 1);   // normal, approximate; optimized requested mid-window
    x = make_window(N, 3, 0);
    x[N-1] = 120;                      // large range, tiny deviation: R/S clamps
    run(x, 0, 0);
    run(make_window(N, 2, 0), 1, 0);
    checks += 7;
    if (n_opt == 0)      begin failures++; $display("FAIL no optimized window"); end
    if (n_apx == 0)      begin failures++; $display("FAIL no approximate window"); end
    if (n_deferred == 0) begin failures++; $display("FAIL no deferred mode switch"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no back-pressure"); end
    if (n_pos == 0)      begin failures++; $display("FAIL no seizure decision"); end
    if (n_neg == 0)      begin failures++; $display("FAIL no normal decision"); end
    if (n_clamp == 0)    begin failures++; $display("FAIL no clamped R/S"); end
    $display("windows opt=%0d apx=%0d deferred=%0d stall=%0d seizure=%0d normal=%0d clamp=%0d",
             n_opt, n_apx, n_deferred, n_stall, n_pos, n_neg, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
