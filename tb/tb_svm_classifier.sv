// tb_svm_classifier: random features, weights and biases; checks the score
// against an integer dot product, the decision (score > 0), both decision
// outcomes, and the NF+2 = 5 cycle latency.
//
// Expected values come from the linear decision function; widths and the
// tie rule are this design's own.
module tb_svm_classifier;
  localparam int NF = 3, F_W = 20, W_W = 16, SCORE_W = 40;
  logic clk = 0, rst_n = 0, start = 0, busy, done, seizure;
  logic [F_W-1:0] feat [NF];
  logic signed [W_W-1:0] weight [NF];
  logic signed [SCORE_W-1:0] bias, score;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  svm_classifier #(.NF(NF), .F_W(F_W), .W_W(W_W), .SCORE_W(SCORE_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NF; i++) begin feat[i] = '0; weight[i] = '0; end
    bias = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      longint e;
      int cyc;
      @(negedge clk);
      e = 0;
      for (int i = 0; i < NF; i++) begin
        feat[i]   = (t % 3 == 0) ? F_W'($urandom_range(300)) : F_W'($urandom);
        weight[i] = W_W'($urandom);
        e += longint'(weight[i]) * longint'(feat[i]);
      end
      bias = SCORE_W'(longint'($urandom) - 64'sd2147483648);
      e += longint'(bias);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < NF; i++) begin feat[i] = '0; weight[i] = '0; end
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (score != SCORE_W'(e) || seizure != (e > 0)) begin
        failures++;
        $display("FAIL score %0d expected %0d", score, e);
      end
      if (e > 0) n_pos++; else n_neg++;
      checks++;
      if (cyc != NF + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
