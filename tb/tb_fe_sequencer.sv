// tb_fe_sequencer: runs the sequencer with a real window buffer. Checks that
// the load stream forwards accepted samples with correct first/last marks,
// that in_ready drops after N samples, that the read-back stream returns the
// same samples in order, that r_last comes 2N cycles after the first sample
// when input is continuous, and that a new window starts only after
// post_done. Windows with and without input gaps are run.
//
// The phase order and timing checked are this design's own choice.
module tb_fe_sequencer;
  import fe_pkg::*;
  import fe_ref_pkg::*;
  localparam int N = 256;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, post_done = 0;
  logic signed [7:0] in_data = '0, s_data, r_data;
  logic s_valid, s_first, s_last, r_valid, r_first, r_last, buf_we, buf_re;
  logic [7:0] buf_addr;
  logic [15:0] buf_wdata, buf_rdata;
  fe_phase_e phase;
  int checks = 0, failures = 0;

  fe_sequencer #(.N(N), .DATA_W(8), .WIDTH(16)) dut (.*);
  window_buffer #(.DEPTH(N), .WIDTH(16)) u_buf (
    .clk, .we (buf_we), .re (buf_re), .addr (buf_addr), .wdata (buf_wdata), .rdata (buf_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_q_t sent, got_s, got_r;
  int first_cyc, cyc, last_r_cyc, n_sfirst, n_slast, n_rfirst, n_rlast;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_valid) begin
      got_s.push_back(int'(s_data));
      if (s_first) n_sfirst++;
      if (s_last)  n_slast++;
    end
    if (r_valid) begin
      got_r.push_back(int'(r_data));
      if (r_first) n_rfirst++;
      if (r_last) begin n_rlast++; last_r_cyc = cyc; end
    end
  end

  task automatic window(input bit gaps);
    sample_q_t x;
    int i;
    x = make_window(N, 2, 0);
    sent = x; got_s = {}; got_r = {};
    n_sfirst = 0; n_slast = 0; n_rfirst = 0; n_rlast = 0;
    i = 0;
    while (i < N) begin
      @(negedge clk);
      in_valid = gaps ? ($urandom_range(2) != 0) : 1'b1;
      in_data  = 8'(x[i]);
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (i == 0) first_cyc = cyc;
        i++;
      end
    end
    @(negedge clk);
    in_valid = 1;              // must be refused until post_done
    repeat (2 * N + 10) begin
      @(negedge clk);
      if (in_ready && phase != PH_LOAD) failures++;
    end
    checks++;
    if (in_ready) begin failures++; $display("FAIL in_ready before post_done"); end
    in_valid = 0;
    checks += 6;
    if (got_s != sent) begin failures++; $display("FAIL load stream"); end
    if (got_r != sent) begin failures++; $display("FAIL read stream"); end
    if (n_sfirst != 1 || n_slast != 1) begin failures++; $display("FAIL s marks"); end
    if (n_rfirst != 1 || n_rlast != 1) begin failures++; $display("FAIL r marks"); end
    if (phase != PH_POST) begin failures++; $display("FAIL phase"); end
    if (!gaps && last_r_cyc - first_cyc != 2 * N) begin
      failures++; $display("FAIL r_last after %0d cycles", last_r_cyc - first_cyc);
    end
    @(negedge clk);
    post_done = 1;
    @(negedge clk);
    post_done = 0;
    checks++;
    if (!in_ready) begin failures++; $display("FAIL not back in LOAD"); end
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    window(0); window(1); window(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
