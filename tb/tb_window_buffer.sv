// tb_window_buffer: fills the 1024 x 16 buffer with random words, reads it
// back in a different order and checks every word and the one-cycle read
// latency (rdata must not change when re is low).
//
// The synchronous read timing checked is this design's own choice.
module tb_window_buffer;
  localparam int DEPTH = 1024, WIDTH = 16;
  logic clk = 0, we = 0, re = 0;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata, held;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  window_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = i[9:0]; wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 37 + 11) % DEPTH;
      re = 1; addr = a[9:0];
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rdata, model[a]);
      end
    end
    re = 0; held = rdata; addr = 0;
    @(negedge clk);
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL rdata changed without re"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
