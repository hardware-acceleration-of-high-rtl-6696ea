// window_buffer: storage for the samples of one analysis window.
//
// A single-port array of DEPTH words of WIDTH bits: written while a window
// streams in, read back once in order for the passes that need the window's
// mean and mean absolute value first. The default of 1024 words of 16 bits
// matches the window of 1024 samples held in 16-bit registers; the samples
// themselves are 8 bits wide and are stored sign-extended.
//
// What follows the architecture: 1024 words of 16 bits holding the window.
// Own choices: an array with one synchronous read port rather than discrete
// registers, and storing the raw samples.
//
// Interface: `we` writes `wdata` at `addr`. Reads are synchronous: `rdata`
// shows the word at the `addr` given with `re` one cycle later.
module window_buffer #(
  parameter int unsigned DEPTH = fe_pkg::WINDOW_N,
  parameter int unsigned WIDTH = fe_pkg::BUF_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
