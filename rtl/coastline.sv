// coastline: coastline (line-length) feature, CL = sum |x(n+1) - x(n)|.
//
// Works on the load stream: the previous sample is kept in a register, the
// magnitude of the difference to the new sample (at most 255 for 8-bit
// samples, so 8 bits unsigned) is added to an accumulator. A window of N
// samples gives N-1 differences. The accumulator is OUT_W = 20 bits wide,
// enough for 1023 * 255.
//
// What follows the architecture: the subtract / absolute value / accumulate
// chain and the 20-bit accumulator. Own choices: the 9-bit difference before
// the absolute value, the clear at the window's first sample, and summing the
// N-1 differences that exist inside a window.
//
// Interface: s_valid/s_first/s_last/s_data is the window's sample stream.
// `valid` pulses one cycle after the cycle with `s_last`, with `cl` holding
// the sum for that window until the next window ends.
module coastline #(
  parameter int unsigned DATA_W = fe_pkg::SAMPLE_W,
  parameter int unsigned OUT_W  = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  input  logic                     s_first,
  input  logic                     s_last,
  input  logic signed [DATA_W-1:0] s_data,
  output logic                     valid,
  output logic [OUT_W-1:0]         cl
);

  logic signed [DATA_W-1:0] prev_q;
  logic [OUT_W-1:0]         acc_q;
  logic signed [DATA_W:0]   diff;
  logic [DATA_W-1:0]        mag;
  logic [OUT_W-1:0]         acc_next;

  always_comb begin
    diff     = (DATA_W+1)'(s_data) - (DATA_W+1)'(prev_q);
    mag      = diff[DATA_W] ? DATA_W'(-diff) : DATA_W'(diff);
    acc_next = s_first ? '0 : acc_q + OUT_W'(mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q <= '0;
      acc_q  <= '0;
      valid  <= 1'b0;
      cl     <= '0;
    end else begin
      valid <= 1'b0;
      if (s_valid) begin
        prev_q <= s_data;
        acc_q  <= acc_next;
        if (s_last) begin
          valid <= 1'b1;
          cl    <= acc_next;
        end
      end
    end
  end

endmodule
