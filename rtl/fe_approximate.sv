// fe_approximate: approximate feature extractor (coastline, fractal
// dimension, Hurst exponent), the low-power configuration of the detector.
//
// Same window handling and coastline as fe_optimized, with two further
// approximations that cost about 2 % of specificity but save most of the
// area and power:
//   - every logarithm is replaced by an integer square root;
//   - the Hurst exponent no longer divides by the standard deviation, so the
//     standard-deviation datapath and the divider disappear.
// The intermediate words are cut to the shortest lengths that kept the
// detection rate: 8-bit fractal-dimension accumulators, a 10-bit mean
// absolute value and range, a 20-bit coastline.
//   cl  coastline                                  20 bits
//   fd  sum of sqrt of the five 8-bit curve lengths  7 bits
//   he  sqrt(R)                                      5 bits
//
// What follows the architecture: the three features, the square root in place
// of every logarithm, the missing standard deviation, the 8-bit curve lengths,
// 10-bit MAV and range, 20-bit coastline and 5-bit Hurst output. Own choices:
// the two-pass window control, the handshake, and the 7-bit fd output; the
// reference implementation needs about 3N+14 cycles per window, this one 2N+9.
//
// Interface and handshake as fe_optimized. Timing at the defaults with a
// sample every cycle: out_valid comes 2N + 9 cycles after the window's
// first sample (read-back, range, 5-bit square root).
module fe_approximate
  import fe_pkg::*;
#(
  parameter int unsigned N      = WINDOW_N,
  parameter int unsigned DATA_W = SAMPLE_W,
  parameter int unsigned CL_W   = 20,
  parameter int unsigned FD_W   = 7,
  parameter int unsigned HE_W   = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic [CL_W-1:0]          cl,
  output logic [FD_W-1:0]          fd,
  output logic [HE_W-1:0]          he
);

  logic s_valid, s_first, s_last, r_valid, r_first, r_last;
  logic signed [DATA_W-1:0] s_data, r_data;
  logic buf_we, buf_re;
  logic [$clog2(N)-1:0] buf_addr;
  logic [BUF_W-1:0] buf_wdata, buf_rdata;
  fe_phase_e phase;

  logic cl_vld, fd_vld, he_vld;
  logic [CL_W-1:0] cl_val, cl_hold;
  logic [FD_W-1:0] fd_val, fd_hold;
  logic [HE_W-1:0] he_val, he_hold;
  logic [7:0]      lm_unused [FD_K];
  logic [9:0]      r_unused;
  logic have_cl_q, have_fd_q, have_he_q, all_done;

  fe_sequencer #(.N(N), .DATA_W(DATA_W), .WIDTH(BUF_W)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .s_valid, .s_first, .s_last, .s_data,
    .r_valid, .r_first, .r_last, .r_data,
    .buf_we, .buf_re, .buf_addr, .buf_wdata, .buf_rdata,
    .post_done (all_done),
    .phase
  );

  window_buffer #(.DEPTH(N), .WIDTH(BUF_W)) u_buf (
    .clk, .we (buf_we), .re (buf_re), .addr (buf_addr), .wdata (buf_wdata), .rdata (buf_rdata)
  );

  coastline #(.DATA_W(DATA_W), .OUT_W(CL_W)) u_cl (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data,
    .valid (cl_vld), .cl (cl_val)
  );

  fractal_dim_approx #(.DATA_W(DATA_W), .K(FD_K), .ACC_W(8), .OUT_W(FD_W)) u_fd (
    .clk, .rst_n, .s_valid, .s_first, .s_last, .s_data,
    .valid (fd_vld), .fd (fd_val), .lm_dbg (lm_unused)
  );

  hurst_approx #(.DATA_W(DATA_W), .N(N), .R_W(10), .OUT_W(HE_W)) u_he (
    .clk, .rst_n, .s_valid, .s_first, .s_data, .r_valid, .r_first, .r_last, .r_data,
    .valid (he_vld), .h (he_val), .r_dbg (r_unused)
  );

  assign all_done = (have_cl_q || cl_vld) && (have_fd_q || fd_vld) && (have_he_q || he_vld)
                    && (phase == PH_POST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_cl_q <= 1'b0;
      have_fd_q <= 1'b0;
      have_he_q <= 1'b0;
      out_valid <= 1'b0;
      cl        <= '0;
      fd        <= '0;
      he        <= '0;
      cl_hold   <= '0;
      fd_hold   <= '0;
      he_hold   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (cl_vld) begin have_cl_q <= 1'b1; cl_hold <= cl_val; end
      if (fd_vld) begin have_fd_q <= 1'b1; fd_hold <= fd_val; end
      if (he_vld) begin have_he_q <= 1'b1; he_hold <= he_val; end
      if (all_done) begin
        have_cl_q <= 1'b0;
        have_fd_q <= 1'b0;
        have_he_q <= 1'b0;
        out_valid <= 1'b1;
        cl        <= cl_vld ? cl_val : cl_hold;
        fd        <= fd_vld ? fd_val : fd_hold;
        he        <= he_vld ? he_val : he_hold;
      end
    end
  end

endmodule
