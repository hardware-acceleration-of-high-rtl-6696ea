// fe_pkg: constants and types shared by the seizure-detection feature
// extractors, the window sequencer and the classifier.
//
// The defaults follow the design's headline configuration: 8-bit integer EEG
// samples (the fractional part is dropped because it did not change the
// detection metrics), 4-second windows of 1024 samples at 256 samples/s, and
// Higuchi's fractal dimension with k = 5. The CORDIC fixed-point format (24-bit
// words, 22 fraction bits) is this design's own choice.
package fe_pkg;

  // EEG sample width (integer part only).
  localparam int unsigned SAMPLE_W = 8;
  // Samples per window (4 s at 256 samples/s). Must be a power of two so the
  // divisions by N of the mean and the mean absolute value are shifts.
  localparam int unsigned WINDOW_N = 1024;
  // Width of one word of the window buffer.
  localparam int unsigned BUF_W = 16;
  // Higuchi fractal dimension scale.
  localparam int unsigned FD_K = 5;

  // Hyperbolic CORDIC word format: signed, CORDIC_W bits, CORDIC_FRAC
  // fraction bits.
  localparam int unsigned CORDIC_W    = 24;
  localparam int unsigned CORDIC_FRAC = 22;

  // Phases of one window in a feature extractor.
  typedef enum logic [1:0] {
    PH_LOAD = 2'd0,  // samples stream in and are written to the buffer
    PH_READ = 2'd1,  // the buffer is read back once, in order
    PH_POST = 2'd2   // iterative units (sqrt, divider, CORDIC) finish
  } fe_phase_e;

  // atanh(2^-i), i >= 1, scaled by 2^frac (frac <= 40), rounded: the power
  // series sum_n t^(2n+1)/(2n+1) evaluated in 60-bit integer arithmetic.
  function automatic longint atanh_pow2_q(input int i, input int frac);
    longint sum;
    sum = 0;
    for (int n = 0; n < 30; n++) begin
      int sh;
      sh = 60 - i * (2 * n + 1);
      if (sh >= 0) sum += (longint'(1) <<< sh) / longint'(2 * n + 1);
    end
    return (sum + (longint'(1) <<< (59 - frac))) >>> (60 - frac);
  endfunction

  // ln(2)/2 = atanh(1/3), scaled by 2^frac (frac <= 40), rounded.
  function automatic longint ln2_half_q(input int frac);
    longint sum, pw;
    sum = 0;
    pw  = 3;                                   // 3^(2n+1)
    for (int n = 0; n < 17; n++) begin
      sum += ((longint'(1) <<< 60) / pw) / longint'(2 * n + 1);
      pw  = pw * 9;
    end
    return (sum + (longint'(1) <<< (59 - frac))) >>> (60 - frac);
  endfunction

endpackage
