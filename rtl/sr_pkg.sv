// sr_pkg: shared types and constants of the signal reconstruction core.
//
// Fixed-point formats, all two's complement, written Qi.f (i integer bits
// including the sign, f fraction bits):
//   neuron input  x : 16 bits, Q6.10   (normalised sample, tanh output)
//   weight        w : 14 bits, Q6.8
//   bias          b : 30 bits, Q12.18
//   neuron output y : 31 bits, Q13.18
// These widths follow the document. The product x*w is 30 bits Q12.18, the
// same format as the bias, so products and bias add without alignment.
//
// The trained weights of the network are not published with the design, so
// the DEFAULT_* constants below are this design's own example network: a
// centre-weighted filter that maps a clean pulse to roughly its amplitude
// with the default normalisation (ADC range 0..4095). Replace them through
// the W1/B1/W2/B2 parameters of sr_mlp, sr_core or sr_pl_top.
package sr_pkg;

  localparam int X_W = 16, X_FRAC = 10;
  localparam int W_W = 14, W_FRAC = 8;
  localparam int B_W = 30, B_FRAC = 18;
  localparam int Y_W = 31, Y_FRAC = 18;
  localparam int P_W = X_W + W_W;          // product width, Q12.18

  localparam int N_TAPS    = 9;            // BCs in the reconstruction window
  localparam int CENTER    = 4;            // window position reconstructed
  localparam int AXIS_W    = 32;           // AXI-Stream data width

  typedef logic signed [X_W-1:0]    x_t;
  typedef logic signed [W_W-1:0]    w_t;
  typedef logic signed [B_W-1:0]    b_t;
  typedef logic signed [Y_W-1:0]    y_t;
  typedef logic signed [AXIS_W-1:0] sample_t;

  // One BC slot travelling through the BC-clock pipeline.
  typedef struct packed {
    logic    valid;   // slot carries a sample of the stream (not a bubble)
    logic    last;    // tlast of that sample
    sample_t data;
  } beat_t;

  typedef struct packed {
    logic valid;
    logic last;
    x_t   x;
  } norm_slot_t;

  typedef struct packed {
    logic valid;
    logic last;
    y_t   y;
  } amp_slot_t;

  // Clock ratio and processing-clock pipeline depths (cycles of clk_proc).
  // Each stage between two BC registers must finish within CLK_RATIO.
  localparam int CLK_RATIO = 10;           // 400 MHz / 40 MHz
  localparam int PRE_LAT   = 2;            // sr_preprocess
  localparam int MLP_LAT   = 8;            // sr_mlp (3 + 2 + 3)
  localparam int POST_LAT  = 2;            // sr_postprocess
  localparam int CORE_LAT  = 9;            // BC cycles, input beat to output beat

  // Example network (see header). Raw integers of the fixed-point codes.
  localparam w_t DEFAULT_W1 [N_TAPS] = '{
    14'sd0, 14'sd0, -14'sd16, -14'sd32, 14'sd192, -14'sd32, -14'sd16, 14'sd0, 14'sd0
  };                                        // 0, 0, -0.0625, -0.125, 0.75, ...
  localparam b_t DEFAULT_B1 = -30'sd58982;  // -0.225
  localparam w_t DEFAULT_W2 [1] = '{14'sd484}; // 1.890625 (w9 of the network)
  localparam b_t DEFAULT_B2 = 30'sd3932;    // 0.015

  // Default normalisation range of the ADC samples (12-bit converter).
  localparam int DEFAULT_ADC_MIN = 0;
  localparam int DEFAULT_ADC_MAX = 4095;

  // Q6.10 code of an ADC value, exactly as sr_preprocess computes it:
  // v = 2 * (adc - mn) - range, x = trunc(v * round(2^26 / range) / 2^16),
  // truncated towards zero and saturated to 16 bits. Used for constants.
  function automatic x_t norm_code(longint adc, longint mn, longint mx);
    longint range, scale, v, q;
    range = mx - mn;
    scale = ((longint'(1) << 26) + range / 2) / range;
    v     = 2 * (adc - mn) - range;
    q     = ((v < 0) ? -v : v) * scale;
    q     = q >> 16;
    if (v < 0) q = -q;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return x_t'(q);
  endfunction

  // Window value of a BC without a sample: that of a 0-count sample.
  localparam x_t DEFAULT_BUBBLE_X = norm_code(64'sd0, longint'(DEFAULT_ADC_MIN),
                                              longint'(DEFAULT_ADC_MAX));

endpackage
