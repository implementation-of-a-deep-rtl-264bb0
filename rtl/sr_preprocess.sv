// sr_preprocess: normalisation of an ADC sample to the network's input range.
//
// Maps the ADC range [ADC_MIN, ADC_MAX] linearly onto [-1, 1] and returns the
// result as a 16-bit Q6.10 code:
//   v = 2 * (adc - ADC_MIN) - (ADC_MAX - ADC_MIN)       (scaled offset)
//   x = trunc(v * SCALE / 2^16),  SCALE = round(2^26 / (ADC_MAX - ADC_MIN))
// so x = v / range in units of 2^-10. The fraction is truncated towards
// zero (the magnitude is shifted, then the sign restored), so a negative
// normalised value comes out slightly greater than the exact one, the
// behaviour the design description reports for its fixed-point
// truncation. Results outside the Q6.10 range saturate.
//
// Runs on the processing clock as a free-running two-stage pipeline with no
// reset: x_o follows sample_i two processing cycles later. The BC-clock
// register feeding it is stable for a whole BC period (10 processing
// cycles), so the result is settled well before the next BC edge.
// The stage and the truncation follow the document; the min-max formula
// and the default range (a 12-bit converter, 0..4095) are this design's
// choice.
module sr_preprocess #(
  parameter int ADC_MIN = sr_pkg::DEFAULT_ADC_MIN,
  parameter int ADC_MAX = sr_pkg::DEFAULT_ADC_MAX
) (
  input  logic            clk_proc,
  input  sr_pkg::sample_t sample_i,
  output sr_pkg::x_t      x_o
);
  localparam longint RANGE = longint'(ADC_MAX) - longint'(ADC_MIN);
  localparam longint SCALE = ((longint'(1) << 26) + RANGE / 2) / RANGE;
  localparam longint X_MAX = (longint'(1) << (sr_pkg::X_W - 1)) - 1;
  localparam longint X_MIN = -(longint'(1) << (sr_pkg::X_W - 1));

  logic signed [63:0] v;
  logic        [63:0] mag_prod_q;
  logic               neg_q;
  logic signed [63:0] q;

  assign v = 64'sd2 * (64'(signed'(sample_i)) - 64'(ADC_MIN)) - 64'(RANGE);

  always_ff @(posedge clk_proc) begin
    neg_q      <= v[63];
    mag_prod_q <= (v[63] ? 64'(-v) : 64'(v)) * 64'(SCALE);
  end

  assign q = neg_q ? -signed'(mag_prod_q >> 16) : signed'(mag_prod_q >> 16);

  always_ff @(posedge clk_proc) begin
    if (q > X_MAX)      x_o <= sr_pkg::x_t'(X_MAX);
    else if (q < X_MIN) x_o <= sr_pkg::x_t'(X_MIN);
    else                x_o <= sr_pkg::x_t'(q);
  end
endmodule
