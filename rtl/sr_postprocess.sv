// sr_postprocess: denormalisation of the network output to ADC counts.
//
// Inverts the input normalisation: an output y in [-1, 1] (31-bit Q13.18)
// becomes the amplitude
//   amp = trunc((y + 1) * (ADC_MAX - ADC_MIN) / 2) + ADC_MIN
// computed exactly in integers from (y_raw + 2^18) * range, whose
// magnitude is shifted right by 19 with the sign restored afterwards, so
// the fraction is truncated towards zero like in sr_preprocess. The result
// is the 32-bit signed integer sent on the output stream (it saturates only
// for an extreme ADC range); amplitudes below the pedestal (negative
// counts) are kept, not clipped.
//
// Runs on the processing clock as a free-running two-stage pipeline with no
// reset: amp_o follows y_i two processing cycles later.
// The stage follows the document; the formula is this design's choice,
// matched to sr_preprocess.
module sr_postprocess #(
  parameter int ADC_MIN = sr_pkg::DEFAULT_ADC_MIN,
  parameter int ADC_MAX = sr_pkg::DEFAULT_ADC_MAX
) (
  input  logic            clk_proc,
  input  sr_pkg::y_t      y_i,
  output sr_pkg::sample_t amp_o
);
  localparam longint RANGE = longint'(ADC_MAX) - longint'(ADC_MIN);
  localparam longint ONE   = longint'(1) << sr_pkg::Y_FRAC;
  localparam longint A_MAX = (longint'(1) <<< (sr_pkg::AXIS_W - 1)) - 1;
  localparam longint A_MIN = -(longint'(1) <<< (sr_pkg::AXIS_W - 1));

  logic signed [63:0] u;
  logic        [63:0] mag_prod_q;
  logic               neg_q;
  logic signed [63:0] amp;

  assign u = 64'(signed'(y_i)) + 64'(ONE);

  always_ff @(posedge clk_proc) begin
    neg_q      <= u[63];
    mag_prod_q <= (u[63] ? 64'(-u) : 64'(u)) * 64'(RANGE);
  end

  assign amp = (neg_q ? -signed'(mag_prod_q >> (sr_pkg::Y_FRAC + 1))
                      :  signed'(mag_prod_q >> (sr_pkg::Y_FRAC + 1))) + 64'(ADC_MIN);

  always_ff @(posedge clk_proc) begin
    if (amp > A_MAX)      amp_o <= sr_pkg::sample_t'(A_MAX);
    else if (amp < A_MIN) amp_o <= sr_pkg::sample_t'(A_MIN);
    else                  amp_o <= sr_pkg::sample_t'(amp);
  end
endmodule
