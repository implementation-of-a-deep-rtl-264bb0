// sr_mlp: the signal reconstruction algorithm, a multilayer perceptron with
// one hidden neuron and one output neuron (configuration 1-1).
//
//   h = sum_{i=0..8} x_i * w_i + b1        (sr_neuron, 9 inputs)
//   t = tanh(h)                           (sr_tanh_lut, 5000 entries)
//   y = t * w9 + b2                       (sr_neuron, 1 input)
//
// x0..x8 are the normalised samples of the 9-BC window (x4 the BC whose
// amplitude is estimated), all in Q6.10; h and y are Q13.18. The structure
// and the number formats follow the document. The weights are parameters;
// their defaults are an example network (see sr_pkg), since the trained values
// are not part of the description.
//
// Free-running pipeline on the processing clock, no reset, latency
// LATENCY = 8 cycles (3 + 2 + 3), which fits in one 10-cycle BC period.
module sr_mlp #(
  parameter sr_pkg::w_t W1 [sr_pkg::N_TAPS] = sr_pkg::DEFAULT_W1,
  parameter sr_pkg::b_t B1                  = sr_pkg::DEFAULT_B1,
  parameter sr_pkg::w_t W2 [1]              = sr_pkg::DEFAULT_W2,
  parameter sr_pkg::b_t B2                  = sr_pkg::DEFAULT_B2
) (
  input  logic       clk_proc,
  input  sr_pkg::x_t x_i [sr_pkg::N_TAPS],
  output sr_pkg::y_t y_o
);
  import sr_pkg::*;

  y_t h;
  x_t t [1];

  sr_neuron #(.N_IN(N_TAPS)) u_hidden (
    .clk_proc (clk_proc),
    .x_i      (x_i),
    .w_i      (W1),
    .b_i      (B1),
    .y_o      (h)
  );

  sr_tanh_lut u_tanh (
    .clk_proc (clk_proc),
    .y_i      (h),
    .t_o      (t[0])
  );

  sr_neuron #(.N_IN(1)) u_output (
    .clk_proc (clk_proc),
    .x_i      (t),
    .w_i      (W2),
    .b_i      (B2),
    .y_o      (y_o)
  );
endmodule
