// sr_neuron: one fixed-point neuron, y = sum_i x_i * w_i + b.
//
// Inputs are 16-bit Q6.10, weights 14-bit Q6.8, the bias 30-bit Q12.18 and
// the output 31-bit Q13.18, the formats the document gives. Each product is
// exact (30 bits, Q12.18, the bias format), the sum is exact in a wider
// accumulator, and only the final result is fitted to 31 bits, saturating
// on overflow (no fraction bits are dropped at any point).
//
// Pipeline on the processing clock, free running, no reset, latency
// LATENCY = 3 cycles:
//   1. the N_IN products and the bias are registered,
//   2. the N_IN+1 terms are summed in groups of three,
//   3. the group sums are added and saturated to the output format.
// The layer-1 neuron of the network uses N_IN = 9, the output neuron
// N_IN = 1. The pipeline split is this design's own choice.
module sr_neuron #(
  parameter int N_IN = sr_pkg::N_TAPS
) (
  input  logic       clk_proc,
  input  sr_pkg::x_t x_i [N_IN],
  input  sr_pkg::w_t w_i [N_IN],
  input  sr_pkg::b_t b_i,
  output sr_pkg::y_t y_o
);
  import sr_pkg::*;

  localparam int N_TERMS = N_IN + 1;                 // products + bias
  localparam int N_GRP   = (N_TERMS + 2) / 3;
  localparam int ACC_W   = P_W + $clog2(N_TERMS) + 1;
  localparam logic signed [ACC_W-1:0] Y_MAXV = ACC_W'((longint'(1) << (Y_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MINV = ACC_W'(-(longint'(1) << (Y_W - 1)));

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t term_q [N_TERMS];
  acc_t grp_q  [N_GRP];
  acc_t total;

  always_ff @(posedge clk_proc) begin
    for (int i = 0; i < N_IN; i++) term_q[i] <= ACC_W'(x_i[i] * w_i[i]);
    term_q[N_IN] <= ACC_W'(b_i);
  end

  always_ff @(posedge clk_proc) begin
    for (int g = 0; g < N_GRP; g++) begin
      acc_t s;
      s = '0;
      for (int k = 0; k < 3; k++)
        if (3 * g + k < N_TERMS) s = s + term_q[3*g+k];
      grp_q[g] <= s;
    end
  end

  always_comb begin
    total = '0;
    for (int g = 0; g < N_GRP; g++) total = total + grp_q[g];
  end

  always_ff @(posedge clk_proc) begin
    if (total > Y_MAXV)      y_o <= y_t'(Y_MAXV);
    else if (total < Y_MINV) y_o <= y_t'(Y_MINV);
    else                     y_o <= y_t'(total);
  end
endmodule
