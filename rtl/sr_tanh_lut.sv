// sr_tanh_lut: quantised hyperbolic tangent, the activation of the hidden
// neuron.
//
// A table of N_ENTRIES = 5000 samples of tanh over [X_LO, X_HI] = [-0.7,
// 0.8], the size and range given by the document. Entry i holds
//   round(tanh(X_LO + i * (X_HI - X_LO) / (N_ENTRIES - 1)) * 2^10)
// as a 16-bit Q6.10 code, the input format of the next neuron. The table is
// computed at elaboration by a constant function, so no data file is
// needed.
//
// Address: the 31-bit Q13.18 input is offset by X_LO, clamped to the table
// range and scaled to the nearest entry,
//   idx = (d * K + 2^29) >> 30,   d = clamp(y - X_LO, 0, X_HI - X_LO),
//   K   = round((N_ENTRIES - 1) * 2^30 / span),    all in 2^-18 units.
// Inputs beyond the range therefore give the end entries, tanh(-0.7) and
// tanh(0.8). The nearest-entry addressing and the clamping are this
// design's choice; the document does not say how the table is addressed.
//
// Pipeline on the processing clock, no reset, LATENCY = 2: the address is
// registered, then the table is read into the output register (a ROM).
module sr_tanh_lut #(
  parameter int  N_ENTRIES = 5000,
  parameter real X_LO      = -0.7,
  parameter real X_HI      = 0.8
) (
  input  logic       clk_proc,
  input  sr_pkg::y_t y_i,
  output sr_pkg::x_t t_o
);
  import sr_pkg::*;

  localparam int     AW      = $clog2(N_ENTRIES);
  localparam real    ONE_Y   = real'(longint'(1) << Y_FRAC);
  localparam longint LO_RAW  = longint'(X_LO * ONE_Y);
  localparam longint HI_RAW  = longint'(X_HI * ONE_Y);
  localparam longint SPAN    = HI_RAW - LO_RAW;
  localparam longint K       = longint'(real'(N_ENTRIES - 1) * (2.0 ** 30) / real'(SPAN));

  typedef logic [N_ENTRIES*X_W-1:0] rom_bits_t;

  function automatic rom_bits_t tanh_table();
    rom_bits_t r;
    for (int i = 0; i < N_ENTRIES; i++) begin
      real xr;
      xr = X_LO + real'(i) * (X_HI - X_LO) / real'(N_ENTRIES - 1);
      r[i*X_W +: X_W] = X_W'(longint'($tanh(xr) * real'(1 << X_FRAC)));
    end
    return r;
  endfunction

  localparam rom_bits_t ROM_INIT = tanh_table();

  logic [X_W-1:0] rom [N_ENTRIES];
  initial begin
    for (int i = 0; i < N_ENTRIES; i++) rom[i] = ROM_INIT[i*X_W +: X_W];
  end

  logic signed [63:0] d;
  logic        [63:0] idx_full;
  logic [AW-1:0]      idx_q;

  always_comb begin
    d = 64'(signed'(y_i)) - 64'(LO_RAW);
    if (d < 0)         d = '0;
    else if (d > SPAN) d = 64'(SPAN);
    idx_full = (64'(d) * 64'(K) + (64'd1 << 29)) >> 30;
    if (idx_full > 64'(N_ENTRIES - 1)) idx_full = 64'(N_ENTRIES - 1);
  end

  always_ff @(posedge clk_proc) idx_q <= AW'(idx_full);
  always_ff @(posedge clk_proc) t_o   <= x_t'(rom[idx_q]);
endmodule
