// sr_clock_gate: behavioural model of the processing-clock gate, a global
// clock buffer with clock enable (BUFGCE) whose enable is the OR of the DMA
// stream's valid and the core's valid.
//
// The buffer is a device primitive, so this file models it: the enable is
// captured by a latch that is open while the clock is low, and the output
// clock is the input clock ANDed with the latched enable. The enable can
// therefore only change while the clock is low and the output never
// glitches; when the enable is low the output stays low. Ports: clk_i
// (buffer input, the 400 MHz clock from the clock synthesiser), dma_valid
// (tvalid of the input stream), core_valid (the core holds a sample),
// clk_o (gated processing clock).
//
// Timing: a change of the enable takes effect from the first rising edge of
// clk_i after the next low phase. The OR of the two valids and the BUFGCE
// follow the document; the latch-and-AND model is the usual behaviour of
// such a buffer.
module sr_clock_gate (
  input  logic clk_i,
  input  logic dma_valid,
  input  logic core_valid,
  output logic clk_o
);
  logic ce;
  logic en_q;

  assign ce = dma_valid | core_valid;

  always_latch begin
    if (!clk_i) en_q = ce;
  end

  assign clk_o = clk_i & en_q;
endmodule
