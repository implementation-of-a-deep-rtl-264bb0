// sr_axis_slave: AXI4-Stream slave side of the signal reconstruction core.
//
// Takes one 32-bit signed ADC sample per beat from the DMA (MM2S channel)
// and registers it once on the BC clock, which is one of the two cycles of
// latency that the AXI-Stream wrapper adds to the core. The whole core
// advances as one pipeline: the master side raises adv when its output
// register can take a new value, and adv is also this slave's tready. A
// cycle with adv high and no valid beat on the bus loads a bubble
// (valid = 0, data = 0), so the BC pipeline keeps moving and a stream is
// flushed out by the bubbles that follow it.
//
// Interface: s_axis (sink modport), beat_o = registered {valid, last, data}.
// Timing: beat_o shows a beat accepted at clock edge n from edge n on.
// The register stage follows the document; treating every adv cycle
// without a beat as a zero-valued bubble is this design's own choice.
module sr_axis_slave (
  input  logic          clk_bc,
  input  logic          rst_n,
  input  logic          adv,
  axis_if.sink          s_axis,
  output sr_pkg::beat_t beat_o
);
  assign s_axis.tready = adv;

  always_ff @(posedge clk_bc) begin
    if (!rst_n) begin
      beat_o <= '0;
    end else if (adv) begin
      beat_o.valid <= s_axis.tvalid;
      beat_o.last  <= s_axis.tvalid & s_axis.tlast;
      beat_o.data  <= s_axis.tvalid ? sr_pkg::sample_t'(s_axis.tdata) : '0;
    end
  end
endmodule
