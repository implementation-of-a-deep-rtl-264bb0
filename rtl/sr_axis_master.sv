// sr_axis_master: AXI4-Stream master side of the signal reconstruction core.
//
// Holds the reconstructed amplitude of one BC in an output register on the
// BC clock (the second cycle of wrapper latency) and presents it to the DMA
// (S2MM channel) as a 32-bit signed integer. adv is high when that register
// is empty or is being emptied (tready high); it is the advance enable of
// the whole BC-clock pipeline of the core. When the DMA holds tready low
// with a beat waiting, adv drops and the core stalls without losing data.
// Bubbles (valid = 0) are loaded as all zero and never appear on the bus.
//
// Interface: beat_i = {valid, last, data} from the core, m_axis (source).
// Timing: a beat on beat_i before edge n is on m_axis from edge n on.
// The output register follows the document; the stall scheme is this
// design's own choice.
module sr_axis_master (
  input  logic          clk_bc,
  input  logic          rst_n,
  input  sr_pkg::beat_t beat_i,
  output logic          adv,
  axis_if.source        m_axis
);
  sr_pkg::beat_t q;

  assign adv = !q.valid || m_axis.tready;

  always_ff @(posedge clk_bc) begin
    if (!rst_n)   q <= '0;
    else if (adv) q <= beat_i.valid ? beat_i : '0;
  end

  assign m_axis.tvalid = q.valid;
  assign m_axis.tlast  = q.last;
  assign m_axis.tdata  = q.data;
endmodule
