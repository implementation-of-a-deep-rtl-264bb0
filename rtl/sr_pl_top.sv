// sr_pl_top: programmable-logic side of the reconstruction system.
//
// Joins the signal reconstruction core to the gate of its processing
// clock. The gate's enable is the OR of the input stream's tvalid (the DMA
// is sending) and the core's valid (the core still holds a sample), so the
// 400 MHz arithmetic is clocked only while there is work. The surrounding
// vendor blocks are outside this module and connect through its ports:
//   clk_bc, clk_proc   40 MHz BC clock and the 400 MHz clock the clock
//                      synthesiser derives from it (edges aligned),
//   rst_n              reset synchronised to clk_bc, active low,
//   s_axis_*           AXI4-Stream from the DMA's memory-to-stream channel,
//   m_axis_*           AXI4-Stream to the DMA's stream-to-memory channel,
//   clk_proc_gated_o   the gated processing clock, for observation,
//   core_valid_o       the core holds a sample (second input of the OR).
// Samples and amplitudes are 32-bit signed integers, one per beat.
// The structure follows the document's system integration figure.
module sr_pl_top #(
  parameter int         ADC_MIN = sr_pkg::DEFAULT_ADC_MIN,
  parameter int         ADC_MAX = sr_pkg::DEFAULT_ADC_MAX,
  parameter sr_pkg::w_t W1 [sr_pkg::N_TAPS] = sr_pkg::DEFAULT_W1,
  parameter sr_pkg::b_t B1                  = sr_pkg::DEFAULT_B1,
  parameter sr_pkg::w_t W2 [1]              = sr_pkg::DEFAULT_W2,
  parameter sr_pkg::b_t B2                  = sr_pkg::DEFAULT_B2
) (
  input  logic                      clk_bc,
  input  logic                      clk_proc,
  input  logic                      rst_n,
  input  logic [sr_pkg::AXIS_W-1:0] s_axis_tdata,
  input  logic                      s_axis_tvalid,
  input  logic                      s_axis_tlast,
  output logic                      s_axis_tready,
  output logic [sr_pkg::AXIS_W-1:0] m_axis_tdata,
  output logic                      m_axis_tvalid,
  output logic                      m_axis_tlast,
  input  logic                      m_axis_tready,
  output logic                      clk_proc_gated_o,
  output logic                      core_valid_o
);
  axis_if #(.W(sr_pkg::AXIS_W)) s_bus (.aclk(clk_bc), .aresetn(rst_n));
  axis_if #(.W(sr_pkg::AXIS_W)) m_bus (.aclk(clk_bc), .aresetn(rst_n));

  assign s_bus.tdata   = s_axis_tdata;
  assign s_bus.tvalid  = s_axis_tvalid;
  assign s_bus.tlast   = s_axis_tlast;
  assign s_axis_tready = s_bus.tready;

  assign m_axis_tdata  = m_bus.tdata;
  assign m_axis_tvalid = m_bus.tvalid;
  assign m_axis_tlast  = m_bus.tlast;
  assign m_bus.tready  = m_axis_tready;

  sr_clock_gate u_gate (
    .clk_i      (clk_proc),
    .dma_valid  (s_axis_tvalid),
    .core_valid (core_valid_o),
    .clk_o      (clk_proc_gated_o)
  );

  sr_core #(
    .ADC_MIN (ADC_MIN), .ADC_MAX (ADC_MAX),
    .W1 (W1), .B1 (B1), .W2 (W2), .B2 (B2)
  ) u_core (
    .clk_bc       (clk_bc),
    .clk_proc     (clk_proc_gated_o),
    .rst_n        (rst_n),
    .s_axis       (s_bus),
    .m_axis       (m_bus),
    .core_valid_o (core_valid_o)
  );
endmodule
