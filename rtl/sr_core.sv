// sr_core: the signal reconstruction IP core.
//
// Receives one ADC sample per bunch crossing (BC) on an AXI4-Stream input,
// keeps the last nine normalised samples, estimates with a small neural
// network (sr_mlp) the amplitude of the central one, and sends that
// amplitude in ADC counts on an AXI4-Stream output, one result per input
// sample, in order.
//
// Two clocks. clk_bc (40 MHz) clocks every register that holds a sample
// between stages: the stream registers, the 9-BC window and two capture
// registers. clk_proc (400 MHz, ten times clk_bc and derived from it, so the
// two are related) clocks the arithmetic: pre-process, network and
// post-process are free-running pipelines whose inputs stay constant for a
// whole BC period, and each finishes in at most ten processing cycles, so
// a BC register reads a settled result at the next BC edge. clk_proc may be
// gated off while the core is empty (core_valid_o low).
//
// BC-cycle schedule of a sample accepted at edge 0 (latency 9 BC):
//   edge 0  slave register         (stream wrapper, 1 cycle)
//   BC 1    pre-process            -> enters BC8 of the window at edge 1
//   edge 5  sample reaches BC4 (after four later samples)
//   BC 6    network                -> capture register at edge 6
//   BC 7    post-process           -> core output register at edge 7
//   edge 8  master register        (stream wrapper, 1 cycle)
// so the amplitude is on the output stream 9 BC cycles after the sample
// was on the input, 7 without the two wrapper registers.
//
// Flow control: all BC registers advance together when the output register
// can take a new value (adv). A stalled output stalls the whole core and
// holds tready low on the input. A BC without an input beat moves a bubble
// through; in the window a bubble counts as a 0-count sample (a quiet
// channel), and it produces no output beat.
// The last four samples of a stream therefore come out once four more BCs
// have passed, with or without new input.
//
// The stage order, clock domains, formats and latencies follow the
// document; the stall scheme and bubble handling are this design's choice.
module sr_core #(
  parameter int         ADC_MIN = sr_pkg::DEFAULT_ADC_MIN,
  parameter int         ADC_MAX = sr_pkg::DEFAULT_ADC_MAX,
  parameter sr_pkg::w_t W1 [sr_pkg::N_TAPS] = sr_pkg::DEFAULT_W1,
  parameter sr_pkg::b_t B1                  = sr_pkg::DEFAULT_B1,
  parameter sr_pkg::w_t W2 [1]              = sr_pkg::DEFAULT_W2,
  parameter sr_pkg::b_t B2                  = sr_pkg::DEFAULT_B2
) (
  input  logic   clk_bc,
  input  logic   clk_proc,
  input  logic   rst_n,
  axis_if.sink   s_axis,
  axis_if.source m_axis,
  output logic   core_valid_o
);
  import sr_pkg::*;

  localparam x_t BUBBLE_X = norm_code(64'sd0, longint'(ADC_MIN), longint'(ADC_MAX));

  logic  adv;
  beat_t in_q;
  x_t    x_norm;
  x_t    window [N_TAPS];
  logic  ctr_valid, ctr_last, fifo_any;
  y_t    y_mlp;
  amp_slot_t mlp_q;
  sample_t   amp;
  beat_t     out_q;

  // ---- stream input (BC) ----
  sr_axis_slave u_slave (
    .clk_bc (clk_bc), .rst_n (rst_n), .adv (adv),
    .s_axis (s_axis), .beat_o (in_q)
  );

  // ---- pre-process (processing clock) ----
  sr_preprocess #(.ADC_MIN(ADC_MIN), .ADC_MAX(ADC_MAX)) u_pre (
    .clk_proc (clk_proc), .sample_i (in_q.data), .x_o (x_norm)
  );

  // ---- 9-BC window (BC) ----
  sr_bc_fifo #(.DEPTH(N_TAPS), .BUBBLE_X(BUBBLE_X)) u_fifo (
    .clk_bc (clk_bc), .rst_n (rst_n), .adv (adv),
    .slot_i ('{valid: in_q.valid, last: in_q.last, x: x_norm}),
    .window_o (window),
    .center_valid_o (ctr_valid), .center_last_o (ctr_last),
    .any_valid_o (fifo_any)
  );

  // ---- network (processing clock) ----
  sr_mlp #(.W1(W1), .B1(B1), .W2(W2), .B2(B2)) u_mlp (
    .clk_proc (clk_proc), .x_i (window), .y_o (y_mlp)
  );

  // ---- capture of the network result (BC) ----
  always_ff @(posedge clk_bc) begin
    if (!rst_n) begin
      mlp_q <= '0;
    end else if (adv) begin
      mlp_q.valid <= ctr_valid;
      mlp_q.last  <= ctr_last;
      mlp_q.y     <= ctr_valid ? y_mlp : '0;
    end
  end

  // ---- post-process (processing clock) ----
  sr_postprocess #(.ADC_MIN(ADC_MIN), .ADC_MAX(ADC_MAX)) u_post (
    .clk_proc (clk_proc), .y_i (mlp_q.y), .amp_o (amp)
  );

  // ---- core output register (BC) ----
  always_ff @(posedge clk_bc) begin
    if (!rst_n) begin
      out_q <= '0;
    end else if (adv) begin
      out_q.valid <= mlp_q.valid;
      out_q.last  <= mlp_q.last;
      out_q.data  <= mlp_q.valid ? amp : '0;
    end
  end

  // ---- stream output (BC) ----
  sr_axis_master u_master (
    .clk_bc (clk_bc), .rst_n (rst_n), .beat_i (out_q),
    .adv (adv), .m_axis (m_axis)
  );

  assign core_valid_o = in_q.valid | fifo_any | mlp_q.valid | out_q.valid
                      | m_axis.tvalid;

  // Each processing-clock stage must settle within one BC period.
  if (PRE_LAT > CLK_RATIO || MLP_LAT > CLK_RATIO || POST_LAT > CLK_RATIO) begin : g_lat_check
    $error("sr_core: a processing stage is longer than one BC period");
  end
endmodule
