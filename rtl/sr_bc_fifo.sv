// sr_bc_fifo: serial-in, parallel-out window of the last DEPTH BCs.
//
// A shift register on the BC clock. Each advancing BC edge (adv high) moves
// every slot one place down and writes the new normalised sample into the
// top slot: BC8 holds the newest sample, BC0 the oldest, and the network
// reads all of them at once as x8..x0. The slot in the middle (BC4) is the
// BC whose amplitude is reconstructed, so its valid and last flags travel
// with it and come out as center_valid_o / center_last_o. Bubbles (slots
// with valid low) are stored as BUBBLE_X, the normalised code of a 0-count
// sample (no signal), so a gap in the stream looks like a quiet channel.
// any_valid_o is high while any slot holds a real sample; it keeps the
// processing clock running.
//
// Timing: a sample written at edge n is in BC8 from edge n and in BC4 from
// edge n+4. The organisation (9 slots, BC0..BC8, serial in, parallel out,
// BC clock) follows the document; the bubble value and the flag sidecar
// are this design's choice.
module sr_bc_fifo #(
  parameter int         DEPTH    = sr_pkg::N_TAPS,
  parameter sr_pkg::x_t BUBBLE_X = sr_pkg::DEFAULT_BUBBLE_X
) (
  input  logic               clk_bc,
  input  logic               rst_n,
  input  logic               adv,
  input  sr_pkg::norm_slot_t slot_i,
  output sr_pkg::x_t         window_o [DEPTH],
  output logic               center_valid_o,
  output logic               center_last_o,
  output logic               any_valid_o
);
  localparam int CENTER = DEPTH / 2;

  sr_pkg::norm_slot_t slot_q [DEPTH];

  always_ff @(posedge clk_bc) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) slot_q[i] <= '{valid: 1'b0, last: 1'b0, x: BUBBLE_X};
    end else if (adv) begin
      for (int i = 0; i < DEPTH - 1; i++) slot_q[i] <= slot_q[i+1];
      slot_q[DEPTH-1].valid <= slot_i.valid;
      slot_q[DEPTH-1].last  <= slot_i.valid & slot_i.last;
      slot_q[DEPTH-1].x     <= slot_i.valid ? slot_i.x : BUBBLE_X;
    end
  end

  always_comb begin
    any_valid_o = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      window_o[i] = slot_q[i].x;
      any_valid_o = any_valid_o | slot_q[i].valid;
    end
  end

  assign center_valid_o = slot_q[CENTER].valid;
  assign center_last_o  = slot_q[CENTER].last;
endmodule
