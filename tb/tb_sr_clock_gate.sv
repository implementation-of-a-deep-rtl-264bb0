// tb_sr_clock_gate: drives the two enables of the processing-clock gate in
// random patterns (changed at random times, also while the clock is high)
// and checks on the gated clock: every rising edge coincides with a rising
// edge of the input clock, a pulse is a full input high phase (no
// glitches), the clock runs when the OR of the enables was high at the
// end of the low phase before the edge and stops otherwise.
module tb_sr_clock_gate;
  logic clk = 1'b0, dma_v = 1'b0, core_v = 1'b0, clk_o;
  int checks = 0, failures = 0, on_edges = 0, off_edges = 0;
  logic en_at_low;
  realtime t_rise;

  sr_clock_gate dut (.clk_i(clk), .dma_valid(dma_v), .core_valid(core_v), .clk_o(clk_o));

  always #1.25 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the enable as it stands when the input clock rises (the stimulus never
  // changes at that instant)
  always @(posedge clk) begin
    en_at_low = dma_v | core_v;
    #0.1;
    checks++;
    if (clk_o !== en_at_low) begin
      failures++;
      $display("gated clock %0b, expected %0b at %0t", clk_o, en_at_low, $realtime);
    end
    if (en_at_low) on_edges++; else off_edges++;
  end

  // glitch check: every gated pulse lasts the whole high phase
  always @(posedge clk_o) t_rise = $realtime;
  always @(negedge clk_o) begin
    checks++;
    if ($realtime - t_rise < 1.2) begin
      failures++;
      $display("glitch on gated clock at %0t", $realtime);
    end
  end

  initial begin
    en_at_low = 1'b0;
    #0.6;
    for (int n = 0; n < 4000; n++) begin
      #(real'($urandom_range(1, 40)) * 0.1);
      // change only during the low phase, the way the BC-clock logic does;
      // changes during the high phase are tried too
      if ($urandom_range(0, 1)) dma_v = $urandom_range(0, 1);
      else core_v = $urandom_range(0, 1);
    end
    #10;
    checks++;
    if (on_edges == 0 || off_edges == 0) failures++;
    $display("edges passed %0d, edges blocked %0d", on_edges, off_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
