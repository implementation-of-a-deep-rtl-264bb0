// tb_sr_postprocess: checks the denormalisation stage against the reference
// formula for the ends of the Q13.18 range, the values -1, 0, 1 and random
// outputs, one per processing cycle, with a latency of exactly 2 cycles.
module tb_sr_postprocess;
  import sr_ref_pkg::*;

  logic            clk = 1'b0;
  sr_pkg::y_t      y;
  sr_pkg::sample_t amp;
  int checks = 0, failures = 0;
  longint expq[$];

  sr_postprocess dut (.clk_proc(clk), .y_i(y), .amp_o(amp));

  always #1.25 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint edge_vals[] = '{-262144, 0, 262144, -1073741824, 1073741823, 1, -1, 131072, -262145};
    y = '0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 2000 + edge_vals.size(); n++) begin
      longint v;
      v = (n < edge_vals.size()) ? edge_vals[n] : longint'($urandom_range(0, 700000)) - 350000;
      @(negedge clk);
      if (expq.size() >= 2) begin
        longint e;
        e = expq.pop_front();
        checks++;
        if (longint'(amp) !== e) begin
          failures++;
          $display("mismatch: got %0d expected %0d", amp, e);
        end
      end
      y = sr_pkg::y_t'(v);
      expq.push_back(post(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
