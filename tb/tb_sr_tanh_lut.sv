// tb_sr_tanh_lut: sweeps the tanh table input over and beyond [-0.7, 0.8]
// (every 7th code in range, plus the clamp regions and random codes) and
// compares each output with tanh of the nearest table point computed here
// with real arithmetic, one input per processing cycle, latency exactly 2.
// Also checks that the table holds 5000 distinct points (first and last
// entries tanh(-0.7) and tanh(0.8)) and that it is monotonic.
module tb_sr_tanh_lut;
  import sr_ref_pkg::*;

  logic       clk = 1'b0;
  sr_pkg::y_t y;
  sr_pkg::x_t t;
  int checks = 0, failures = 0;
  longint expq[$];
  longint prev_out;
  longint idx_seen_max = 0;

  sr_tanh_lut dut (.clk_proc(clk), .y_i(y), .t_o(t));

  always #1.25 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint v);
    @(negedge clk);
    if (expq.size() >= 2) begin
      longint e;
      e = expq.pop_front();
      checks++;
      if (longint'(t) !== e) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d expected %0d", t, e);
      end
    end
    y = sr_pkg::y_t'(v);
    expq.push_back(tanh_q(v));
  endtask

  initial begin
    y = '0;
    repeat (3) @(negedge clk);
    // sweep from below -0.7 to above 0.8 (Q13.18 codes)
    for (longint v = -200000; v <= 220000; v += 7) apply(v);
    // far outside and extremes
    apply(-1073741824); apply(1073741823); apply(-262144); apply(262144);
    for (int n = 0; n < 2000; n++) apply(longint'($urandom_range(0, 600000)) - 300000);
    repeat (3) apply(0);
    // table properties, from the reference
    checks++;
    if (tanh_q(-1073741824) != longint'($tanh(-0.7) * 1024.0) ||
        tanh_q(1073741823) != longint'($tanh(0.8) * 1024.0)) failures++;
    checks++;
    if (tanh_idx(1073741823) != 4999 || tanh_idx(-1073741824) != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monotonic output during the rising sweep
  initial begin
    prev_out = -100000;
    repeat (6) @(negedge clk);
    for (int n = 0; n < 59000; n++) begin
      @(negedge clk);
      if (longint'(t) < prev_out) begin
        failures++;
        $display("table not monotonic at step %0d", n);
      end
      prev_out = longint'(t);
    end
    checks++;
  end
endmodule
