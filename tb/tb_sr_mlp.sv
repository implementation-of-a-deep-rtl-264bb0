// tb_sr_mlp: feeds one 9-sample window per processing cycle into the
// network (clean pulses of random amplitude at random phase, pile-up of two
// pulses, random windows over the whole input range) and compares every
// output with the reference network (default weights), latency exactly 8
// cycles. Counts windows whose hidden sum falls below, inside and above
// the tanh table range, and fails if any of the three never occurs.
module tb_sr_mlp;
  import sr_ref_pkg::*;

  logic       clk = 1'b0;
  sr_pkg::x_t x [9];
  sr_pkg::y_t y;
  int checks = 0, failures = 0, below = 0, in_rng = 0, above = 0;
  longint expq[$];

  sr_mlp dut (.clk_proc(clk), .x_i(x), .y_o(y));

  always #1.25 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // normalised pulse shape relative to the peak at x4 (read off the pulse
  // figure of the detector, only for stimulus)
  function automatic real shape(int k);
    real s[9] = '{0.0, 0.0, 0.02, 0.45, 1.0, 0.55, 0.13, 0.05, 0.0};
    return (k >= 0 && k < 9) ? s[k] : 0.0;
  endfunction

  initial begin
    foreach (x[i]) x[i] = '0;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      longint xa[9], h;
      longint xd[], wd[];
      int kind;
      kind = n % 4;
      for (int i = 0; i < 9; i++) begin
        real a, a2;
        a  = real'($urandom_range(0, 2500));
        a2 = real'($urandom_range(0, 1500));
        case (kind)
          0: xa[i] = pre(longint'(a * shape(i)));
          1: xa[i] = pre(longint'(a * shape(i - 2) + a2 * shape(i + 3)));
          2: xa[i] = pre(longint'($urandom_range(0, 4095)));
          default: xa[i] = longint'($urandom_range(0, 65535)) - 32768;
        endcase
      end
      // classify the hidden-neuron input against the table range
      xd = new[9]; wd = new[9];
      for (int i = 0; i < 9; i++) begin xd[i] = xa[i]; wd[i] = w1(i); end
      h = neuron(xd, wd, B1);
      if (h < -183501) below++; else if (h > 209715) above++; else in_rng++;
      @(negedge clk);
      if (expq.size() >= 8) begin
        longint e;
        e = expq.pop_front();
        checks++;
        if (longint'(y) !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %0d expected %0d", y, e);
        end
      end
      for (int i = 0; i < 9; i++) x[i] = sr_pkg::x_t'(xa[i]);
      expq.push_back(mlp(xa));
    end
    checks++;
    if (below == 0 || in_rng == 0 || above == 0) failures++;
    $display("hidden sum below/inside/above table range: %0d/%0d/%0d", below, in_rng, above);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
