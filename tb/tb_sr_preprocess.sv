// tb_sr_preprocess: checks the normalisation stage against the reference
// formula for edge values (range ends, below and above the range, extreme
// 32-bit values) and random samples, one new sample per processing cycle,
// and checks that each result appears exactly 2 cycles after its input.
module tb_sr_preprocess;
  import sr_ref_pkg::*;

  logic            clk = 1'b0;
  sr_pkg::sample_t sample;
  sr_pkg::x_t      x;
  int checks = 0, failures = 0;
  longint expq[$];

  sr_preprocess dut (.clk_proc(clk), .sample_i(sample), .x_o(x));

  always #1.25 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint edge_vals[] = '{0, 4095, 1, 2047, 2048, 4094, -1, -5000, 5000, 100000,
                            -64'sd2147483648, 2147483647, 757, 1486, 9};
    sample = '0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 2000 + edge_vals.size(); n++) begin
      longint v;
      v = (n < edge_vals.size()) ? edge_vals[n] : longint'($urandom_range(0, 4600)) - 300;
      @(negedge clk);
      if (expq.size() >= 2) begin
        longint e;
        e = expq.pop_front();
        checks++;
        if (longint'(x) !== e) begin
          failures++;
          $display("mismatch: got %0d expected %0d at n=%0d", x, e, n);
        end
      end
      sample = sample_t_cast(v);
      expq.push_back(pre(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sr_pkg::sample_t sample_t_cast(longint v);
    return sr_pkg::sample_t'(v);
  endfunction
endmodule
