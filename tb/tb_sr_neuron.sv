// tb_sr_neuron: checks a 9-input and a 1-input neuron against the reference
// sum of products with random and extreme inputs, weights and biases (the
// extremes drive the 31-bit output into saturation both ways), one new
// operand set per processing cycle, with a latency of exactly 3 cycles.
module tb_sr_neuron;
  import sr_ref_pkg::*;

  logic       clk = 1'b0;
  sr_pkg::x_t x9 [9];
  sr_pkg::w_t w9 [9];
  sr_pkg::b_t b9;
  sr_pkg::y_t y9;
  sr_pkg::x_t x1 [1];
  sr_pkg::w_t w1v [1];
  sr_pkg::b_t b1;
  sr_pkg::y_t y1;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  longint exp9[$], exp1[$];

  sr_neuron #(.N_IN(9)) dut9 (.clk_proc(clk), .x_i(x9), .w_i(w9), .b_i(b9), .y_o(y9));
  sr_neuron #(.N_IN(1)) dut1 (.clk_proc(clk), .x_i(x1), .w_i(w1v), .b_i(b1), .y_o(y1));

  always #1.25 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(int bits, int mode);
    longint lo, hi;
    lo = -(longint'(1) <<< (bits - 1));
    hi = (longint'(1) <<< (bits - 1)) - 1;
    case (mode)
      0: return hi;
      1: return lo;
      default: return longint'($urandom_range(0, 32'(hi - lo))) + lo;
    endcase
  endfunction

  initial begin
    foreach (x9[i]) begin x9[i] = '0; w9[i] = '0; end
    b9 = '0; x1[0] = '0; w1v[0] = '0; b1 = '0;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      longint xa[], wa[], xb[], wb[];
      longint bb, bc, e9, e1;
      int mode;
      // n%3: 0 all max, 1 all min with max weights, else random
      mode = (n < 40) ? (n % 2) : 2;
      xa = new[9]; wa = new[9];
      for (int i = 0; i < 9; i++) begin
        xa[i] = rnd(16, mode);
        wa[i] = (n < 40) ? rnd(14, 0) : rnd(14, 2);
      end
      bb = rnd(30, mode);
      xb = new[1]; wb = new[1];
      xb[0] = rnd(16, mode); wb[0] = rnd(14, (n < 40) ? 0 : 2); bc = rnd(30, mode);
      @(negedge clk);
      if (exp9.size() >= 3) begin
        longint g9, g1;
        g9 = exp9.pop_front();
        g1 = exp1.pop_front();
        checks += 2;
        if (longint'(y9) !== g9) begin failures++; $display("n9 mismatch got %0d exp %0d", y9, g9); end
        if (longint'(y1) !== g1) begin failures++; $display("n1 mismatch got %0d exp %0d", y1, g1); end
        if (g9 == 1073741823) sat_hi++;
        if (g9 == -1073741824) sat_lo++;
      end
      for (int i = 0; i < 9; i++) begin
        x9[i] = sr_pkg::x_t'(xa[i]);
        w9[i] = sr_pkg::w_t'(wa[i]);
      end
      b9 = sr_pkg::b_t'(bb);
      x1[0] = sr_pkg::x_t'(xb[0]); w1v[0] = sr_pkg::w_t'(wb[0]); b1 = sr_pkg::b_t'(bc);
      e9 = neuron(xa, wa, bb);
      e1 = neuron(xb, wb, bc);
      exp9.push_back(e9);
      exp1.push_back(e1);
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("saturation not exercised: hi=%0d lo=%0d", sat_hi, sat_lo);
    end
    $display("saturated results: high %0d, low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
