// tb_sr_fixed_vs_float: precision workload. Streams 20000 BCs of random
// pulse trains with pile-up and noise through the top at its default
// parameters and compares every reconstructed amplitude with the same
// network evaluated in double-precision real arithmetic (exact
// normalisation, exact tanh, no quantisation). The difference
// (real - fixed, in ADC counts) is histogrammed and printed. Checks, for
// every window whose hidden sum lies inside the tanh table range, that the
// fixed-point result is within 10 counts of the real-valued one (the bound
// follows from the formats: about 5 counts from input quantisation, 3 from
// the table, 1 from truncation of the result), that most windows are
// inside the table range, and that the mean difference is below zero: the
// inputs are truncated towards zero and mostly negative after
// normalisation, so the fixed-point result is on average the larger one.
module tb_sr_fixed_vs_float;
  localparam int N_BC = 20000;

  logic        clk_bc = 1'b0, clk_proc = 1'b0, rst_n = 1'b0;
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tlast = 1'b0, s_tready;
  logic        m_tvalid, m_tlast, m_tready = 1'b1;
  logic        clk_gated, core_valid;
  int checks = 0, failures = 0, n_out = 0, n_in_range = 0, n_out_range = 0;
  int hist [-16:16];
  real sum_d = 0.0, min_d = 1.0e9, max_d = -1.0e9;

  sr_pl_top dut (
    .clk_bc (clk_bc), .clk_proc (clk_proc), .rst_n (rst_n),
    .s_axis_tdata (s_tdata), .s_axis_tvalid (s_tvalid), .s_axis_tlast (s_tlast),
    .s_axis_tready (s_tready),
    .m_axis_tdata (m_tdata), .m_axis_tvalid (m_tvalid), .m_axis_tlast (m_tlast),
    .m_axis_tready (m_tready),
    .clk_proc_gated_o (clk_gated), .core_valid_o (core_valid)
  );

  always #12.5 clk_bc = ~clk_bc;
  initial begin
    #0.5;
    forever begin
      #1.25 clk_proc = 1'b1;
      #1.25 clk_proc = 1'b0;
    end
  end

  initial begin : watchdog
    repeat (N_BC + 2000) @(posedge clk_bc);
    failures++;
    $display("watchdog expired after %0d beats", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint samples[N_BC];

  // real-valued network on the window centred on sample j (0-count samples
  // outside the stream)
  function automatic real float_amp(int j, output bit in_range);
    real w[9] = '{0.0, 0.0, -0.0625, -0.125, 0.75, -0.125, -0.0625, 0.0, 0.0};
    real h, y;
    h = -58982.0 / 262144.0;
    for (int i = 0; i < 9; i++) begin
      int p;
      real a;
      p = j - 4 + i;
      a = (p >= 0 && p < N_BC) ? real'(samples[p]) : 0.0;
      h += w[i] * (2.0 * a / 4095.0 - 1.0);
    end
    in_range = (h >= -0.7 && h <= 0.8);
    y = $tanh(h) * (484.0 / 256.0) + 3932.0 / 262144.0;
    return (y + 1.0) * 4095.0 / 2.0;
  endfunction

  initial begin
    static real sh[9] = '{0.0, 0.0, 0.02, 0.45, 1.0, 0.55, 0.13, 0.05, 0.0};
    real acc[N_BC + 9];
    foreach (hist[i]) hist[i] = 0;
    foreach (acc[i]) acc[i] = 0.0;
    for (int p = 0; p < N_BC; p++)
      if ($urandom_range(0, 4) == 0) begin
        real a;
        a = real'($urandom_range(20, 1500));
        for (int k = 0; k < 9; k++) if (p + k - 4 >= 0) acc[p + k - 4] += a * sh[k];
      end
    for (int p = 0; p < N_BC; p++)
      samples[p] = longint'(acc[p]) + longint'($urandom_range(0, 10)) - 5;
    repeat (4) @(negedge clk_bc);
    rst_n = 1'b1;
    for (int p = 0; p < N_BC; p++) begin
      @(negedge clk_bc);
      s_tvalid = 1'b1;
      s_tdata  = 32'(samples[p]);
      s_tlast  = (p == N_BC - 1);
    end
    @(negedge clk_bc);
    s_tvalid = 1'b0;
    s_tlast  = 1'b0;
  end

  initial begin
    @(posedge rst_n);
    while (n_out < N_BC) begin
      @(negedge clk_bc);
      #2;
      if (m_tvalid && m_tready) begin
        real f, d;
        bit  ok;
        int  b;
        f = float_amp(n_out, ok);
        d = f - real'(signed'(m_tdata));
        if (ok) begin
          n_in_range++;
          checks++;
          if (d > 10.0 || d < -10.0) begin
            failures++;
            if (failures < 10) $display("BC %0d: real %0.2f fixed %0d", n_out, f, signed'(m_tdata));
          end
          sum_d += d;
          if (d < min_d) min_d = d;
          if (d > max_d) max_d = d;
          b = $rtoi($floor(d));
          if (b < -16) b = -16;
          if (b > 16) b = 16;
          hist[b]++;
        end else n_out_range++;
        n_out++;
      end
    end
    checks += 2;
    if (n_in_range < N_BC * 9 / 10) failures++;
    if (sum_d >= 0.0) begin
      failures++;
      $display("mean difference is not below zero");
    end
    $display("%0d BCs, %0d inside the tanh table range, %0d outside", n_out, n_in_range, n_out_range);
    $display("real - fixed: mean %0.3f, min %0.2f, max %0.2f ADC counts", sum_d / real'(n_in_range), min_d, max_d);
    for (int i = -16; i <= 16; i++)
      if (hist[i] != 0) $display("  [%0d, %0d): %0d", i, i + 1, hist[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
