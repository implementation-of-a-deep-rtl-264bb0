// tb_sr_pl_top: end-to-end test of the programmable-logic side at its
// default parameters: the core behind the gated processing clock, fed and
// drained by a model of the DMA's two stream channels.
//
// Workloads, sent one after another with idle gaps between them:
//   1. the 12-sample input sequence of the latency measurement in the
//      design description (757, 1486, 925, ...),
//   2. a 50-BC series of pulses with pile-up, like the reconstruction plot
//      of the description,
//   3. several long pulse trains with random gaps in the input and random
//      back-pressure on the output,
//   4. near full-scale samples with single-BC dips to 0, which drive the
//      hidden neuron below the tanh table range.
// Each output beat is checked against the reference model (amplitude of the
// next real sample from its 9-BC window, tlast), and its latency must be 9
// BC cycles not counting stalled cycles. The testbench counts how often each
// mechanism happened and fails if one never did: output stall, input
// bubble, tlast, processing clock gated off while idle (no gated edges in a
// whole idle BC period) and running again, hidden-neuron input outside the
// tanh table range. For workload 2, sent with no gaps and no
// back-pressure, it checks the sustained rate: 50 input beats in 50
// consecutive BC cycles and 50 output beats in 50 consecutive BC cycles,
// one 32-bit word per 25 ns each way. It also prints the mean absolute error of the
// reconstructed against the true amplitude of the pulses of workload 2.
module tb_sr_pl_top;
  import sr_ref_pkg::*;

  logic        clk_bc = 1'b0, clk_proc = 1'b0, rst_n = 1'b0;
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tlast = 1'b0, s_tready;
  logic        m_tvalid, m_tlast, m_tready = 1'b1;
  logic        clk_gated, core_valid;
  int checks = 0, failures = 0;
  int n_stall = 0, n_bubble = 0, n_last = 0, n_out = 0, n_sent = 0;
  int n_gated_off = 0, n_gated_on = 0, n_clamp = 0, n_expected = 0;
  bit backpressure = 1'b0, gaps = 1'b0;
  // rate measurement: BC cycle numbers of the first and last beat each way
  bit rate_on = 1'b0;
  int bc_n = 0, in_first = -1, in_last = -1, out_first = -1, out_last = -1;

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
    repeat (40000) @(posedge clk_bc);
    failures++;
    $display("watchdog expired: %0d of %0d beats received, %0d sent", n_out, n_expected, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  longint stream[$];
  bit     stream_last[$];
  longint truth[$];           // true amplitude per sample of workload 2 (-1: none)

  function automatic void add_train(int len, bit record_truth, int prob);
    static real sh[9] = '{0.0, 0.0, 0.02, 0.45, 1.0, 0.55, 0.13, 0.05, 0.0};
    real acc[];
    longint amp[];
    acc = new[len + 9];
    amp = new[len];
    foreach (acc[i]) acc[i] = 0.0;
    foreach (amp[i]) amp[i] = -1;
    for (int p = 0; p < len; p++)
      if ($urandom_range(0, prob) == 0) begin
        real a;
        a = real'($urandom_range(80, 1500));
        amp[p] = longint'(a);
        for (int k = 0; k < 9; k++) if (p + k - 4 >= 0) acc[p + k - 4] += a * sh[k];
      end
    for (int p = 0; p < len; p++) begin
      stream.push_back(longint'(acc[p]));
      stream_last.push_back(p == len - 1);
      if (record_truth) truth.push_back(amp[p]);
    end
  endfunction

  // offers the queued samples; a beat counts as taken when tvalid and tready
  // are both high once all inputs for the coming BC edge have settled
  task automatic send_all();
    bit acc;
    acc = 1'b0;
    forever begin
      @(negedge clk_bc);
      if (acc) begin
        void'(stream.pop_front());
        void'(stream_last.pop_front());
        n_sent++;
      end
      if (stream.size() == 0) break;
      if (!s_tvalid || acc) begin
        if (gaps && $urandom_range(0, 7) == 0) begin
          s_tvalid = 1'b0;
        end else begin
          s_tvalid = 1'b1;
          s_tdata  = 32'(stream[0]);
          s_tlast  = stream_last[0];
        end
      end
      #2 acc = s_tvalid && s_tready;
    end
    s_tvalid = 1'b0;
    s_tlast  = 1'b0;
  endtask

  task automatic wait_drained();
    wait (n_out == n_expected);
    repeat (3) @(negedge clk_bc);
  endtask

  // idle check: a whole BC period with the gate closed
  task automatic check_idle_gated();
    int edges;
    repeat (2) @(negedge clk_bc);
    edges = 0;
    fork
      begin repeat (40) @(posedge clk_gated) edges++; end
      begin repeat (2) @(negedge clk_bc); end
    join_any
    disable fork;
    checks++;
    if (edges == 0) n_gated_off++;
    else begin
      failures++;
      $display("processing clock still running while idle (%0d edges)", edges);
    end
  endtask

  longint fig_seq[12] = '{757, 1486, 925, 373, 164, 9, 21, 63, 221, 353, 139, 6};
  longint reco[$];
  int     w2_first;

  initial begin
    repeat (4) @(negedge clk_bc);
    rst_n = 1'b1;
    check_idle_gated();
    // workload 1
    foreach (fig_seq[i]) begin
      stream.push_back(fig_seq[i]);
      stream_last.push_back(i == 11);
    end
    n_expected += 12;
    send_all();
    wait_drained();
    check_idle_gated();
    // workload 2
    w2_first = n_expected;
    add_train(50, 1'b1, 4);
    n_expected += 50;
    rate_on = 1'b1;
    send_all();
    wait_drained();
    rate_on = 1'b0;
    checks += 2;
    if (in_last - in_first + 1 !== 50) begin
      failures++;
      $display("input rate: 50 beats took %0d BC cycles", in_last - in_first + 1);
    end
    if (out_last - out_first + 1 !== 50) begin
      failures++;
      $display("output rate: 50 beats took %0d BC cycles", out_last - out_first + 1);
    end
    check_idle_gated();
    // workload 3
    gaps = 1'b1;
    backpressure = 1'b1;
    for (int s = 0; s < 5; s++) begin
      add_train(100 + 37 * s, 1'b0, 5);
      n_expected += 100 + 37 * s;
    end
    send_all();
    wait_drained();
    backpressure = 1'b0;
    check_idle_gated();
    // workload 4
    gaps = 1'b0;
    for (int i = 0; i < 24; i++) begin
      stream.push_back((i % 4 == 3) ? 0 : 4000);
      stream_last.push_back(i == 23);
    end
    n_expected += 24;
    send_all();
    wait_drained();
    check_idle_gated();
    // summary
    begin
      real err;
      int  np;
      err = 0.0; np = 0;
      foreach (truth[i])
        if (truth[i] >= 0) begin
          err += ((reco[w2_first + i] > truth[i]) ? real'(reco[w2_first + i] - truth[i])
                                                  : real'(truth[i] - reco[w2_first + i]));
          np++;
        end
      if (np > 0)
        $display("workload 2: %0d pulses, mean |reconstructed - true| = %0.1f ADC counts",
                 np, err / real'(np));
    end
    checks += 6;
    if (n_stall == 0)     begin failures++; $display("no output stall happened"); end
    if (n_bubble == 0)    begin failures++; $display("no input bubble happened"); end
    if (n_last != 8)      begin failures++; $display("tlast beats: %0d", n_last); end
    if (n_gated_off == 0) begin failures++; $display("clock never gated off"); end
    if (n_gated_on == 0)  begin failures++; $display("clock never ran"); end
    if (n_clamp == 0)     begin failures++; $display("table range never exceeded"); end
    $display("beats %0d; stall cycles %0d; bubbles %0d; tlast %0d; idle periods gated %0d; gated clock edges %0d; table clamps %0d",
             n_out, n_stall, n_bubble, n_last, n_gated_off, n_gated_on, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DMA stream-to-memory side: random tready during workload 3
  initial begin
    forever begin
      @(negedge clk_bc);
      m_tready = backpressure ? ($urandom_range(0, 5) != 0) : 1'b1;
    end
  end

  // ---------------- checking ----------------
  longint slot_data[$];
  bit     slot_ok[$];
  bit     slot_last[$];
  int     slot_edge[$];
  int     real_idx[$];
  int     adv_cnt = 0, out_ptr = 0, appear_edge = 0;
  logic   prev_adv = 1'b0;

  always @(posedge clk_gated) n_gated_on++;

  always @(negedge clk_bc) begin
    #2;
    bc_n++;
    if (rate_on && s_tvalid && s_tready) begin
      if (in_first < 0) in_first = bc_n;
      in_last = bc_n;
    end
    if (rate_on && m_tvalid && m_tready) begin
      if (out_first < 0) out_first = bc_n;
      out_last = bc_n;
    end
  end

  // hidden sum outside the table range, sampled on the processing clock
  always @(negedge clk_gated) begin
    if (dut.u_core.u_mlp.h < -183501 || dut.u_core.u_mlp.h > 209715) n_clamp++;
  end

  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk_bc);
      #2;
      if (prev_adv && m_tvalid) appear_edge = adv_cnt;
      if (m_tvalid && m_tready) begin
        int j;
        longint e;
        if (out_ptr >= real_idx.size()) begin
          failures++;
          $display("output beat without input sample");
        end else begin
          j = real_idx[out_ptr];
          e = amp_of(slot_data, slot_ok, j);
          reco.push_back(longint'(signed'(m_tdata)));
          checks += 3;
          if (longint'(signed'(m_tdata)) != e) begin
            failures++;
            $display("sample %0d: got %0d expected %0d", out_ptr, signed'(m_tdata), e);
          end
          if (m_tlast !== slot_last[j]) failures++;
          if (appear_edge - slot_edge[j] + 1 != 9) begin
            failures++;
            $display("sample %0d: latency %0d BC cycles", out_ptr, appear_edge - slot_edge[j] + 1);
          end
          if (m_tlast) n_last++;
          out_ptr++;
          n_out++;
        end
      end
      if (!s_tready) n_stall++;
      if (s_tready) begin
        adv_cnt++;
        slot_data.push_back(s_tvalid ? longint'(signed'(s_tdata)) : 0);
        slot_ok.push_back(s_tvalid);
        slot_last.push_back(s_tvalid & s_tlast);
        slot_edge.push_back(adv_cnt);
        if (s_tvalid) real_idx.push_back(slot_data.size() - 1);
        else if (gaps && stream.size() > 0) n_bubble++;
      end
      prev_adv = s_tready;
    end
  end
endmodule
