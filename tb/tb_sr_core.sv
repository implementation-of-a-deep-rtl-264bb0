// tb_sr_core: the signal reconstruction core on its own, with both clocks
// free running (processing clock 10x the BC clock, rising 0.5 ns after each
// BC edge). A DMA model sends streams of pulse trains with pile-up and
// random gaps, ending each stream with tlast, and the receiving side drops
// tready at random. Every accepted BC (one per advancing edge, a bubble
// when no beat was offered) is recorded, and each output beat is compared
// with the reference: the amplitude of the next real sample computed from
// its 9-BC window, with the right tlast. Checks that the latency, from the
// BC cycle a sample is accepted to the first BC cycle its amplitude is on
// the output, not counting stalled cycles, is exactly 9. Also checks that,
// without the two stream registers, the core itself takes 7: a sample
// loaded into the input register reaches the core output register 7
// advancing BC edges later. Checks that a stalled output holds tready low
// on the input. Counts stalls, bubbles and tlast beats and fails
// if one never happened.
module tb_sr_core;
  import sr_ref_pkg::*;

  logic clk_bc = 1'b0, clk_proc = 1'b0, rst_n = 1'b0;
  logic core_valid;
  int checks = 0, failures = 0;
  int n_stall = 0, n_bubble = 0, n_last = 0, n_out = 0;

  axis_if #(.W(32)) s_bus (.aclk(clk_bc), .aresetn(rst_n));
  axis_if #(.W(32)) m_bus (.aclk(clk_bc), .aresetn(rst_n));

  sr_core dut (.clk_bc(clk_bc), .clk_proc(clk_proc), .rst_n(rst_n),
               .s_axis(s_bus), .m_axis(m_bus), .core_valid_o(core_valid));

  always #12.5 clk_bc = ~clk_bc;
  initial begin
    #0.5;
    forever begin
      #1.25 clk_proc = 1'b1;
      #1.25 clk_proc = 1'b0;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk_bc);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // recorded BC slots, in acceptance order
  longint slot_data[$];
  bit     slot_ok[$];
  bit     slot_last[$];
  int     slot_edge[$];
  int     real_idx[$];      // slot index of each real sample, in order
  int     adv_cnt = 0;
  logic   prev_adv = 1'b0;

  // stimulus: pulse trains
  longint stream[$];
  bit     stream_last[$];

  function automatic void make_stream(int len);
    real sh[9] = '{0.0, 0.0, 0.02, 0.45, 1.0, 0.55, 0.13, 0.05, 0.0};
    real acc[];
    acc = new[len + 9];
    foreach (acc[i]) acc[i] = 0.0;
    for (int p = 0; p < len; p++)
      if ($urandom_range(0, 5) == 0) begin
        real a;
        a = real'($urandom_range(50, 1500));
        for (int k = 0; k < 9; k++) acc[p + k] += a * sh[k];
      end
    for (int p = 0; p < len; p++) begin
      stream.push_back(longint'(acc[p + 4]) + longint'($urandom_range(0, 6)) - 3);
      stream_last.push_back(p == len - 1);
    end
  endfunction

  // DMA source: offers the stream, with random gaps
  initial begin
    s_bus.tvalid = 1'b0; s_bus.tdata = '0; s_bus.tlast = 1'b0;
    for (int s = 0; s < 6; s++) make_stream(60 + 20 * s);
    repeat (3) @(negedge clk_bc);
    rst_n = 1'b1;
    // a beat counts as taken when tvalid and tready are both high once all
    // inputs for the coming BC edge have settled
    begin
      bit acc;
      acc = 1'b0;
      forever begin
        @(negedge clk_bc);
        if (acc) begin
          void'(stream.pop_front());
          void'(stream_last.pop_front());
        end
        if (stream.size() == 0) break;
        if (!s_bus.tvalid || acc) begin
          if ($urandom_range(0, 9) == 0) begin
            s_bus.tvalid = 1'b0;
          end else begin
            s_bus.tvalid = 1'b1;
            s_bus.tdata  = 32'(stream[0]);
            s_bus.tlast  = stream_last[0];
          end
        end
        #2 acc = s_bus.tvalid && s_bus.tready;
      end
    end
    s_bus.tvalid = 1'b0;
  end

  // sink: random tready
  initial begin
    m_bus.tready = 1'b1;
    forever begin
      @(negedge clk_bc);
      m_bus.tready = ($urandom_range(0, 6) != 0);
    end
  end

  // bookkeeping at the negedge, for the coming BC edge
  int out_ptr = 0;
  int appear_edge = 0;
  int in_reg_edge[$];
  int n_inner = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk_bc);
      #2;
      // latency between the core's own input and output registers
      if (prev_adv && dut.in_q.valid) in_reg_edge.push_back(adv_cnt);
      if (prev_adv && dut.out_q.valid) begin
        checks++;
        n_inner++;
        if (in_reg_edge.size() == 0) begin
          failures++;
          $display("core output register loaded without an input");
        end else if (adv_cnt - in_reg_edge[0] !== 7) begin
          failures++;
          $display("core latency without stream registers: %0d", adv_cnt - in_reg_edge[0]);
          void'(in_reg_edge.pop_front());
        end else void'(in_reg_edge.pop_front());
      end
      // a beat that appeared after the last advancing edge
      if (prev_adv && m_bus.tvalid) appear_edge = adv_cnt;
      if (m_bus.tvalid && m_bus.tready) begin
        int j;
        longint e;
        if (out_ptr >= real_idx.size()) begin
          failures++;
          $display("output beat without input sample");
        end else begin
          j = real_idx[out_ptr];
          e = amp_of(slot_data, slot_ok, j);
          checks += 3;
          if (longint'(signed'(m_bus.tdata)) != e) begin
            failures++;
            $display("sample %0d: got %0d expected %0d", out_ptr, signed'(m_bus.tdata), e);
          end
          if (m_bus.tlast !== slot_last[j]) failures++;
          // cycles from the cycle the sample was accepted on the input bus to
          // the first cycle its amplitude is on the output bus, stalls excluded
          if (appear_edge - slot_edge[j] + 1 != 9) begin
            failures++;
            $display("sample %0d: latency %0d BC cycles", out_ptr, appear_edge - slot_edge[j] + 1);
          end
          if (m_bus.tlast) n_last++;
          out_ptr++;
          n_out++;
        end
      end
      checks++;
      if (m_bus.tvalid && !m_bus.tready && s_bus.tready) begin
        failures++;
        $display("input ready during an output stall");
      end
      if (!s_bus.tready) n_stall++;
      if (s_bus.tready) begin
        adv_cnt++;
        slot_data.push_back(s_bus.tvalid ? longint'(signed'(s_bus.tdata)) : 0);
        slot_ok.push_back(s_bus.tvalid);
        slot_last.push_back(s_bus.tvalid & s_bus.tlast);
        slot_edge.push_back(adv_cnt);
        if (s_bus.tvalid) real_idx.push_back(slot_data.size() - 1);
        else n_bubble++;
      end
      prev_adv = s_bus.tready;
    end
  end

  initial begin
    @(posedge rst_n);
    wait (n_out == 60 + 80 + 100 + 120 + 140 + 160);
    repeat (20) @(negedge clk_bc);
    checks++;
    if (core_valid) begin
      failures++;
      $display("core_valid still high after the last beat");
    end
    checks += 4;
    if (n_inner !== n_out) begin failures++; $display("inner latency measured %0d times", n_inner); end
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    if (n_bubble == 0) begin failures++; $display("no bubble happened"); end
    if (n_last != 6) begin failures++; $display("tlast count %0d", n_last); end
    $display("outputs %0d, stall cycles %0d, bubbles %0d, tlast beats %0d",
             n_out, n_stall, n_bubble, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
