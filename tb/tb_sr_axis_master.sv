// tb_sr_axis_master: offers random beats (and bubbles) to the output
// register whenever adv is high, with a random tready on the bus. Checks
// that the bus carries exactly the valid beats in order, each once, that a
// waiting beat stays on the bus (the interface assertion), that adv is low
// only while a beat waits, and that a beat offered at edge n is on the bus
// from edge n.
module tb_sr_axis_master;
  import sr_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, adv;
  beat_t in_b;
  int checks = 0, failures = 0, stalls = 0, sent = 0, got = 0;
  beat_t q[$];

  axis_if #(.W(32)) bus (.aclk(clk), .aresetn(rst_n));

  sr_axis_master dut (.clk_bc(clk), .rst_n(rst_n), .beat_i(in_b), .adv(adv), .m_axis(bus));

  always #12.5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_b = '0; bus.tready = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (bus.tvalid || !adv) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic took, offered;
      @(negedge clk);
      in_b.valid = ($urandom_range(0, 3) != 0);
      in_b.last  = ($urandom_range(0, 5) == 0);
      in_b.data  = $urandom;
      bus.tready = (n > 2900) ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (adv !== (!bus.tvalid || bus.tready)) failures++;
      if (!adv) stalls++;
      took    = bus.tvalid && bus.tready;
      offered = adv && in_b.valid;
      if (took) begin
        beat_t e;
        e = q.pop_front();
        got++;
        checks++;
        if (bus.tdata !== e.data || bus.tlast !== e.last) begin
          failures++;
          $display("data mismatch at %0d", n);
        end
      end
      if (offered) begin
        q.push_back(in_b);
        sent++;
      end
      @(posedge clk);
      #1;
      if (offered) begin
        checks++;
        if (!(bus.tvalid && bus.tdata == in_b.data)) failures++;
      end
    end
    checks++;
    if (stalls == 0 || got < sent - 1) failures++;
    $display("sent %0d beats, received %0d, %0d stall cycles", sent, got, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
