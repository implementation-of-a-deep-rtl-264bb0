// tb_sr_axis_slave: random source on the input stream (random tvalid,
// data, tlast, holding beats while tready is low) and random adv. After
// each edge the registered beat must be the bus beat of that cycle when adv
// was high (or a zero bubble when tvalid was low), and unchanged when adv
// was low; tready must equal adv.
module tb_sr_axis_slave;
  import sr_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, adv = 1'b0;
  beat_t q, expq;
  int checks = 0, failures = 0, beats = 0, stalls = 0;

  axis_if #(.W(32)) bus (.aclk(clk), .aresetn(rst_n));

  sr_axis_slave dut (.clk_bc(clk), .rst_n(rst_n), .adv(adv), .s_axis(bus), .beat_o(q));

  always #12.5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus.tvalid = 1'b0; bus.tdata = '0; bus.tlast = 1'b0;
    expq = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q != '0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // a held beat stays on the bus until accepted
      if (!(bus.tvalid && !bus.tready)) begin
        bus.tvalid = ($urandom_range(0, 3) != 0);
        bus.tdata  = $urandom;
        bus.tlast  = ($urandom_range(0, 9) == 0);
      end
      adv = ($urandom_range(0, 4) != 0);
      #1;
      checks++;
      if (bus.tready !== adv) failures++;
      if (adv) begin
        expq.valid = bus.tvalid;
        expq.last  = bus.tvalid & bus.tlast;
        expq.data  = bus.tvalid ? sample_t'(bus.tdata) : '0;
        if (bus.tvalid) beats++;
      end else stalls++;
      @(posedge clk);
      #1;
      checks++;
      if (q != expq) begin
        failures++;
        $display("beat mismatch at %0d", n);
      end
    end
    checks++;
    if (beats == 0 || stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
