// tb_sr_bc_fifo: drives random slots (some bubbles, random tlast) into the
// 9-BC window with adv randomly held low, and after every edge compares the
// window, the flags of the centre slot and any_valid with a queue model of
// the last nine accepted slots (bubbles stored as the code of a
// 0-count sample, newest in BC8). Also
// checks the reset state and that a sample reaches BC4 four shifts after
// entering BC8.
module tb_sr_bc_fifo;
  import sr_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, adv = 1'b0;
  norm_slot_t slot;
  x_t         win [9];
  logic       cv, cl, anyv;
  int checks = 0, failures = 0, stalls = 0;
  norm_slot_t model [9];

  sr_bc_fifo dut (.clk_bc(clk), .rst_n(rst_n), .adv(adv), .slot_i(slot),
                  .window_o(win), .center_valid_o(cv), .center_last_o(cl),
                  .any_valid_o(anyv));

  always #12.5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic ea;
    ea = 1'b0;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (win[i] !== model[i].x) begin
        failures++;
        $display("BC%0d: got %0d expected %0d", i, win[i], model[i].x);
      end
      ea |= model[i].valid;
    end
    checks += 3;
    if (cv !== model[4].valid) failures++;
    if (cl !== model[4].last) failures++;
    if (anyv !== ea) failures++;
  endtask

  initial begin
    slot = '0;
    foreach (model[i]) model[i] = '{valid: 1'b0, last: 1'b0, x: x_t'(sr_ref_pkg::pre(0))};
    repeat (2) @(negedge clk);
    compare();                                    // reset contents
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      slot.valid = ($urandom_range(0, 4) != 0);
      slot.last  = ($urandom_range(0, 7) == 0);
      slot.x     = x_t'($urandom);
      adv        = ($urandom_range(0, 5) != 0);
      if (!adv) stalls++;
      @(posedge clk);
      if (adv) begin
        for (int i = 0; i < 8; i++) model[i] = model[i+1];
        model[8].valid = slot.valid;
        model[8].last  = slot.valid & slot.last;
        model[8].x     = slot.valid ? slot.x : x_t'(sr_ref_pkg::pre(0));
      end
      #1 compare();
    end
    // a marked sample moves from BC8 to BC4 in four shifts
    @(negedge clk);
    adv = 1'b1; slot = '{valid: 1'b1, last: 1'b1, x: 16'sd1234};
    @(negedge clk);
    slot = '0;
    checks++;
    if (win[8] != 16'sd1234) failures++;
    repeat (4) @(negedge clk);
    checks++;
    if (!(win[4] == 16'sd1234 && cv && cl)) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
