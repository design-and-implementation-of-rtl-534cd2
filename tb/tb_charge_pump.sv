// tb_charge_pump - checks the Nbulk charge pump model: a 100 ns pullup pulse
// raises the node by 20 mV, a 50 ns pulldown pulse lowers it by 10 mV,
// the node clamps at 0 and 450 mV, and the force input overrides it.
// clk is held low (precharge) for those checks, so every reading carries the
// +12.5 mV half of the 25 mV dummy-wordline ripple. The ripple itself is then
// checked: 25 mV between the two clock phases, none on a forced node, and a
// reading that never goes below 0.
module tb_charge_pump;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0, pullup_n = 1'b1, pull_dn = 1'b0, force_en = 1'b0;
  logic [9:0] force_mv = '0, bulk_mv;
  int checks = 0, failures = 0;

  charge_pump dut (.*);

  task automatic expect_mv(input int lo, input int hi, input string what);
    checks++;
    if (int'(bulk_mv) < lo || int'(bulk_mv) > hi) begin
      failures++;
      $display("%s: bulk %0d mV, expected %0d..%0d", what, bulk_mv, lo, hi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10.5;
    expect_mv(12, 12, "initial");
    pullup_n = 1'b0; #100; pullup_n = 1'b1; #5;
    expect_mv(31, 33, "after 100 ns pullup");
    pull_dn = 1'b1; #50; pull_dn = 1'b0; #5;
    expect_mv(21, 23, "after 50 ns pulldown");
    #500;
    expect_mv(21, 23, "holds");
    pull_dn = 1'b1; #200; pull_dn = 1'b0; #5;
    expect_mv(12, 12, "clamp low");
    pullup_n = 1'b0; #3000; pullup_n = 1'b1; #5;
    expect_mv(462, 462, "clamp high");
    force_en = 1'b1; force_mv = 10'd123; #5;
    expect_mv(123, 123, "forced");
    pullup_n = 1'b0; #100; pullup_n = 1'b1; #5;
    expect_mv(123, 123, "force overrides pump");
    clk = 1'b1; #5;
    expect_mv(123, 123, "no ripple on a forced node");
    force_en = 1'b0; #5;
    expect_mv(110, 110, "ripple, evaluation phase");
    clk = 1'b0; #5;
    expect_mv(135, 135, "ripple, precharge phase");
    pull_dn = 1'b1; #1000; pull_dn = 1'b0; clk = 1'b1; #5;
    expect_mv(0, 0, "ripple does not go below 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
