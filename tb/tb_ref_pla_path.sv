// tb_ref_pla_path - checks the 10-level reference PLA cascade: completion
// must rise 10 x 35 ns after CLK at zero bulk bias and 10 x 17.5 ns at 450 mV,
// must fall after CLK falls, and must not rise at all when CLK is high for
// less than the cascade delay.
module tb_ref_pla_path;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [9:0] bulk_mv = '0;
  logic [9:0] vdd_mv = 10'd600;
  logic       completion;
  int checks = 0, failures = 0;
  realtime t_rise, t_done;

  ref_pla_path dut (.*);

  always @(posedge completion) t_done = $realtime;

  task automatic run(input int mv, input real expect_ns);
    bulk_mv = 10'(mv);
    t_done = 0;
    clk = 1'b1; t_rise = $realtime;
    #600;
    checks++;
    if (!completion || t_done - t_rise != expect_ns) begin
      failures++;
      $display("bulk %0d: delay %0t expected %f", mv, t_done - t_rise, expect_ns);
    end
    clk = 1'b0;
    #200;
    checks++;
    if (completion) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    run(0, 350.0);
    run(450, 175.0);
    run(0, 350.0);
    // clock high for 300 ns: the tenth level never completes
    clk = 1'b1; #300;
    checks++;
    if (completion) failures++;
    clk = 1'b0; #200;
    checks++;
    if (completion) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
