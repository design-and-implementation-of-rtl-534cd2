// tb_test_pla - the two test outputs must toggle once per clock: high after
// each precharge, low after each evaluation, over 50 clock cycles.
module tb_test_pla;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [9:0] bulk_mv = '0;
  logic [9:0] vdd_mv = 10'd600;
  logic       testplaout1, testplaout2;
  int checks = 0, failures = 0;
  int falls1 = 0, falls2 = 0;

  test_pla dut (.*);

  always #250 clk = ~clk;
  always @(negedge testplaout1) falls1++;
  always @(negedge testplaout2) falls2++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 50; c++) begin
      @(posedge clk); #200;
      checks++;
      if (testplaout1 || testplaout2) failures++;
      @(negedge clk); #200;
      checks++;
      if (!testplaout1 || !testplaout2) failures++;
    end
    checks++;
    if (falls1 != 50 || falls2 != 50) begin
      failures++;
      $display("toggles %0d %0d", falls1, falls2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
