// tb_phase_accumulator - checks the NCO phase register against a reference.
// Random data bits are applied; the phase must advance by 59 (bit 0) or 177
// (bit 1) modulo 512 on every falling edge, reset must clear it, and over 512
// cycles of a constant bit the phase must wrap exactly 59 or 177 times
// (tone frequency f_clk * increment / 512).
module tb_phase_accumulator;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b1, rst = 1'b1, bit_in = 1'b0;
  logic [8:0] phase;
  int checks = 0, failures = 0;
  int ref_phase = 0;

  phase_accumulator dut (.clk(clk), .rst(rst), .bit_in(bit_in), .phase(phase));

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_wraps(input logic b, input int expect_wraps);
    int wraps = 0;
    int prev;
    bit_in = b;
    for (int c = 0; c < 512; c++) begin
      prev = int'(phase);
      @(negedge clk); #1;
      if (int'(phase) < prev) wraps++;
    end
    checks++;
    if (wraps != expect_wraps) begin
      failures++;
      $display("bit %0d: %0d wraps in 512 cycles, expected %0d", b, wraps, expect_wraps);
    end
  endtask

  initial begin
    #25;
    checks++;
    if (phase != 9'd0) failures++;
    @(negedge clk); #1;
    rst = 1'b0;
    @(posedge clk);
    for (int c = 0; c < 2000; c++) begin
      bit_in = 1'($urandom_range(0, 1));
      @(negedge clk);
      ref_phase = (ref_phase + (bit_in ? 177 : 59)) % 512;
      #1;
      checks++;
      if (int'(phase) != ref_phase) begin
        failures++;
        $display("cycle %0d: phase %0d expected %0d", c, phase, ref_phase);
      end
      @(posedge clk);
    end
    count_wraps(1'b0, 59);
    count_wraps(1'b1, 177);
    rst = 1'b1; #1;
    checks++;
    if (phase != 9'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
