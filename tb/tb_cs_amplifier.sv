// tb_cs_amplifier - checks the inverting common-source amplifier model and
// the antenna pass gate: out = 0.3 V - 1.5 x (in - 0.22 V), clamped to
// 0..0.6 V; the antenna follows out only while anton is high.
module tb_cs_amplifier;
  timeunit 1ns; timeprecision 1ps;

  logic [19:0] in_uv, out_uv, antenna_uv;
  logic        anton;
  int checks = 0, failures = 0;

  cs_amplifier dut (.*);

  task automatic check(input int vin, input bit on, input int exp_out);
    in_uv = 20'(vin); anton = on;
    #1;
    checks++;
    if (int'(out_uv) != exp_out) begin failures++; $display("in %0d: out %0d exp %0d", vin, out_uv, exp_out); end
    checks++;
    if (int'(antenna_uv) != (on ? exp_out : 0)) begin failures++; $display("antenna %0d", antenna_uv); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(220000, 1, 300000);   // operating point
    check(320000, 1, 150000);   // +0.1 V in -> -0.15 V out
    check(120000, 0, 450000);
    check(0,      1, 600000);   // clamps at VDD
    check(439875, 1, 0);        // clamps at ground
    check(200000, 0, 330000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
