// tb_dac - the DAC model must switch on as many unit currents as the 8-bit
// sample behind the code (thermometer legs weigh 16, binary legs 1/2/4/8)
// and output units x 1.725 mV, for all 256 samples.
module tb_dac;
  timeunit 1ns; timeprecision 1ps;
  import bfsk_pkg::*;

  dac_code_t   dac_code;
  logic [7:0]  units;
  logic [19:0] out_uv;
  int checks = 0, failures = 0;

  dac dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      dac_code.therm = 15'((1 << (v / 16)) - 1);
      dac_code.bin   = 4'(v % 16);
      #1;
      checks++;
      if (int'(units) != v) begin failures++; $display("code %0d: units %0d", v, units); end
      checks++;
      if (int'(out_uv) != v * 1725) begin failures++; $display("code %0d: out %0d", v, out_uv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
