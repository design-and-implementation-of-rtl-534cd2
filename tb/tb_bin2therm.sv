// tb_bin2therm - exhaustive check of the 8-bit to 15+4-bit DAC code converter.
// For every input the thermometer field must hold exactly msb ones packed at
// the bottom ((1 << msb) - 1) and the binary field must equal the 4 LSBs;
// the code must also be monotonic in the weighted DAC sum.
module tb_bin2therm;
  timeunit 1ns; timeprecision 1ps;
  import bfsk_pkg::*;

  logic [7:0] code_in;
  dac_code_t  dac_code;
  int checks = 0, failures = 0;

  bin2therm dut (.code_in(code_in), .dac_code(dac_code));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int weighted;
    for (int v = 0; v < 256; v++) begin
      code_in = 8'(v);
      #1;
      checks++;
      if (dac_code.therm != 15'((1 << (v >> 4)) - 1)) begin
        failures++;
        $display("code %0d: therm %b", v, dac_code.therm);
      end
      checks++;
      if (dac_code.bin != 4'(v & 15)) begin
        failures++;
        $display("code %0d: bin %b", v, dac_code.bin);
      end
      weighted = 16 * $countones(dac_code.therm) + int'(dac_code.bin);
      checks++;
      if (weighted != v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
