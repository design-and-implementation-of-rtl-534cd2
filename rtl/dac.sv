// dac - behavioural model of the 19-leg current-steering DAC.
//
// Behavioural model, not synthesizable: the real block is analog. A reference
// current mirror is copied into 19 switched legs whose currents add up in the
// output resistor. The 15 thermometer legs are sized W/L = 20.8 and the four
// binary legs 1.3, 2.6, 5.2 and 10.4, so in units of the smallest leg the
// weights are 16 for each thermometer bit and 1, 2, 4, 8 for the binary bits
// (as published). units is the number of unit currents switched on (0..255,
// equal to the 8-bit sample that produced the code); out_uv is the output
// voltage, units * LSB_UV microvolts. LSB_UV is this model's choice: it puts
// full scale near 0.44 V peak to peak, i.e. 0.22 V peak, the swing the link
// budget asks for. Settling is taken as instantaneous.
module dac
  import bfsk_pkg::*;
#(
  parameter int unsigned LSB_UV = 1725
) (
  input  dac_code_t   dac_code,
  output logic [7:0]  units,
  output logic [19:0] out_uv
);
  timeunit 1ns; timeprecision 1ps;

  int unsigned sum;

  always_comb begin
    sum = 0;
    for (int i = 0; i < int'(THERM_W); i++)
      if (dac_code.therm[i]) sum = sum + (1 << LSB_BITS);
    for (int i = 0; i < int'(LSB_BITS); i++)
      if (dac_code.bin[i]) sum = sum + (1 << i);
    units  = 8'(sum);
    out_uv = 20'(sum * LSB_UV);
  end

endmodule
