// bin2therm - binary to segmented thermometer code converter for the DAC.
//
// The MSB_BITS most significant bits of the sample become a thermometer code
// of 2^MSB_BITS - 1 bits with as many ones, counted from bit 0, as their
// unsigned value; the LSB_BITS low bits pass through as binary. With the
// default 4 + 4 split an 8-bit sample gives 15 + 4 = 19 DAC inputs. A small
// change of the sample then switches few DAC legs, which keeps glitches off
// the analog output. The split follows the published design.
// Purely combinational; the modulator registers its output.
module bin2therm
  import bfsk_pkg::*;
(
  input  logic [NCO_W-1:0] code_in,
  output dac_code_t        dac_code
);
  timeunit 1ns; timeprecision 1ps;

  logic [MSB_BITS-1:0] msb;

  always_comb begin
    msb = code_in[NCO_W-1 -: MSB_BITS];
    for (int i = 0; i < int'(THERM_W); i++)
      dac_code.therm[i] = (int'(msb) > i);
    dac_code.bin = code_in[LSB_BITS-1:0];
  end

endmodule
