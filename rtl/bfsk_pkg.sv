// bfsk_pkg - constants and types shared by the BFSK modulator.
//
// The modulator is a numerically controlled oscillator: a 9-bit phase
// accumulator advances by one of two increments per clock, a sine table turns
// the phase into an 8-bit sample, and the sample is split into a 15-bit
// thermometer code (4 MSBs) and 4 plain binary bits (LSBs) for the 19-leg
// current-steering DAC. Tone frequency is f_clk * increment / 512.
//
// The widths and the increment 59 follow the published design. The second
// increment is 177 = 3 * 59, which gives the stated three-to-one tone ratio.
package bfsk_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned PHASE_W  = 9;    // phase accumulator bits, 512 steps per cycle
  localparam int unsigned NCO_W    = 8;    // sine sample bits
  localparam int unsigned DTHETA_0 = 59;   // increment for data 0 (tone f1)
  localparam int unsigned DTHETA_1 = 177;  // increment for data 1 (tone f2 = 3 * f1)

  localparam int unsigned MSB_BITS = 4;                    // sample bits sent as thermometer code
  localparam int unsigned LSB_BITS = NCO_W - MSB_BITS;     // sample bits kept binary
  localparam int unsigned THERM_W  = (1 << MSB_BITS) - 1;  // 15 thermometer legs
  localparam int unsigned DAC_W    = THERM_W + LSB_BITS;   // 19 DAC inputs

  // Code applied to the DAC current legs.
  typedef struct packed {
    logic [THERM_W-1:0]  therm;  // therm[i] = 1 when the MSB value exceeds i
    logic [LSB_BITS-1:0] bin;    // binary-weighted legs, LSB first weight 1
  } dac_code_t;

endpackage
