// pad_io_ctrl - direction control of the eight bidirectional test pins.
//
// The published chip routes the 8-bit NCO sample to eight bidirectional pads
// so that the digital modulator and the DAC can be tested, or used, apart:
//   sdrouten = 1, dacin = 0 : the pads drive out the NCO sample
//   dacin = 1               : the pads are inputs and their value feeds the
//                             thermometer converter in place of the NCO
//   both 0                  : the pads are idle (driver off), normal operation
// When both enables are high, dacin wins and the driver stays off, so the
// pads are never driven while they are being read (this design's choice).
// The pad driver itself is outside this block: pad_oe enables it, pad_out is
// the value it drives and pad_in is what the input buffer sees.
// Purely combinational.
module pad_io_ctrl #(
  parameter int unsigned W = 8
) (
  input  logic         sdrouten,
  input  logic         dacin,
  input  logic [W-1:0] nco_out,
  input  logic [W-1:0] pad_in,
  output logic [W-1:0] pad_out,
  output logic         pad_oe,
  output logic         ext_sel,
  output logic [W-1:0] ext_code
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    pad_oe   = sdrouten & ~dacin;
    pad_out  = pad_oe ? nco_out : '0;
    ext_sel  = dacin;
    ext_code = dacin ? pad_in : '0;
  end

  // the pins are never driven while the chip reads them
  always_comb assert (!(pad_oe && dacin)) else $error("test pins driven in DAC-input mode");

endmodule
