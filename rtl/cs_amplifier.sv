// cs_amplifier - behavioural model of the common-source output amplifier and
// the antenna pass gate.
//
// Behavioural model, not synthesizable: the real block is a single NMOS in
// common-source configuration whose gate is biased directly by the DC level
// of the DAC output, with external source and drain resistors, running from
// the 0.6 V supply. It inverts and amplifies. This model uses the
// small-signal law
//     out = VOUT_Q - GAIN_X100/100 * (in - VIN_Q)
// clamped to 0..VDD_UV; gain and operating point are this model's choice.
// The output reaches the on-chip antenna through a pass gate enabled by
// anton; with the gate off the antenna node reads 0. Instantaneous response.
module cs_amplifier #(
  parameter int unsigned GAIN_X100 = 150,
  parameter int unsigned VIN_Q_UV  = 220000,
  parameter int unsigned VOUT_Q_UV = 300000,
  parameter int unsigned VDD_UV    = 600000
) (
  input  logic [19:0] in_uv,
  input  logic        anton,
  output logic [19:0] out_uv,
  output logic [19:0] antenna_uv
);
  timeunit 1ns; timeprecision 1ps;

  longint v;

  always_comb begin
    v = longint'(VOUT_Q_UV)
        - (longint'(GAIN_X100) * (longint'(in_uv) - longint'(VIN_Q_UV))) / 100;
    if (v < 0)                v = 0;
    if (v > longint'(VDD_UV)) v = longint'(VDD_UV);
    out_uv     = 20'(v);
    antenna_uv = anton ? out_uv : '0;
  end

endmodule
