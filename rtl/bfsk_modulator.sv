// bfsk_modulator - digital binary frequency shift keying modulator.
//
// Three combinational stages separated by falling-edge registers, as in the
// published design (there each stage is a network of dynamic PLAs that
// evaluates while clk is high, so its inputs must come from registers that
// change on the falling edge):
//   1. phase accumulator: phase += bit_in ? DTHETA_1 : DTHETA_0   (phase reg)
//   2. NCO sine table:    nco_out = sine(phase)                    (NCO reg)
//   3. thermometer code:  dac_code = bin2therm(sample)             (DAC reg)
// Stage 3 normally takes the NCO register; with ext_sel high it takes
// ext_code instead, which lets the DAC path be driven from the test pins.
//
// Timing: a data bit sampled at falling edge n sets the phase at edge n, the
// NCO sample for that phase appears at edge n+1 and its DAC code at edge
// n+2. One sample per clock. rst (active high, asynchronous - this design's
// choice) clears all three registers.
module bfsk_modulator
  import bfsk_pkg::NCO_W, bfsk_pkg::PHASE_W, bfsk_pkg::dac_code_t;
#(
  parameter int unsigned DTHETA_0 = bfsk_pkg::DTHETA_0,
  parameter int unsigned DTHETA_1 = bfsk_pkg::DTHETA_1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bit_in,
  input  logic             ext_sel,
  input  logic [NCO_W-1:0] ext_code,
  output logic [NCO_W-1:0] nco_out,
  output dac_code_t        dac_code
);
  timeunit 1ns; timeprecision 1ps;

  logic [PHASE_W-1:0] phase;
  logic [NCO_W-1:0]   sample;
  logic [NCO_W-1:0]   therm_src;
  dac_code_t          dac_next;

  phase_accumulator #(
    .PHASE_W (PHASE_W),
    .DTHETA_0(DTHETA_0),
    .DTHETA_1(DTHETA_1)
  ) u_phase (
    .clk   (clk),
    .rst   (rst),
    .bit_in(bit_in),
    .phase (phase)
  );

  sine_lut #(
    .PHASE_W(PHASE_W),
    .NCO_W  (NCO_W)
  ) u_lut (
    .phase (phase),
    .sample(sample)
  );

  always_ff @(negedge clk or posedge rst) begin
    if (rst) nco_out <= '0;
    else     nco_out <= sample;
  end

  assign therm_src = ext_sel ? ext_code : nco_out;

  bin2therm u_therm (
    .code_in (therm_src),
    .dac_code(dac_next)
  );

  always_ff @(negedge clk or posedge rst) begin
    if (rst) dac_code <= '0;
    else     dac_code <= dac_next;
  end

endmodule
