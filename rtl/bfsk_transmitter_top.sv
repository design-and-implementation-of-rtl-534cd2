// bfsk_transmitter_top - sub-threshold wireless BFSK transmitter die.
//
// The chip transmits a binary data stream as one of two tones. A digital
// modulator (phase accumulator, sine table, thermometer converter) runs from
// Clk; its 19-bit code drives a current-steering DAC whose output feeds a
// common-source amplifier and, through a pass gate, an on-chip antenna.
// In silicon the modulator is a network of dynamic PLAs running below
// threshold; to make their delay independent of process, voltage and
// temperature a closed loop adjusts the NMOS body bias: the completion of a
// reference PLA (logic depth 10) is compared with the external beat clock,
// and a charge pump raises or lowers the body voltage until the two line up.
//
// Parts and their nature:
//   bfsk_modulator (RTL)          the digital modulator, falling-edge registers
//   pad_io_ctrl    (RTL)          8 bidirectional test pins: NCO out / DAC in
//   phase_detector (RTL)          NAND/NOR phase comparison with BCLK
//   ref_pla_path, charge_pump, test_pla, dac, cs_amplifier
//                  (behavioural)  timing and analog models, not synthesizable
//   second bfsk_modulator (RTL)   the standard-cell copy of the same design on
//                                 its own clock, reset and data pins; only its
//                                 8-bit NCO output leaves the chip
// Analog quantities are carried as integers: bulk voltage in mV, DAC,
// amplifier and antenna voltages in microvolts. The bidirectional pads are
// split into pad_in / pad_out / pad_oe. The sub-threshold logic supply
// (vdd_mv, 0.6 V nominal) enters only the PLA delay models, so a supply step
// shows the loop compensating it.
//
// Timing: one sample per Clk period; data sampled at a falling edge reaches
// the DAC code two falling edges later. The published tones are
// f_clk * 59 / 512 and f_clk * 177 / 512 (f_clk = 40 x 32 kbit/s gives
// 147.5 kHz and 442.5 kHz).
module bfsk_transmitter_top
  import bfsk_pkg::NCO_W, bfsk_pkg::dac_code_t;
#(
  parameter int unsigned DTHETA_0  = bfsk_pkg::DTHETA_0,
  parameter int unsigned DTHETA_1  = bfsk_pkg::DTHETA_1,
  parameter int unsigned REF_DEPTH = 10
) (
  // sub-threshold modulator
  input  logic             clk,
  input  logic             rst,
  input  logic             bit_in,
  input  logic             bclk,
  input  logic             dacin,
  input  logic             sdrouten,
  input  logic             anton,
  input  logic [NCO_W-1:0] pad_in,
  output logic [NCO_W-1:0] pad_out,
  output logic             pad_oe,
  // body-bias loop
  input  logic             bulk_force_en,
  input  logic [9:0]       bulk_force_mv,
  input  logic [9:0]       vdd_mv,         // sub-threshold logic supply, mV
  output logic [9:0]       bulk_mv,
  output logic             pullup_n,
  output logic             pull_dn,
  output logic             ref_completion,
  // test PLA
  output logic             testplaout1,
  output logic             testplaout2,
  // analog path
  output dac_code_t        dac_code,
  output logic [19:0]      dac_out_uv,
  output logic [19:0]      amp_out_uv,
  output logic [19:0]      antenna_uv,
  // standard-cell modulator
  input  logic             clkstd,
  input  logic             resetstd,
  input  logic             bit_in_std,
  output logic [NCO_W-1:0] stdout
);
  timeunit 1ns; timeprecision 1ps;

  logic [NCO_W-1:0] nco_out;
  logic             ext_sel;
  logic [NCO_W-1:0] ext_code;
  logic [7:0]       dac_units;
  dac_code_t        std_dac_code;

  // ---------------- digital modulator and test pins
  bfsk_modulator #(
    .DTHETA_0(DTHETA_0),
    .DTHETA_1(DTHETA_1)
  ) u_mod (
    .clk     (clk),
    .rst     (rst),
    .bit_in  (bit_in),
    .ext_sel (ext_sel),
    .ext_code(ext_code),
    .nco_out (nco_out),
    .dac_code(dac_code)
  );

  pad_io_ctrl #(.W(NCO_W)) u_pads (
    .sdrouten(sdrouten),
    .dacin   (dacin),
    .nco_out (nco_out),
    .pad_in  (pad_in),
    .pad_out (pad_out),
    .pad_oe  (pad_oe),
    .ext_sel (ext_sel),
    .ext_code(ext_code)
  );

  // ---------------- dynamic body-bias compensation loop
  ref_pla_path #(.DEPTH(REF_DEPTH)) u_ref (
    .clk       (clk),
    .bulk_mv   (bulk_mv),
    .vdd_mv    (vdd_mv),
    .completion(ref_completion)
  );

  phase_detector u_pd (
    .bclk      (bclk),
    .completion(ref_completion),
    .pullup_n  (pullup_n),
    .pull_dn  (pull_dn)
  );

  charge_pump u_cp (
    .clk     (clk),
    .pullup_n(pullup_n),
    .pull_dn(pull_dn),
    .force_en(bulk_force_en),
    .force_mv(bulk_force_mv),
    .bulk_mv (bulk_mv)
  );

  test_pla u_test_pla (
    .clk        (clk),
    .bulk_mv    (bulk_mv),
    .vdd_mv     (vdd_mv),
    .testplaout1(testplaout1),
    .testplaout2(testplaout2)
  );

  // ---------------- analog output path
  dac u_dac (
    .dac_code(dac_code),
    .units   (dac_units),
    .out_uv  (dac_out_uv)
  );

  cs_amplifier u_amp (
    .in_uv     (dac_out_uv),
    .anton     (anton),
    .out_uv    (amp_out_uv),
    .antenna_uv(antenna_uv)
  );

  // ---------------- standard-cell copy of the modulator (not connected to the DAC)
  bfsk_modulator #(
    .DTHETA_0(DTHETA_0),
    .DTHETA_1(DTHETA_1)
  ) u_std (
    .clk     (clkstd),
    .rst     (resetstd),
    .bit_in  (bit_in_std),
    .ext_sel (1'b0),
    .ext_code('0),
    .nco_out (stdout),
    .dac_code(std_dac_code)
  );

endmodule
