// phase_accumulator - phase register of the BFSK numerically controlled oscillator.
//
// Each falling clock edge the 9-bit phase grows by DTHETA_0 when bit_in is 0
// and by DTHETA_1 when bit_in is 1, wrapping modulo 2^PHASE_W. The NCO output
// frequency is therefore f_clk * DTHETA / 2^PHASE_W. Because only the
// increment changes when the data bit changes, the phase, and with it the
// transmitted tone, stays continuous across bit boundaries.
//
// Timing: registered on the falling edge of clk, as in the published design
// where the dynamic PLA logic evaluates while clk is high. bit_in must be
// stable at the falling edge. rst is active high and asynchronous (the reset
// style is this design's choice) and clears the phase to 0.
module phase_accumulator #(
  parameter int unsigned PHASE_W  = bfsk_pkg::PHASE_W,
  parameter int unsigned DTHETA_0 = bfsk_pkg::DTHETA_0,
  parameter int unsigned DTHETA_1 = bfsk_pkg::DTHETA_1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               bit_in,
  output logic [PHASE_W-1:0] phase
);
  timeunit 1ns; timeprecision 1ps;

  logic [PHASE_W-1:0] step;
  logic [PHASE_W-1:0] phase_next;

  always_comb begin
    step       = bit_in ? PHASE_W'(DTHETA_1) : PHASE_W'(DTHETA_0);
    phase_next = phase + step;  // natural wrap modulo 2^PHASE_W
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) phase <= '0;
    else     phase <= phase_next;
  end

endmodule
