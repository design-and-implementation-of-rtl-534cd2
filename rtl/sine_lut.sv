// sine_lut - sine lookup table of the NCO, using quarter-wave symmetry.
//
// The 9-bit phase addresses one of 512 points of a full sine cycle. Only a
// quarter cycle is stored: a 128-entry table of 7-bit magnitudes
// Q[k] = floor(127.5 * sin(2*pi*(k + 0.5) / 512)). The half-step offset makes
// the quarter exactly mirror-symmetric, so folding is pure bit inversion:
//   phase[7] = 1 (second and fourth quadrants): index = ~phase[6:0]
//   phase[8] = 0 (positive half):  sample = 128 + Q       = {1, Q}
//   phase[8] = 1 (negative half):  sample = 127 - Q       = {0, ~Q}
// giving an unsigned (offset-binary) 8-bit sample centred on 127.5, suited to
// a DAC whose legs can only add current, and within half a step of the ideal
// 127.5 + 127.5 * sin. The table is computed at
// elaboration from the formula above.
//
// The quarter-wave reduction and the 9-bit/8-bit sizes follow the published
// design; the sample encoding and half-step offset are this design's choice.
// Purely combinational; in the modulator its output is registered.
module sine_lut #(
  parameter int unsigned PHASE_W = 9,
  parameter int unsigned NCO_W   = 8
) (
  input  logic [PHASE_W-1:0] phase,
  output logic [NCO_W-1:0]   sample
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IDX_W = PHASE_W - 2;  // quarter-table address bits
  localparam int unsigned MAG_W = NCO_W - 1;    // magnitude bits
  localparam int unsigned DEPTH = 1 << IDX_W;

  typedef logic [DEPTH-1:0][MAG_W-1:0] qtab_t;

  function automatic qtab_t build_quarter();
    qtab_t t;
    real   full;
    real   a;
    full = real'((1 << MAG_W)) - 0.5;  // 127.5 for 8-bit samples
    for (int k = 0; k < int'(DEPTH); k++) begin
      a    = 2.0 * 3.14159265358979323846 * (real'(k) + 0.5) / real'(DEPTH * 4);
      t[k] = MAG_W'($rtoi(full * $sin(a)));  // truncation = floor, value >= 0
    end
    return t;
  endfunction

  localparam qtab_t QTAB = build_quarter();

  logic             half;    // second half of the cycle: negative values
  logic             mirror;  // second or fourth quadrant: read the table backwards
  logic [IDX_W-1:0] idx;
  logic [MAG_W-1:0] mag;

  always_comb begin
    half   = phase[PHASE_W-1];
    mirror = phase[PHASE_W-2];
    idx    = mirror ? ~phase[IDX_W-1:0] : phase[IDX_W-1:0];
    mag    = QTAB[idx];
    sample = half ? {1'b0, ~mag} : {1'b1, mag};
  end

endmodule
