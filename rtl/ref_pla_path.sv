// ref_pla_path - reference delay path of the body-bias compensation loop.
//
// Behavioural model, not synthesizable. In a network of PLAs every PLA
// precharges together while CLK is low; in evaluation the first PLA is
// clocked by CLK and each following one by the CLKOUT (completion AND clock)
// of the PLA before it, so evaluations ripple level by level. The published
// design takes the completion of a PLA at logic depth 10 (of 19) as the delay
// monitored by the phase detector, so that the monitored edge falls near the
// middle of the evaluation window.
//
// This model is that cascade of DEPTH PLA timing models sharing one Nbulk
// node. Their logic does not affect the delay (the dummy wordline switches
// in every evaluation), so they carry a fixed personality and tied inputs.
// completion rises DEPTH * TEVAL (scaled by the body bias) after CLK rises.
module ref_pla_path #(
  parameter int unsigned DEPTH    = 10,
  parameter int unsigned TEVAL_PS = 35000,
  parameter int unsigned TPCHG_PS = 45000
) (
  input  logic       clk,
  input  logic [9:0] bulk_mv,
  input  logic [9:0] vdd_mv,
  output logic       completion
);
  timeunit 1ns; timeprecision 1ps;

  logic [DEPTH-1:0] stage_clk;   // clock of each stage: CLK, then the CLKOUT before it
  logic [DEPTH-1:0] stage_clkout;
  logic [DEPTH-1:0] stage_done;

  assign stage_clk = {stage_clkout[DEPTH-2:0], clk};

  for (genvar s = 0; s < int'(DEPTH); s++) begin : g_stage
    logic [5:0] unused_out;
    dyn_pla #(
      .TEVAL_PS(TEVAL_PS),
      .TPCHG_PS(TPCHG_PS),
      .OR_PLANE({6{12'h001}})
    ) u_pla (
      .clk       (stage_clk[s]),
      .pla_in    (8'h00),
      .bulk_mv   (bulk_mv),
      .vdd_mv    (vdd_mv),
      .pla_out   (unused_out),
      .completion(stage_done[s]),
      .clkout    (stage_clkout[s])
    );
  end

  assign completion = stage_done[DEPTH-1];

endmodule
