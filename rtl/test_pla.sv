// test_pla - stand-alone test PLA whose two outputs toggle with the clock.
//
// Behavioural model, not synthesizable. A lone PLA on the chip lets the basic
// building block be checked without the rest of the modulator: with a clock
// applied, its two outputs (Testplaout1/2) go high in every precharge phase
// and low in every evaluation. The personality used here is this design's
// choice: cubes 0 and 1 have no bit-line connected, so their wordlines stay
// high in each evaluation and pull outputs 0 and 1 low. The PLA inputs are
// tied low (the chip has no input pins for them).
// Timing: outputs fall TEVAL after clk rises and rise TPCHG after it falls.
module test_pla (
  input  logic       clk,
  input  logic [9:0] bulk_mv,
  input  logic [9:0] vdd_mv,
  output logic       testplaout1,
  output logic       testplaout2
);
  timeunit 1ns; timeprecision 1ps;

  logic [5:0] pla_out;
  logic       completion;
  logic       clkout;

  dyn_pla #(
    .OR_PLANE({12'h000, 12'h000, 12'h000, 12'h000, 12'h002, 12'h001})
  ) u_pla (
    .clk       (clk),
    .pla_in    (8'h00),
    .bulk_mv   (bulk_mv),
    .vdd_mv    (vdd_mv),
    .pla_out   (pla_out),
    .completion(completion),
    .clkout    (clkout)
  );

  assign testplaout1 = pla_out[0];
  assign testplaout2 = pla_out[1];

endmodule
