// phase_detector - phase detector of the dynamic body-bias compensation loop.
//
// Compares the completion signal of the reference PLA with the beat clock
// BCLK, whose rising edge marks the wanted evaluation delay D after the
// rising edge of CLK:
//   pullup_n = NAND(bclk, ~completion) : low while BCLK is high and the PLA
//              has not completed yet (PLA too slow) - the charge pump then
//              raises the NMOS bulk voltage to speed the PLAs up;
//   pull_dn = NOR(bclk, ~completion)  : high while the PLA has completed
//              but BCLK is still low (PLA too fast) - the charge pump then
//              bleeds charge from the bulk to slow the PLAs down.
// The pulse width equals the phase error. The two gates follow the published
// circuit; completion is taken as rising when evaluation ends.
// Purely combinational (two gates and an inverter).
module phase_detector (
  input  logic bclk,
  input  logic completion,
  output logic pullup_n,
  output logic pull_dn
);
  timeunit 1ns; timeprecision 1ps;

  logic completion_n;

  always_comb begin
    completion_n = ~completion;
    pullup_n     = ~(bclk & completion_n);
    pull_dn     = ~(bclk | completion_n);
  end

  // speed-up and slow-down requests are mutually exclusive
  always_comb assert (pullup_n || !pull_dn) else $error("pullup and pulldown active together");

endmodule
