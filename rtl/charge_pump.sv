// charge_pump - behavioural model of the body-bias charge pump and Nbulk node.
//
// Behavioural model, not synthesizable: the real block is a PMOS pull-up and
// an NMOS pull-down on the shared NMOS body node (Nbulk) of all PLAs, with a
// 100-180 pF MOS capacitor on that node. While pullup_n is low the PMOS
// pushes charge in (forward bias, PLAs speed up); while pull_dn is high the
// NMOS bleeds charge out (PLAs slow down). Here the node voltage moves at a
// constant slope (UP_UV_PER_NS, DN_UV_PER_NS, this model's choice) while a
// pulse is active and is clamped to 0..VMAX_MV (0.45 V, the upper bias
// reported for the chip). The model is event driven: at every change of its
// inputs it adds the charge of the interval since the previous change, so
// bulk_mv is exact at the end of each pulse and holds between pulses. The
// node can also be forced from outside (the chip brings it out on a
// monitor/force pin): force_en holds it at force_mv. bulk_mv reports the
// voltage in millivolts.
//
// Dummy-wordline coupling: every PLA's dummy wordline swings rail to rail in
// every cycle and couples through its drain-bulk capacitance into Nbulk,
// pulling the node up while clk is low (precharge) and down while clk is high
// (evaluation). With the bulk capacitor in place this ripple is 25 mV
// (RIPPLE_MV), taken from the document's SPICE result; without it, about
// 100 mV. The model adds +RIPPLE_MV/2 during precharge and -RIPPLE_MV/2
// during evaluation to the reported voltage. It is a capacitive (AC)
// coupling, so it does not change the stored charge. A forced node shows no
// ripple. The reported voltage is not clamped to VMAX_MV, only to 0.
module charge_pump #(
  parameter int unsigned VMAX_MV      = 450,
  parameter int unsigned UP_UV_PER_NS = 200,
  parameter int unsigned DN_UV_PER_NS = 200,
  parameter int unsigned INIT_MV      = 0,
  parameter int unsigned RIPPLE_MV    = 25
) (
  input  logic       clk,       // PLA clock, for the dummy-wordline coupling
  input  logic       pullup_n,
  input  logic       pull_dn,
  input  logic       force_en,
  input  logic [9:0] force_mv,
  output logic [9:0] bulk_mv
);
  timeunit 1ns; timeprecision 1ps;

  real     v_uv;
  realtime t_last;
  logic    up_on;   // pump states during the interval since t_last
  logic    dn_on;
  logic    forced;

  initial begin
    v_uv   = real'(INIT_MV) * 1000.0;
    t_last = 0;
    up_on  = 1'b0;
    dn_on  = 1'b0;
    forced = 1'b0;
  end

  always @(pullup_n or pull_dn or force_en or force_mv) begin
    real dt_ns;
    dt_ns = ($realtime - t_last) / 1ns;
    if (!forced) begin
      if (up_on) v_uv = v_uv + dt_ns * real'(UP_UV_PER_NS);
      if (dn_on) v_uv = v_uv - dt_ns * real'(DN_UV_PER_NS);
    end
    if (force_en) v_uv = real'(force_mv) * 1000.0;
    if (v_uv < 0.0)                   v_uv = 0.0;
    if (v_uv > real'(VMAX_MV) * 1000) v_uv = real'(VMAX_MV) * 1000.0;
    t_last = $realtime;
    up_on  = !pullup_n;
    dn_on  = pull_dn;
    forced = force_en;
  end

  real ripple_uv;
  real shown_uv;
  always_comb begin
    ripple_uv = real'(RIPPLE_MV) * 500.0;
    if (force_en)  shown_uv = v_uv;
    else if (clk)  shown_uv = v_uv - ripple_uv;
    else           shown_uv = v_uv + ripple_uv;
    if (shown_uv < 0.0) shown_uv = 0.0;
  end

  assign bulk_mv = 10'($rtoi(shown_uv / 1000.0 + 0.001));

endmodule
