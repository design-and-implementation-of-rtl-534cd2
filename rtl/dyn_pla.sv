// dyn_pla - behavioural timing model of one precharged NOR-NOR PLA.
//
// Behavioural model, not synthesizable: the real block is a dynamic circuit
// running below threshold, whose delay depends on the NMOS body (Nbulk) bias.
//
// Function (NOR-NOR form): every input drives two bit-lines, its true and its
// complement. A wordline (cube) stays high in evaluation only if none of the
// bit-lines connected to it (AND_PLANE) is high; an output line is pulled
// low if any wordline connected to it (OR_PLANE) stays high. To implement a
// cube l1 & l2 connect the complements of l1 and l2.
//
// Timing, as in the published PLA:
//   clk low  (precharge): after TPCHG all lines are precharged - outputs
//                         read 1 and completion reads 0.
//   clk high (evaluate):  after TEVAL the outputs take their evaluated value
//                         and completion rises (it is driven by the maximally
//                         loaded dummy wordline, so it is the last to switch).
//   clkout = completion & clk clocks the next PLA of a multilevel network.
// If clk falls before TEVAL has elapsed the evaluation is lost and the PLA
// stays precharged for that cycle.
//
// Both delays are scaled by VB_HALF_MV / (VB_HALF_MV + bulk_mv): a forward
// body bias of VB_HALF_MV halves them. They are also scaled by
// (VDD_NOM_MV / vdd_mv)^2, because the measured maximum speed grows with the
// square of the supply over the 0.4-0.62 V range. The 35 ns / 45 ns delays at
// zero bias and the nominal 0.6 V supply follow the published 8-input,
// 6-output, 12-cube PLA; the bias law is this model's own simple choice.
// Both bulk_mv and vdd_mv are sampled when the delay starts.
module dyn_pla #(
  parameter int unsigned N_IN   = 8,
  parameter int unsigned N_OUT  = 6,
  parameter int unsigned N_CUBE = 12,
  parameter logic [N_CUBE-1:0][2*N_IN-1:0] AND_PLANE = '0,  // [cube][2*i] true, [2*i+1] complement of input i
  parameter logic [N_OUT-1:0][N_CUBE-1:0]  OR_PLANE  = '0,  // [output][cube]
  parameter int unsigned TEVAL_PS   = 35000,
  parameter int unsigned TPCHG_PS   = 45000,
  parameter int unsigned VB_HALF_MV = 450,
  parameter int unsigned VDD_NOM_MV = 600
) (
  input  logic              clk,
  input  logic [N_IN-1:0]   pla_in,
  input  logic [9:0]        bulk_mv,
  input  logic [9:0]        vdd_mv,     // PLA supply in mV
  output logic [N_OUT-1:0]  pla_out,
  output logic              completion,
  output logic              clkout
);
  timeunit 1ns; timeprecision 1ps;

  function automatic logic [N_OUT-1:0] evaluate(input logic [N_IN-1:0] x);
    logic [2*N_IN-1:0]   bitline;
    logic [N_CUBE-1:0]   wordline;
    logic [N_OUT-1:0]    y;
    for (int i = 0; i < int'(N_IN); i++) begin
      bitline[2*i]   = x[i];
      bitline[2*i+1] = ~x[i];
    end
    for (int k = 0; k < int'(N_CUBE); k++)
      wordline[k] = ~|(bitline & AND_PLANE[k]);
    for (int j = 0; j < int'(N_OUT); j++)
      y[j] = ~|(wordline & OR_PLANE[j]);
    return y;
  endfunction

  function automatic int unsigned scaled_ps(input int unsigned t_ps, input logic [9:0] vb,
                                            input logic [9:0] vdd);
    real t, v;
    v = (vdd == '0) ? 1.0 : real'(vdd);  // a dead supply gives a near-infinite delay
    t = real'(t_ps) * real'(VB_HALF_MV) / real'(VB_HALF_MV + int'(vb));
    t = t * (real'(VDD_NOM_MV) / v) * (real'(VDD_NOM_MV) / v);
    return int'($rtoi(t + 0.5));
  endfunction

  int unsigned d_ps;

  initial begin
    pla_out    = '1;
    completion = 1'b0;
    forever begin
      @(posedge clk);
      d_ps = scaled_ps(TEVAL_PS, bulk_mv, vdd_mv);
      #(d_ps * 1ps);
      if (clk) begin
        pla_out    = evaluate(pla_in);
        completion = 1'b1;
        @(negedge clk);
      end
      d_ps = scaled_ps(TPCHG_PS, bulk_mv, vdd_mv);
      #(d_ps * 1ps);
      pla_out    = '1;
      completion = 1'b0;
    end
  end

  assign clkout = completion & clk;

endmodule
