// tb_dyn_pla - checks the dynamic NOR-NOR PLA model.
// Personality under test (8 inputs, 6 outputs, 12 cubes):
//   cube 0 = x0 & x1  (complements of x0, x1 on its wordline)
//   cube 1 = ~x2      (true x2 on its wordline)
//   cube 2 = x3 & ~x4 & x7
//   out0 = NOR(cube0)          = ~(x0 & x1)
//   out1 = NOR(cube0, cube1)   = ~(x0 & x1 | ~x2)
//   out2 = NOR(cube2)
// Outputs must read 1 in precharge, the NOR-NOR value after TEVAL, completion
// must rise TEVAL after clk rises and fall TPCHG after clk falls, clkout must
// equal completion & clk, delays must halve at 450 mV bulk bias, and an
// evaluation cut short by clk falling must leave the PLA precharged. At half
// the 0.6 V supply both delays must grow fourfold (140 ns and 180 ns).
module tb_dyn_pla;
  timeunit 1ns; timeprecision 1ps;

  localparam logic [11:0][15:0] AND_P = {
    {9{16'h0000}}, 16'b1000_0001_1000_0000, 16'b0000_0000_0001_0000, 16'b0000_0000_0000_1010};
  localparam logic [5:0][11:0] OR_P = {12'h000, 12'h000, 12'h000, 12'h004, 12'h003, 12'h001};

  logic       clk = 1'b0;
  logic [7:0] pla_in = '0;
  logic [9:0] bulk_mv = '0;
  logic [9:0] vdd_mv = 10'd600;
  logic [5:0] pla_out;
  logic       completion, clkout;
  int checks = 0, failures = 0;
  realtime t_rise, t_done;

  dyn_pla #(.AND_PLANE(AND_P), .OR_PLANE(OR_P)) dut (.*);

  always @(posedge completion) t_done = $realtime;

  function automatic logic [5:0] ref_out(logic [7:0] x);
    logic c0, c1, c2;
    c0 = x[0] & x[1];
    c1 = ~x[2];
    c2 = x[3] & ~x[4] & x[7];
    return {3'b111, ~c2, ~(c0 | c1), ~c0};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $realtime, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    for (int n = 0; n < 64; n++) begin
      pla_in = 8'($urandom);
      bulk_mv = (n % 2 == 0) ? 10'd0 : 10'd450;
      #10;
      check(pla_out == 6'h3f && !completion, "not precharged");
      clk = 1'b1; t_rise = $realtime;
      #5;
      check(clkout == 1'b0, "clkout before completion");
      #300;
      check(completion && clkout, "no completion");
      check(pla_out == ref_out(pla_in), $sformatf("eval %h: out %b exp %b", pla_in, pla_out, ref_out(pla_in)));
      check((bulk_mv == 0) ? (t_done - t_rise == 35.0) : (t_done - t_rise == 17.5),
            $sformatf("eval delay %0t at %0d mV", t_done - t_rise, bulk_mv));
      clk = 1'b0;
      #1;
      check(!clkout, "clkout after clk fall");
      check(completion, "precharge too fast");
      #100;
      check(!completion && pla_out == 6'h3f, "precharge not done");
    end
    // short evaluation: clk high for 20 ns < 35 ns
    bulk_mv = '0;
    clk = 1'b1; #20; clk = 1'b0; #30;
    check(!completion && pla_out == 6'h3f, "short evaluation completed");
    #100;
    check(!completion, "late completion");
    // supply at 300 mV: delays x4
    vdd_mv = 10'd300;
    clk = 1'b1; t_rise = $realtime;
    #139;
    check(!completion, "evaluation too fast at 300 mV");
    #2;
    check(completion && t_done - t_rise == 140.0,
          $sformatf("eval delay %0t at 300 mV supply", t_done - t_rise));
    clk = 1'b0;
    #179;
    check(completion, "precharge too fast at 300 mV");
    #2;
    check(!completion, "precharge too slow at 300 mV");
    vdd_mv = 10'd600;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
