// tb_bfsk_modulator - end-to-end check of the digital modulator.
// A reference model (own phase accumulator, full-wave sine formula and
// thermometer formula) predicts the NCO sample one falling edge after the
// phase and the DAC code two edges after; random data bits are applied,
// then the external input path (ext_sel) and reset. The tone rate is checked
// by counting upward crossings of mid-scale in 512 samples: 59 for data 0,
// 177 for data 1. Phase continuity across bit changes follows from the exact
// match with the reference, whose phase is never reset between bits.
module tb_bfsk_modulator;
  timeunit 1ns; timeprecision 1ps;
  import bfsk_pkg::*;

  logic       clk = 1'b1, rst = 1'b1, bit_in = 1'b0, ext_sel = 1'b0;
  logic [7:0] ext_code = '0, nco_out;
  dac_code_t  dac_code;
  int checks = 0, failures = 0;

  bfsk_modulator dut (.*);

  always #50 clk = ~clk;

  function automatic int sine_ref(int p);
    real s;
    s = $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 512.0);
    if (s >= 0.0) return 128 + $rtoi($floor(127.5 * s));
    else          return 127 - $rtoi($floor(-127.5 * s));
  endfunction

  function automatic logic [18:0] code_ref(int v);
    return {15'((1 << (v / 16)) - 1), 4'(v % 16)};
  endfunction

  int exp_phase = 0, exp_nco = 0;
  logic [18:0] exp_dac = '0;

  // reference pipeline, advanced at every falling edge with the inputs
  // present just before it
  task automatic step_ref();
    int src;
    src       = ext_sel ? int'(ext_code) : exp_nco;
    exp_dac   = code_ref(src);
    exp_nco   = sine_ref(exp_phase);
    exp_phase = (exp_phase + (bit_in ? 177 : 59)) % 512;
  endtask

  task automatic compare(input string where);
    checks++;
    if (int'(nco_out) != exp_nco) begin
      failures++;
      $display("%s: nco %0d expected %0d", where, nco_out, exp_nco);
    end
    checks++;
    if (dac_code != exp_dac) begin
      failures++;
      $display("%s: dac %h expected %h", where, dac_code, exp_dac);
    end
  endtask

  task automatic cycle(input string where);
    @(negedge clk);
    step_ref();
    #1 compare(where);
    @(posedge clk); #5;
  endtask

  task automatic tone_rate(input logic b, input int expect_cross);
    int ncross = 0;
    logic prev_msb;
    bit_in = b;
    cycle("tone");
    prev_msb = nco_out[7];
    for (int c = 0; c < 512; c++) begin
      cycle("tone");
      if (nco_out[7] && !prev_msb) ncross++;
      prev_msb = nco_out[7];
    end
    checks++;
    if (ncross < expect_cross - 1 || ncross > expect_cross + 1) begin
      failures++;
      $display("bit %0d: %0d cycles in 512 samples, expected %0d", b, ncross, expect_cross);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); #1;  // reset held through a clock edge
    checks++;
    if (nco_out != 0 || dac_code != '0) failures++;
    @(posedge clk); #5;
    rst = 1'b0;
    // random data, 40 clocks per bit (f_clk = 40 x bit rate)
    for (int b = 0; b < 30; b++) begin
      bit_in = 1'($urandom_range(0, 1));
      for (int c = 0; c < 40; c++) begin
        cycle("data");
      end
    end
    tone_rate(1'b0, 59);
    tone_rate(1'b1, 177);
    // external DAC input path
    ext_sel = 1'b1;
    for (int c = 0; c < 100; c++) begin
      ext_code = 8'($urandom);
      cycle("ext");
    end
    ext_sel = 1'b0;
    for (int c = 0; c < 5; c++) cycle("back");
    rst = 1'b1; #1;
    checks++;
    if (nco_out != 0 || dac_code != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
