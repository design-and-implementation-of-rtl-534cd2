// tb_phase_detector - checks the NAND/NOR phase detector.
// Static truth table, then two timed scenarios: completion arriving after
// BCLK rises must give one low pullup_n pulse as long as the lag, and
// completion arriving before BCLK must give one pull_dn pulse as long as the
// lead.
module tb_phase_detector;
  timeunit 1ns; timeprecision 1ps;

  logic bclk = 0, completion = 0, pullup_n, pull_dn;
  int checks = 0, failures = 0;
  realtime t_fall, t_rise;
  int up_pulses = 0, dn_pulses = 0;
  realtime up_width, dn_width;
  realtime up_start, dn_start;

  phase_detector dut (.bclk(bclk), .completion(completion), .pullup_n(pullup_n), .pull_dn(pull_dn));

  always @(negedge pullup_n) up_start = $realtime;
  always @(posedge pullup_n) begin up_pulses++; up_width = $realtime - up_start; end
  always @(posedge pull_dn)  dn_start = $realtime;
  always @(negedge pull_dn)  begin dn_pulses++; dn_width = $realtime - dn_start; end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {bclk, completion} = 2'(v);
      #1;
      checks++;
      if (pullup_n != !(bclk && !completion)) failures++;
      checks++;
      if (pull_dn != (!bclk && completion)) failures++;
    end
    bclk = 0; completion = 0; #10;
    up_pulses = 0; dn_pulses = 0;
    // lag: BCLK at 100, completion at 140
    #100 bclk = 1;
    #40  completion = 1;
    #60  bclk = 0; completion = 0;
    #10;
    checks++;
    if (up_pulses != 1 || dn_pulses != 0 || up_width != 40.0) begin
      failures++;
      $display("lag: up=%0d dn=%0d width=%0t", up_pulses, dn_pulses, up_width);
    end
    // lead: completion at 70, BCLK at 100
    #70 completion = 1;
    #30 bclk = 1;
    #60 bclk = 0; completion = 0;
    #10;
    checks++;
    if (up_pulses != 1 || dn_pulses != 1 || dn_width != 30.0) begin
      failures++;
      $display("lead: up=%0d dn=%0d width=%0t", up_pulses, dn_pulses, dn_width);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
