// tb_nco_sfdr - spectral purity of the NCO samples for both tones.
//
// With a 9-bit phase accumulator and an 8-bit output, the rule of thumb
// (6 dB per accumulator bit) promises a spurious free dynamic range (SFDR) of
// 54 dB. Both increments, 59 and 177, are odd and so share no factor with
// 512. A tone therefore repeats after exactly 512 samples, and a 512-point
// DFT of one period has no leakage. For each tone the modulator runs with
// constant data. The test collects 512 consecutive samples of nco_out and
// takes the DFT. The tone must fall in bin 59 (or 177). The largest other
// bin, DC excluded, must be at least 54 dB below it.
module tb_nco_sfdr;
  timeunit 1ns; timeprecision 1ps;
  import bfsk_pkg::*;

  localparam int N = 512;

  logic             clk = 1'b0, rst = 1'b1, bit_in = 1'b0;
  logic [NCO_W-1:0] nco_out;
  dac_code_t        dac_code;

  bfsk_modulator dut (
    .clk(clk), .rst(rst), .bit_in(bit_in), .ext_sel(1'b0), .ext_code('0),
    .nco_out(nco_out), .dac_code(dac_code));

  int checks = 0, failures = 0;
  real x [N];

  always #10 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic data, input int tone_bin);
    real re, im, p, p_tone, p_spur, sfdr_db;
    int  spur_bin;
    bit_in = data;
    repeat (4) @(negedge clk);      // let the new increment reach the output
    for (int n = 0; n < N; n++) begin
      @(negedge clk); #1;
      x[n] = real'(nco_out) - 127.5;
    end
    p_tone = 0.0; p_spur = 0.0; spur_bin = -1;
    for (int k = 1; k <= N / 2; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += x[n] * $cos(2.0 * 3.14159265358979323846 * real'(k * n % N) / real'(N));
        im -= x[n] * $sin(2.0 * 3.14159265358979323846 * real'(k * n % N) / real'(N));
      end
      p = re * re + im * im;
      if (k == tone_bin)    p_tone = p;
      else if (p > p_spur) begin p_spur = p; spur_bin = k; end
    end
    sfdr_db = 10.0 * $log10(p_tone / p_spur);
    $display("tone bin %0d: SFDR %0.1f dB (largest spur in bin %0d)", tone_bin, sfdr_db, spur_bin);
    checks++;
    if (p_tone < 1000.0 * p_spur) begin  // anything under 30 dB means the tone is elsewhere
      failures++;
      $display("tone bin %0d is not the strongest component", tone_bin);
    end
    checks++;
    if (sfdr_db < 54.0) begin
      failures++;
      $display("tone bin %0d: SFDR %0.1f dB below 54 dB", tone_bin, sfdr_db);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    measure(1'b0, DTHETA_0);
    measure(1'b1, DTHETA_1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
