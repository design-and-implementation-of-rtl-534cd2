// tb_bfsk_workload_1mhz - spectrum of the DAC output for the measured
// operating point: Clk = 1 MHz, data alternating 0/1 at 32.25 kHz (31 clocks
// per bit, 2046 samples). A discrete Fourier transform of the DAC output
// voltage, taken here in 500 Hz steps, must show its strongest component
// below 230 kHz within 5 kHz of 1 MHz x 59/512 = 115.2 kHz and its
// strongest component above 230 kHz within 5 kHz of 1 MHz x 177/512 =
// 345.7 kHz (the chip was measured at 113 kHz and 342 kHz). The beat clock is
// held at a fixed delay so the body-bias loop also runs. The same DFT of the
// antenna node then finds the largest component between the two tones, at
// least 50 kHz from each. It must be at least 10 dB below the stronger tone,
// the level that still demodulated in the link simulations (the chip showed
// about 11 dB).
module tb_bfsk_workload_1mhz;
  timeunit 1ns; timeprecision 1ps;
  import bfsk_pkg::*;

  localparam int NS = 2046;  // 33 bit pairs of 31 clocks each

  logic        clk = 1'b0, rst = 1'b1, bit_in = 1'b0, bclk = 1'b0;
  logic [7:0]  pad_out, stdout;
  logic        pad_oe, pullup_n, pull_dn, ref_completion, testplaout1, testplaout2;
  logic [9:0]  bulk_mv;
  dac_code_t   dac_code;
  logic [19:0] dac_out_uv, amp_out_uv, antenna_uv;

  bfsk_transmitter_top dut (
    .clk(clk), .rst(rst), .bit_in(bit_in), .bclk(bclk), .dacin(1'b0), .sdrouten(1'b0),
    .anton(1'b1), .pad_in(8'h00), .pad_out(pad_out), .pad_oe(pad_oe),
    .bulk_force_en(1'b0), .bulk_force_mv(10'd0), .bulk_mv(bulk_mv), .vdd_mv(10'd600), .pullup_n(pullup_n),
    .pull_dn(pull_dn), .ref_completion(ref_completion), .testplaout1(testplaout1),
    .testplaout2(testplaout2), .dac_code(dac_code), .dac_out_uv(dac_out_uv),
    .amp_out_uv(amp_out_uv), .antenna_uv(antenna_uv), .clkstd(1'b0), .resetstd(1'b1),
    .bit_in_std(1'b0), .stdout(stdout));

  int checks = 0, failures = 0;
  real x [NS];
  real y [NS];

  // 1 MHz: 100 ns precharge, 900 ns evaluation; BCLK 300 ns after Clk
  initial forever begin
    #100 clk = 1'b1;
    fork begin #300 if (clk) bclk = 1'b1; end join_none
    #900 clk = 1'b0; bclk = 1'b0;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real power_at(real f_hz, bit of_antenna = 1'b0);
    real re = 0.0, im = 0.0, w, v;
    for (int n = 0; n < NS; n++) begin
      w  = 2.0 * 3.14159265358979323846 * f_hz * real'(n) * 1.0e-6;
      v  = of_antenna ? y[n] : x[n];
      re += v * $cos(w);
      im += v * $sin(w);
    end
    return re * re + im * im;
  endfunction

  initial begin
    real mean, p, best_lo, best_hi, f_lo, f_hi, a_tone, a_mid, f_mid, mid_db;
    repeat (2) @(posedge clk);
    #20 rst = 1'b0;
    // warm-up so the pipeline is full, then record one sample per clock
    for (int n = -4; n < NS; n++) begin
      bit_in = 1'(((n + 4) / 31) % 2);
      @(negedge clk); #2;
      if (n >= 0) begin
        x[n] = real'(dac_out_uv);
        y[n] = real'(antenna_uv);
      end
      @(posedge clk); #20;
    end
    mean = 0.0;
    foreach (x[n]) mean += x[n];
    mean /= real'(NS);
    foreach (x[n]) x[n] -= mean;
    mean = 0.0;
    foreach (y[n]) mean += y[n];
    mean /= real'(NS);
    foreach (y[n]) y[n] -= mean;
    best_lo = 0.0; best_hi = 0.0; f_lo = 0.0; f_hi = 0.0;
    for (int k = 100; k <= 1000; k++) begin  // 50 kHz .. 500 kHz in 500 Hz steps
      p = power_at(real'(k) * 500.0);
      if (k < 460 && p > best_lo) begin best_lo = p; f_lo = real'(k) * 500.0; end
      if (k >= 460 && p > best_hi) begin best_hi = p; f_hi = real'(k) * 500.0; end
    end
    $display("tone peaks: %0.1f kHz and %0.1f kHz", f_lo / 1000.0, f_hi / 1000.0);
    checks++;
    if (f_lo < 110200.0 || f_lo > 120200.0) failures++;
    checks++;
    if (f_hi < 340700.0 || f_hi > 350700.0) failures++;
    checks++;
    if (power_at(230000.0) > 0.1 * best_lo) failures++;  // midpoint well below the tones
    // antenna spectrum: strongest component between the tones vs the tones
    a_tone = power_at(f_lo, 1'b1);
    p = power_at(f_hi, 1'b1);
    if (p > a_tone) a_tone = p;
    a_mid = 0.0; f_mid = 0.0;
    for (real f = f_lo + 50000.0; f <= f_hi - 50000.0; f += 500.0) begin
      p = power_at(f, 1'b1);
      if (p > a_mid) begin a_mid = p; f_mid = f; end
    end
    mid_db = 10.0 * $log10(a_mid / a_tone);
    $display("antenna: largest component between the tones %0.1f dB at %0.1f kHz",
             mid_db, f_mid / 1000.0);
    checks++;
    if (mid_db > -10.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
