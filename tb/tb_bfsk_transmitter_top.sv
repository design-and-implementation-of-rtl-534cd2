// tb_bfsk_transmitter_top - end-to-end test of the transmitter at its
// default parameters.
//
// Clk runs at 1.28 MHz (40 x 32 kbit/s) with a long evaluation phase (700 ns
// high, 81.25 ns low) as dynamic PLA logic needs; the beat clock rises D after
// Clk and falls with it. Data bits last 40 clocks. A reference model (own
// phase accumulator, sine formula, thermometer formula, DAC and amplifier
// laws) checks at every falling edge the NCO sample, the DAC code, the DAC
// and amplifier voltages and the antenna node; the standard-cell modulator on
// its own clock is checked the same way. The sequence exercises, and counts:
// both tones and switches between them, the test pins in output mode and in
// DAC-input mode, the antenna pass gate on and off, reset in mid-stream,
// the body-bias loop speeding the PLAs up (BCLK early: pullup pulses, bulk
// rises until the reference completion lines up with BCLK) and slowing them
// down (BCLK late: pulldown pulses, bulk falls), forcing the bulk node, and
// the test PLA toggling. The DAC output must swing 0.22 V peak, the level set
// by the link budget (1 mW into 50 ohm), and the amplifier at least that.
// With BCLK at a fixed delay the logic supply is then
// stepped down and up: the loop must move the bulk the opposite way and keep
// the reference completion locked. Finally BCLK is held high for a run of cycles, which
// must drive the bulk to its forward-bias limit, and then held low, which must
// drain it again. Any mechanism that never happened counts a failure.
module tb_bfsk_transmitter_top;
  timeunit 1ns; timeprecision 1ps;
  import bfsk_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, bit_in = 1'b0, bclk = 1'b0;
  logic        dacin = 1'b0, sdrouten = 1'b0, anton = 1'b1;
  logic [7:0]  pad_in = '0, pad_out;
  logic        pad_oe;
  logic        bulk_force_en = 1'b0;
  logic [9:0]  bulk_force_mv = '0, bulk_mv;
  logic [9:0]  vdd_mv = 10'd600;
  logic        pullup_n, pull_dn, ref_completion;
  logic        testplaout1, testplaout2;
  dac_code_t   dac_code;
  logic [19:0] dac_out_uv, amp_out_uv, antenna_uv;
  logic        clkstd = 1'b0, resetstd = 1'b1, bit_in_std = 1'b0;
  logic [7:0]  stdout;

  bfsk_transmitter_top dut (.*);

  int checks = 0, failures = 0;
  real d_ns = 250.0;  // beat clock delay after the Clk rising edge
  int  bclk_hold = 0; // 0: BCLK follows Clk after d_ns, 1: held high, 2: held low

  // ---------------- output swing, sampled in the middle of each evaluation
  int dac_min = 1 << 30, dac_max = 0, amp_min = 1 << 30, amp_max = 0;
  always @(posedge clk) begin
    #300;
    if (!rst && !dacin) begin
      if (int'(dac_out_uv) < dac_min) dac_min = int'(dac_out_uv);
      if (int'(dac_out_uv) > dac_max) dac_max = int'(dac_out_uv);
      if (int'(amp_out_uv) < amp_min) amp_min = int'(amp_out_uv);
      if (int'(amp_out_uv) > amp_max) amp_max = int'(amp_out_uv);
    end
  end

  // ---------------- clocks
  initial forever begin
    #81.25;
    clk = 1'b1;
    if (bclk_hold == 0) fork begin #(d_ns) if (clk && bclk_hold == 0) bclk = 1'b1; end join_none
    #700;
    clk  = 1'b0;
    bclk = (bclk_hold == 1);
  end
  always #390.625 clkstd = ~clkstd;

  // ---------------- reference models
  function automatic int sine_ref(int p);
    real s;
    s = $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 512.0);
    if (s >= 0.0) return 128 + $rtoi($floor(127.5 * s));
    else          return 127 - $rtoi($floor(-127.5 * s));
  endfunction

  function automatic logic [18:0] code_ref(int v);
    return {15'((1 << (v / 16)) - 1), 4'(v % 16)};
  endfunction

  int exp_phase = 0, exp_nco = 0, exp_units = 0;
  logic [18:0] exp_dac = '0;
  int sphase = 0, snco = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $realtime, what);
    end
  endtask

  // ---------------- mechanism counters
  int n_tone0 = 0, n_tone1 = 0, n_switch = 0, n_padout = 0, n_dacin = 0;
  int n_ant_on = 0, n_ant_off = 0, n_reset = 0, n_up = 0, n_dn = 0;
  int n_force = 0, n_testpla = 0, n_std = 0, n_lock = 0, n_hold_hi = 0, n_hold_lo = 0, n_vdd = 0;
  logic last_bit = 1'b0;

  always @(negedge pullup_n) n_up++;
  always @(posedge pull_dn)  n_dn++;
  always @(negedge testplaout1) if (!testplaout2) n_testpla++;

  // reference completion delay in the latest cycle
  realtime t_clk_rise, comp_delay;
  always @(posedge clk) t_clk_rise = $realtime;
  always @(posedge ref_completion) comp_delay = $realtime - t_clk_rise;

  // sub-threshold modulator checks at each falling Clk edge
  always @(negedge clk) begin
    int src;
    real amp;
    if (rst) begin
      exp_phase = 0; exp_nco = 0; exp_dac = '0; exp_units = 0;
    end else begin
      src       = dacin ? int'(pad_in) : exp_nco;
      exp_dac   = code_ref(src);
      exp_units = src;
      exp_nco   = sine_ref(exp_phase);
      exp_phase = (exp_phase + (bit_in ? 177 : 59)) % 512;
      if (bit_in) n_tone1++; else n_tone0++;
      if (bit_in != last_bit) n_switch++;
      last_bit = bit_in;
      if (dacin) n_dacin++;
    end
    #1;
    check(dac_code == exp_dac, $sformatf("dac code %h expected %h", dac_code, exp_dac));
    check(int'(dac_out_uv) == exp_units * 1725, $sformatf("dac out %0d", dac_out_uv));
    amp = 300000.0 - 1.5 * (real'(exp_units) * 1725.0 - 220000.0);
    if (amp < 0.0) amp = 0.0;
    if (amp > 600000.0) amp = 600000.0;
    check(real'(amp_out_uv) > amp - 1.5 && real'(amp_out_uv) < amp + 1.5,
          $sformatf("amp out %0d expected %f", amp_out_uv, amp));
    check(antenna_uv == (anton ? amp_out_uv : 20'd0), "antenna node");
    if (anton) n_ant_on++; else n_ant_off++;
    if (sdrouten && !dacin) begin
      check(pad_oe && pad_out == 8'(exp_nco), $sformatf("pad out %0d expected %0d", pad_out, exp_nco));
      n_padout++;
    end else begin
      check(!pad_oe, "pads driven while not in output mode");
    end
  end

  // pads follow the NCO register, checked in the middle of the cycle too
  always @(posedge clk) begin
    #10;
    if (!rst) check(int'(dut.nco_out) == exp_nco, "nco sample");
  end

  // standard-cell modulator checks
  always @(negedge clkstd) begin
    if (resetstd) begin
      sphase = 0; snco = 0;
    end else begin
      snco   = sine_ref(sphase);
      sphase = (sphase + (bit_in_std ? 177 : 59)) % 512;
      n_std++;
    end
    #1;
    check(int'(stdout) == snco, $sformatf("stdout %0d expected %0d", stdout, snco));
  end
  always @(posedge clkstd) begin
    #5;
    if (n_std % 40 == 0) bit_in_std = 1'($urandom_range(0, 1));
  end

  // test PLA: low in evaluation, high in precharge
  always @(posedge clk) begin
    #400;
    check(!testplaout1 && !testplaout2, "test PLA not evaluated");
  end

  // ---------------- stimulus
  task automatic run_bits(input int nbits);
    for (int b = 0; b < nbits; b++) begin
      bit_in = 1'($urandom_range(0, 1));
      repeat (40) begin
        @(posedge clk); #20;
        if (dacin) pad_in = 8'($urandom);
      end
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bulk_a, bulk_nom, bulk_lo_vdd, bulk_hi_vdd;
    repeat (3) @(posedge clk);
    #20;
    check(dac_code == '0 && stdout == 8'd0, "reset state");
    rst = 1'b0; resetstd = 1'b0; n_reset++;

    // A: normal transmission, beat clock early -> PLAs are sped up
    d_ns = 250.0;
    run_bits(15);
    bulk_a = int'(bulk_mv);
    check(bulk_a > 50, $sformatf("bulk did not rise: %0d mV", bulk_a));
    check(comp_delay > 200.0 && comp_delay < 330.0,
          $sformatf("reference not locked near BCLK: completion at %0t", comp_delay));
    if (comp_delay > 200.0 && comp_delay < 330.0) n_lock++;

    // B: antenna off, NCO driven onto the test pins, beat clock late -> slow down
    anton = 1'b0;
    sdrouten = 1'b1;
    d_ns = 400.0;
    run_bits(6);
    check(int'(bulk_mv) < bulk_a - 50, $sformatf("bulk did not fall: %0d mV", bulk_mv));
    anton = 1'b1;

    // C: DAC driven from the test pins (sdrouten still set: dacin wins)
    @(posedge clk); #20;
    dacin = 1'b1;
    run_bits(2);
    sdrouten = 1'b0;
    run_bits(1);
    @(posedge clk); #20;
    dacin = 1'b0;

    // D: bulk forced from outside: reference delay 350 ns * 450 / (450 + 300)
    bulk_force_en = 1'b1; bulk_force_mv = 10'd300;
    repeat (3) @(posedge clk);
    #690;
    check(bulk_mv == 10'd300, "bulk force");
    check(comp_delay > 209.0 && comp_delay < 211.0, $sformatf("forced delay %0t", comp_delay));
    n_force++;
    bulk_force_en = 1'b0;

    // E: reset in mid-stream, then resume
    @(posedge clk); #20;
    rst = 1'b1;
    @(posedge clk); #20;
    check(dac_code == '0 && int'(dut.nco_out) == 0, "mid-stream reset");
    rst = 1'b0; n_reset++;
    d_ns = 300.0;
    run_bits(4);

    // G: supply steps with BCLK at a fixed delay
    d_ns = 250.0;
    run_bits(4);
    bulk_nom = int'(bulk_mv);
    vdd_mv = 10'd550;
    run_bits(4);
    bulk_lo_vdd = int'(bulk_mv);
    check(bulk_lo_vdd > bulk_nom + 40,
          $sformatf("supply 550 mV: bulk %0d, was %0d", bulk_lo_vdd, bulk_nom));
    check(comp_delay > 200.0 && comp_delay < 330.0,
          $sformatf("supply 550 mV: completion at %0t", comp_delay));
    vdd_mv = 10'd650;
    run_bits(4);
    bulk_hi_vdd = int'(bulk_mv);
    check(bulk_hi_vdd < bulk_nom - 40,
          $sformatf("supply 650 mV: bulk %0d, was %0d", bulk_hi_vdd, bulk_nom));
    check(comp_delay > 200.0 && comp_delay < 330.0,
          $sformatf("supply 650 mV: completion at %0t", comp_delay));
    if (bulk_lo_vdd > bulk_nom + 40 && bulk_hi_vdd < bulk_nom - 40) n_vdd++;
    vdd_mv = 10'd600;

    // F: BCLK held high, then held low, for a run of cycles each
    @(posedge clk); #20;
    bclk_hold = 1; bclk = 1'b1;
    repeat (12) @(posedge clk);
    #20;
    check(int'(bulk_mv) >= 430, $sformatf("BCLK held high: bulk only %0d mV", bulk_mv));
    if (int'(bulk_mv) >= 430) n_hold_hi++;  // 450 mV less half the ripple
    bclk_hold = 2; bclk = 1'b0;
    repeat (12) @(posedge clk);
    #20;
    check(int'(bulk_mv) <= 10, $sformatf("BCLK held low: bulk still %0d mV", bulk_mv));
    if (int'(bulk_mv) <= 10) n_hold_lo++;
    bclk_hold = 0;

    // output swing against the link budget, V_P = sqrt(1 mW x 50 ohm) ~ 0.22 V
    check((dac_max - dac_min) / 2 > 215000 && (dac_max - dac_min) / 2 < 225000,
          $sformatf("DAC peak %0d uV", (dac_max - dac_min) / 2));
    check((amp_max - amp_min) / 2 >= 220000, $sformatf("amplifier peak %0d uV", (amp_max - amp_min) / 2));

    // every mechanism must have happened
    check(n_tone0 > 0,   "tone 0 never sent");
    check(n_tone1 > 0,   "tone 1 never sent");
    check(n_switch > 0,  "tone never switched");
    check(n_padout > 0,  "test pins never in output mode");
    check(n_dacin > 0,   "DAC never driven from test pins");
    check(n_ant_on > 0 && n_ant_off > 0, "antenna gate not toggled");
    check(n_up > 0,      "no speed-up pulse");
    check(n_dn > 0,      "no slow-down pulse");
    check(n_lock > 0,    "loop never locked");
    check(n_force > 0,   "bulk never forced");
    check(n_testpla > 0, "test PLA never toggled");
    check(n_std > 0,     "standard-cell modulator never ran");
    check(n_reset > 1,   "no mid-stream reset");
    check(n_vdd > 0,     "supply steps not compensated");
    check(n_hold_hi > 0 && n_hold_lo > 0, "held BCLK did not move the bulk");
    $display("tone0=%0d tone1=%0d switches=%0d padout=%0d dacin=%0d ant_on=%0d ant_off=%0d",
             n_tone0, n_tone1, n_switch, n_padout, n_dacin, n_ant_on, n_ant_off);
    $display("pullup=%0d pulldown=%0d lock=%0d force=%0d testpla=%0d std=%0d resets=%0d bulkA=%0d",
             n_up, n_dn, n_lock, n_force, n_testpla, n_std, n_reset, bulk_a);
    $display("peak swing: DAC %0d uV, amplifier %0d uV", (dac_max - dac_min) / 2, (amp_max - amp_min) / 2);
    $display("supply steps: bulk %0d mV at 600, %0d at 550, %0d at 650", bulk_nom, bulk_lo_vdd, bulk_hi_vdd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
