// tb_npla_throughput - evaluation window of the slowest PLA network.
// The NCO stage is 19 PLA levels deep. At zero body bias a cascade of 19 PLA
// models must complete 19 x 35 ns = 665 ns after CLK rises, so one cycle
// needs 45 ns precharge + 665 ns evaluation = 710 ns (about 1.4 MHz); the
// test leaves 0.5 ns of margin on each phase:
//   - a 711 ns cycle (665.5 ns high) completes in every cycle;
//   - a 650.5 ns cycle (605 ns high) never completes;
//   - at 450 mV forward bias the same depth completes in 332.5 ns, so a
//     cycle of 45.5 + 340 ns runs (about 2.6 MHz).
// It then sweeps the supply over the measured 0.4-0.62 V range at both bulk
// limits (0 and 450 mV), as in the chip's operating-range measurement. For
// each point the expected precharge and evaluation times follow from the
// delay laws of the PLA model. A cycle 1% longer must complete every time and
// one with a 5% shorter evaluation phase never. The resulting maximum clock
// is printed; it grows with the square of the supply.
module tb_npla_throughput;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [9:0] bulk_mv = '0;
  logic [9:0] vdd_mv = 10'd600;
  logic       completion;
  int checks = 0, failures = 0;
  int done_cycles;
  localparam int VDDS [3] = '{400, 500, 620};

  ref_pla_path #(.DEPTH(19)) dut (.clk(clk), .bulk_mv(bulk_mv), .vdd_mv(vdd_mv), .completion(completion));

  always @(posedge completion) done_cycles++;

  task automatic run(input real t_high, input int expect_done, input string what,
                     input real t_low = 45.5);
    done_cycles = 0;
    repeat (20) begin
      #(t_low) clk = 1'b1;
      #(t_high) clk = 1'b0;
    end
    #100;
    checks++;
    if (done_cycles != expect_done) begin
      failures++;
      $display("%s: %0d of 20 cycles completed, expected %0d", what, done_cycles, expect_done);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    run(665.5, 20, "711 ns cycle at 0 mV");
    run(605.0, 0,  "650.5 ns cycle at 0 mV");
    bulk_mv = 10'd450;
    run(340.0, 20, "385 ns cycle at 450 mV");
    run(320.0, 0,  "365 ns cycle at 450 mV");
    foreach (VDDS[i]) begin
      for (int b = 0; b <= 450; b += 450) begin
        real k, t_pchg, t_eval;
        vdd_mv  = 10'(VDDS[i]);
        bulk_mv = 10'(b);
        k = (600.0 / real'(VDDS[i])) * (600.0 / real'(VDDS[i])) * 450.0 / (450.0 + real'(b));
        t_pchg = 45.0 * k;
        t_eval = 19.0 * 35.0 * k;
        run(t_eval * 1.01 + 0.5, 20, $sformatf("%0d mV supply, %0d mV bulk", VDDS[i], b),
            t_pchg * 1.01 + 0.5);
        run(t_eval * 0.95, 0, $sformatf("%0d mV supply, %0d mV bulk, short", VDDS[i], b),
            t_pchg * 1.01 + 0.5);
        $display("supply %0d mV, bulk %0d mV: f_max %0.2f MHz", VDDS[i], b,
                 1000.0 / (t_pchg + t_eval));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
