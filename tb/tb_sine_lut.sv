// tb_sine_lut - exhaustive check of the NCO sine table.
// Every one of the 512 phases is compared with the full-wave formula
// 128 + floor(127.5*sin) / 127 - floor(127.5*|sin|) evaluated at (p + 0.5),
// computed here without any quadrant folding, and with the ideal sine
// 127.5 + 127.5*sin to within half a step.
module tb_sine_lut;
  timeunit 1ns; timeprecision 1ps;

  logic [8:0] phase;
  logic [7:0] sample;
  int checks = 0, failures = 0;

  sine_lut dut (.phase(phase), .sample(sample));

  function automatic int expected(int p);
    real s;
    s = $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 512.0);
    if (s >= 0.0) return 128 + $rtoi($floor(127.5 * s));
    else          return 127 - $rtoi($floor(-127.5 * s));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ideal, err;
    for (int p = 0; p < 512; p++) begin
      phase = 9'(p);
      #1;
      checks++;
      if (int'(sample) != expected(p)) begin
        failures++;
        $display("phase %0d: sample %0d expected %0d", p, sample, expected(p));
      end
      ideal = 127.5 + 127.5 * $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 512.0);
      err   = real'(sample) - ideal;
      checks++;
      if (err > 0.51 || err < -0.51) begin
        failures++;
        $display("phase %0d: sample %0d far from ideal %f", p, sample, ideal);
      end
    end
    // symmetry spot checks: peak near phase 128, trough near 384
    phase = 9'd127; #1; checks++; if (sample != 8'd255) failures++;
    phase = 9'd383; #1; checks++; if (sample != 8'd0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
