// tb_pad_io_ctrl - checks the test-pin direction control in all four modes
// with random data: NCO out when sdrouten alone, pins in when dacin, idle
// otherwise, and never driving while dacin is set.
module tb_pad_io_ctrl;
  timeunit 1ns; timeprecision 1ps;

  logic       sdrouten, dacin, pad_oe, ext_sel;
  logic [7:0] nco_out, pad_in, pad_out, ext_code;
  int checks = 0, failures = 0;

  pad_io_ctrl dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mode s=%0d d=%0d: %s", sdrouten, dacin, what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      sdrouten = 1'(n % 4 == 1 || n % 4 == 3);
      dacin    = 1'(n % 4 >= 2);
      nco_out  = 8'($urandom);
      pad_in   = 8'($urandom);
      #1;
      check(pad_oe == (sdrouten && !dacin), "pad_oe");
      if (sdrouten && !dacin) check(pad_out == nco_out, "pad_out != nco_out");
      check(ext_sel == dacin, "ext_sel");
      if (dacin) check(ext_code == pad_in, "ext_code != pad_in");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
