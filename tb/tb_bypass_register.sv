// tb_bypass_register: the bypass bit delays the serial stream by exactly one
// clock while shifting, captures 0, and is cleared by reset.
module tb_bypass_register;
  timeunit 1ns; timeprecision 1ps;
  logic clock_dr = 1'b1, rst_n = 1'b1, shift_dr = 1'b0, si = 1'b0, so;
  logic prev;
  int checks = 0, failures = 0;

  bypass_register dut (.clock_dr, .rst_n, .shift_dr, .si, .so);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask
  task automatic pulse(); #1 clock_dr = 0; #1 clock_dr = 1; #1; endtask

  initial begin
    #1 rst_n = 0; #1 check(so == 0, "reset"); rst_n = 1;
    shift_dr = 1;
    prev = 0;
    repeat (200) begin
      si = $urandom_range(0, 1);
      check(so == prev, "one-bit delay");
      prev = si;
      pulse();
    end
    si = 1; pulse(); check(so == 1, "shifted 1");
    shift_dr = 0; pulse(); check(so == 0, "capture loads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
