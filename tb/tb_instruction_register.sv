// tb_instruction_register: shifts every opcode into the 1149.1 instruction
// register with ClockIR/UpdateIR pulses, checks the capture pattern shifted
// out, the updated instruction and its decoding, and reset to BYPASS.
module tb_instruction_register;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;
  logic clock_ir = 1'b1, update_ir = 1'b0, shift_ir = 1'b0, rst_n = 1'b1, si = 1'b0, so;
  logic [IR_LEN-1:0] ir, got;
  test_ctrl_t ctrl, exp;
  int checks = 0, failures = 0;

  instruction_register dut (.clock_ir, .update_ir, .shift_ir, .rst_n, .si, .so, .ir, .ctrl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask
  task automatic pulse(); #1 clock_ir = 0; #1 clock_ir = 1; #1; endtask

  task automatic load(input logic [IR_LEN-1:0] op, output logic [IR_LEN-1:0] out);
    shift_ir = 0; pulse();                // Capture-IR
    shift_ir = 1;
    for (int i = 0; i < IR_LEN; i++) begin out[i] = so; si = op[i]; pulse(); end
    shift_ir = 0;
    #1 update_ir = 1; #1 update_ir = 0; #1;
  endtask

  initial begin
    #1 rst_n = 0; #1 check(ir == IR_BYPASS, "reset to BYPASS"); rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int op = 0; op < 2**IR_LEN; op++) begin
        load(IR_LEN'(op), got);
        check(got[1:0] == 2'b01, "capture pattern 01");
        check(ir == IR_LEN'(op), "updated instruction");
        exp = '0;
        if (op == IR_EXTEST)       begin exp.sel_bsr = 1; exp.out_mode = 1; end
        if (op == IR_SAMPLE)       exp.sel_bsr = 1;
        if (op == IR_DELAY_EXTEST) begin exp.sel_bsr = 1; exp.out_mode = 1; exp.idft_mode = 1; end
        check(ctrl == exp, $sformatf("decode of %b", op[IR_LEN-1:0]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
