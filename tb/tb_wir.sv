// tb_wir: loads every opcode into the wrapper instruction register through
// the WSC (rising WRCK shift/capture, falling WRCK update), checks the capture
// pattern, the decode, that nothing changes while SelectWIR is low, and reset
// to WS_BYPASS.
module tb_wir;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;
  logic wrck = 1'b0, wrstn = 1'b1, shiftwr = 1'b0, capturewr = 1'b0;
  logic updatewr = 1'b0, selectwir = 1'b1, wsi = 1'b0, wso;
  logic [WIR_LEN-1:0] wir_q, got, held;
  test_ctrl_t ctrl, exp;
  int checks = 0, failures = 0;

  wir dut (.wrck, .wrstn, .shiftwr, .capturewr, .updatewr, .selectwir, .wsi, .wso, .wir_q, .ctrl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask
  task automatic cyc(); #5 wrck = 1; #5 wrck = 0; endtask

  task automatic load(input logic [WIR_LEN-1:0] op, output logic [WIR_LEN-1:0] out);
    capturewr = 1; cyc(); capturewr = 0;
    shiftwr = 1;
    for (int i = 0; i < WIR_LEN; i++) begin out[i] = wso; wsi = op[i]; cyc(); end
    shiftwr = 0;
    updatewr = 1; cyc(); updatewr = 0;
  endtask

  initial begin
    #1 wrstn = 0; #1 check(wir_q == WS_BYPASS, "reset to WS_BYPASS"); wrstn = 1;
    for (int op = 0; op < 2**WIR_LEN; op++) begin
      selectwir = 1;
      load(WIR_LEN'(op), got);
      check(got[1:0] == 2'b01, "capture pattern");
      check(wir_q == WIR_LEN'(op), "updated");
      exp = '0;
      case (WIR_LEN'(op))
        WS_EXTEST:       begin exp.sel_bsr = 1; exp.out_mode = 1; end
        WS_INTEST:       begin exp.sel_bsr = 1; exp.in_mode = 1; end
        WS_DELAY_EXTEST: begin exp.sel_bsr = 1; exp.out_mode = 1; exp.idft_mode = 1; end
        default: ;
      endcase
      check(ctrl == exp, $sformatf("decode of %0d", op));
      // data-side operations leave the WIR alone
      held = wir_q;
      selectwir = 0;
      load(~WIR_LEN'(op), got);
      check(wir_q == held, "no update while SelectWIR = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
