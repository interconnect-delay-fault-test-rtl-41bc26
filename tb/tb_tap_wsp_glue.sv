// tb_tap_wsp_glue: walks a TAP controller through random TMS sequences and
// checks the WSC made by the glue: WRCK = TCK, WSI = TDI, WRSTN = reset,
// SelectWIR = Select, UpdateWR high in Update-IR/DR, and ShiftWR / CaptureWR
// equal to "was in Shift / Capture state" at the last falling TCK edge.
module tb_tap_wsp_glue;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;
  logic tck = 1'b0, tms = 1'b1, trst_n = 1'b1, tdi = 1'b0;
  tap_state_e state;
  logic clock_dr, shift_dr, update_dr, clock_ir, shift_ir, update_ir, select, reset_n, tdo, tdo_en;
  logic s_cdr, s_sdr, s_udr, s_cir, s_sir, s_uir;
  logic wrck, wrstn, wsi, shiftwr, capturewr, updatewr, selectwir;
  logic exp_shift, exp_cap;
  int checks = 0, failures = 0;

  tap_controller u_tap (
    .tck, .tms, .trst_n, .tdo_d(1'b0), .state, .clock_dr, .shift_dr, .update_dr,
    .clock_ir, .shift_ir, .update_ir, .select, .reset_n, .tdo, .tdo_en,
    .st_capture_dr(s_cdr), .st_shift_dr(s_sdr), .st_update_dr(s_udr),
    .st_capture_ir(s_cir), .st_shift_ir(s_sir), .st_update_ir(s_uir)
  );
  tap_wsp_glue dut (
    .tck, .tdi, .reset_n, .select,
    .st_capture_dr(s_cdr), .st_shift_dr(s_sdr), .st_update_dr(s_udr),
    .st_capture_ir(s_cir), .st_shift_ir(s_sir), .st_update_ir(s_uir),
    .wrck, .wrstn, .wsi, .shiftwr, .capturewr, .updatewr, .selectwir
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1 trst_n = 0; #1;
    check(!wrstn && !shiftwr && !capturewr, "reset");
    trst_n = 1;
    repeat (2000) begin
      tms = ($urandom_range(0, 99) < 40); tdi = $urandom_range(0, 1);
      #1 check(wsi == tdi && wrck == tck, "WSI/WRCK");
      #4 tck = 1;
      #1 check(updatewr == (state inside {UPDATE_DR, UPDATE_IR}), "UpdateWR");
      exp_shift = state inside {SHIFT_DR, SHIFT_IR};
      exp_cap   = state inside {CAPTURE_DR, CAPTURE_IR};
      #4 tck = 0;
      #1 check(shiftwr == exp_shift && capturewr == exp_cap, "ShiftWR/CaptureWR");
      check(selectwir == select && wrstn == reset_n && wrck == 0, "SelectWIR/WRSTN/WRCK");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
