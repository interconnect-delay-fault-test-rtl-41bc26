// tb_core_wrapper: one IEEE 1500 wrapper with two clock domains (5 ns and
// 8 ns), reached through a TAP controller and the TAP-to-WSP glue. Each
// domain's output cell is looped back to its input cell through a 1 ns wire,
// or a 10 ns one when made slow. Checks WIR capture, WBY length, EXTEST,
// INTEST, Core_IDFT_Mode, Delay_EXTEST launch-to-capture of one core clock in
// each domain, and detection of the slow wire.
// Wrapper cells from WSI: 0 d0-in, 1 d0-out, 2 d1-in, 3 d1-out.
module tb_core_wrapper;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;
  localparam int LEN = 4;
  localparam real PER [2] = '{5.0, 8.0};

  logic tck, tms, tdi, trst_n, tdo, tdo_en;
  tap_state_e state;
  logic clock_dr, shift_dr, update_dr, clock_ir, shift_ir, update_ir, select, reset_n;
  logic s_cdr, s_sdr, s_udr, s_cir, s_sir, s_uir;
  logic wrck, wrstn, wsi, shiftwr, capturewr, updatewr, selectwir, wso;
  logic clk_a = 1'b0, clk_b = 1'b0;
  logic [1:0] core_clk, wpi, to_core, wpo, updr, capdr, slow = '0;
  logic [1:0] from_core = 2'b10;
  logic core_idft_mode;
  int checks = 0, failures = 0;

  jtag_driver #(.HALF(5)) u_drv (.tck, .tms, .tdi, .trst_n, .tdo);
  tap_controller u_tap (
    .tck, .tms, .trst_n, .tdo_d(wso), .state, .clock_dr, .shift_dr, .update_dr,
    .clock_ir, .shift_ir, .update_ir, .select, .reset_n, .tdo, .tdo_en,
    .st_capture_dr(s_cdr), .st_shift_dr(s_sdr), .st_update_dr(s_udr),
    .st_capture_ir(s_cir), .st_shift_ir(s_sir), .st_update_ir(s_uir)
  );
  tap_wsp_glue u_glue (
    .tck, .tdi, .reset_n, .select,
    .st_capture_dr(s_cdr), .st_shift_dr(s_sdr), .st_update_dr(s_udr),
    .st_capture_ir(s_cir), .st_shift_ir(s_sir), .st_update_ir(s_uir),
    .wrck, .wrstn, .wsi, .shiftwr, .capturewr, .updatewr, .selectwir
  );
  core_wrapper #(.N_DOM(2), .N_IN(1), .N_OUT(1)) dut (
    .wrck, .wrstn, .shiftwr, .capturewr, .updatewr, .selectwir, .wsi, .wso,
    .core_clk, .wpi, .to_core, .from_core, .wpo, .core_idft_mode, .updr, .capdr
  );

  always #2.5 clk_a = ~clk_a;
  always #4.0 clk_b = ~clk_b;
  assign core_clk = {clk_b, clk_a};

  for (genvar d = 0; d < 2; d++) begin : g_wire
    logic w_fast, w_slow;
    always @(wpo[d]) w_fast <= #1 wpo[d];
    always @(wpo[d]) w_slow <= #10 wpo[d];
    assign wpi[d] = slow[d] ? w_slow : w_fast;
    realtime t_up; logic armed = 1'b0; realtime interval = 0;
    always @(posedge updr[d]) if (core_idft_mode) begin t_up = $realtime; armed = 1'b1; end
    always @(posedge capdr[d]) if (armed) begin interval = $realtime - t_up; armed = 1'b0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [255:0] word(input logic o0, input logic o1);
    return 256'({1'b0, o0, 1'b0, o1});  // cells 0..3 = d0in d0out d1in d1out
  endfunction

  logic [255:0] o;

  initial begin
    u_drv.reset();
    u_drv.ir_scan(WIR_LEN, 256'(WS_BYPASS), o);
    check(o[1:0] == 2'b01, "WIR capture pattern");
    u_drv.dr_scan(8, 256'hC5, o);
    check(o[7:0] == 8'h8A, "WBY one bit");

    u_drv.ir_scan(WIR_LEN, 256'(WS_EXTEST), o);
    u_drv.dr_scan(LEN, word(1, 0), o);
    check(wpo == 2'b01, "EXTEST drives wrapper outputs");
    u_drv.dr_scan(LEN, word(0, 1), o);
    check(o[3] == 1 && o[1] == 0, "EXTEST captures wrapper inputs");
    check(o[2] == from_core[0] && o[0] == from_core[1], "EXTEST captures core outputs");

    u_drv.ir_scan(WIR_LEN, 256'(WS_INTEST), o);
    u_drv.dr_scan(LEN, 256'({1'b1, 1'b0, 1'b0, 1'b0}), o);
    check(to_core == 2'b01 && wpo == from_core, "INTEST drives the core");

    u_drv.ir_scan(WIR_LEN, 256'(WS_DELAY_EXTEST), o);
    check(core_idft_mode, "Core_IDFT_Mode");
    u_drv.dr_scan(LEN, word(0, 0), o, 60);
    u_drv.dr_scan(LEN, word(1, 1), o, 60);
    check(g_wire[0].interval == PER[0], $sformatf("domain 0 interval %0t", g_wire[0].interval));
    check(g_wire[1].interval == PER[1], $sformatf("domain 1 interval %0t", g_wire[1].interval));
    u_drv.dr_scan(LEN, word(1, 1), o, 60);
    check(o[3] == 1 && o[1] == 1, "rising transitions captured");
    slow = 2'b10;
    u_drv.dr_scan(LEN, word(0, 0), o, 60);
    u_drv.dr_scan(LEN, word(0, 0), o, 60);
    check(o[3] == 0, "domain 0 in time");
    check(o[1] == 1, "domain 1 slow wire caught");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
