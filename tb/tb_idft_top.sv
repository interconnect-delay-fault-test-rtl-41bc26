// tb_idft_top: end-to-end test of idft_top at its default (and only) size.
// The SoC and the board run concurrently from two JTAG masters, each through a
// complete Delay_EXTEST operation. Mechanisms counted, each must happen:
//   bypass scans, static EXTEST, INTEST, mode switches into and out of
//   IDFT mode, stretched Update-DR states, per-controller launch/capture
//   intervals of one system clock (6 controllers, 2 SoC clocks + board clock),
//   a delay fault caught on the slow board wire, and the same wire passing
//   static EXTEST.
module tb_idft_top;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;

  // ---------------- stimulus and DUT ----------------
  logic s_tck, s_tms, s_tdi, s_trst_n, s_tdo, s_tdo_en;
  logic b_tck, b_tms, b_tdi, b_trst_n, b_tdo, b_tdo_en;
  logic clk1 = 1'b0, clk2 = 1'b0, sysclk = 1'b0;
  logic [1:0] soc_in = 2'b10, soc_out;
  logic [1:0] c1_to, c2_to, c3_to;
  logic [4:1] nets;
  logic [2:0] cmode;
  logic [3:0] s_updr, s_capdr;
  logic [1:0] b_updr, b_capdr;
  logic b1_out, b1_in, b2_out, b2_in, b1_to, b2_to;
  logic slow = 1'b0, w12_fast, w12_slow, w21;

  jtag_driver #(.HALF(5)) u_sdrv (.tck(s_tck), .tms(s_tms), .tdi(s_tdi), .trst_n(s_trst_n), .tdo(s_tdo));
  jtag_driver #(.HALF(5)) u_bdrv (.tck(b_tck), .tms(b_tms), .tdi(b_tdi), .trst_n(b_trst_n), .tdo(b_tdo));

  idft_top dut (
    .soc_tck(s_tck), .soc_tms(s_tms), .soc_trst_n(s_trst_n), .soc_tdi(s_tdi),
    .soc_tdo(s_tdo), .soc_tdo_en(s_tdo_en), .soc_clk1(clk1), .soc_clk2(clk2),
    .soc_in, .soc_out,
    .soc_c1_to_core(c1_to), .soc_c1_from_core(2'b10),
    .soc_c2_to_core(c2_to), .soc_c2_from_core(2'b01),
    .soc_c3_to_core(c3_to), .soc_c3_from_core(2'b11),
    .soc_nets(nets), .soc_core_idft_mode(cmode), .soc_updr(s_updr), .soc_capdr(s_capdr),
    .brd_tck(b_tck), .brd_tms(b_tms), .brd_trst_n(b_trst_n), .brd_tdi(b_tdi),
    .brd_tdo(b_tdo), .brd_tdo_en(b_tdo_en), .brd_sysclk(sysclk),
    .brd_chip1_pin_out(b1_out), .brd_chip1_pin_in(b1_in),
    .brd_chip2_pin_out(b2_out), .brd_chip2_pin_in(b2_in),
    .brd_chip1_from_core(1'b0), .brd_chip1_to_core(b1_to),
    .brd_chip2_from_core(1'b1), .brd_chip2_to_core(b2_to),
    .brd_updr(b_updr), .brd_capdr(b_capdr)
  );

  always #2.5 clk1   = ~clk1;     // 200 MHz
  always #4.0 clk2   = ~clk2;     // 125 MHz
  always #2.5 sysclk = ~sysclk;   // board system clock
  always @(b1_out) w12_fast <= #1 b1_out;
  always @(b1_out) w12_slow <= #10 b1_out;
  always @(b2_out) w21 <= #1 b2_out;
  assign b2_in = slow ? w12_slow : w12_fast;
  assign b1_in = w21;

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_bypass = 0, n_extest = 0, n_intest = 0, n_mode_on = 0, n_mode_off = 0;
  int n_stretch = 0, n_fault = 0, n_fault_missed_by_extest = 0;
  int n_interval [6] = '{default: 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // launch/capture interval monitors: 4 SoC controllers, 2 board controllers
  logic [5:0] up_v, cap_v, mode_v;
  assign up_v   = {b_updr, s_updr};
  assign cap_v  = {b_capdr, s_capdr};
  assign mode_v = {{2{dut.u_board.u_chip1.idft_mode & dut.u_board.u_chip2.idft_mode}}, {4{&cmode}}};
  localparam real PER [6] = '{5.0, 5.0, 8.0, 8.0, 5.0, 5.0};
  for (genvar i = 0; i < 6; i++) begin : g_mon
    realtime t_up; logic armed = 1'b0;
    always @(posedge up_v[i]) if (mode_v[i]) begin t_up = $realtime; armed = 1'b1; end
    always @(posedge cap_v[i]) if (armed) begin
      armed = 1'b0;
      check($realtime - t_up == PER[i], $sformatf("controller %0d interval %0t", i, $realtime - t_up));
      n_interval[i]++;
    end
  end
  always @(posedge cmode[0]) n_mode_on++;
  always @(negedge cmode[0]) n_mode_off++;

  // ---------------- SoC flow ----------------
  localparam int SL = 12;
  function automatic logic [255:0] sword(input logic [SL-1:0] c);
    logic [255:0] w = '0;
    for (int k = 0; k < SL; k++) w[SL-1-k] = c[k];
    return w;
  endfunction
  function automatic logic [SL-1:0] scells(input logic [255:0] w);
    logic [SL-1:0] c;
    for (int k = 0; k < SL; k++) c[k] = w[SL-1-k];
    return c;
  endfunction
  function automatic logic [SL-1:0] souts(input logic [6:1] o);
    logic [SL-1:0] c = '0;
    c[2] = o[1]; c[3] = o[2]; c[5] = o[3]; c[7] = o[4]; c[10] = o[5]; c[11] = o[6];
    return c;
  endfunction

  task automatic soc_flow();
    logic [255:0] o;
    logic [SL-1:0] c;
    u_sdrv.reset();
    u_sdrv.ir_scan(9, 256'({3{WS_BYPASS}}), o);
    u_sdrv.dr_scan(8, 256'h3C, o);
    check(o[7:0] == 8'(8'h3C << 3), "SoC bypass"); n_bypass++;
    u_sdrv.ir_scan(9, 256'({3{WS_EXTEST}}), o);
    u_sdrv.dr_scan(SL, sword(souts(6'b101010)), o);
    check(nets == 4'b0101, "SoC EXTEST drives nets"); n_extest++;
    u_sdrv.ir_scan(9, 256'({3{WS_INTEST}}), o);
    u_sdrv.dr_scan(SL, sword(12'b0001_0001_0010), o);
    check(c1_to == 2'b10 && c2_to == 2'b01 && c3_to == 2'b01, "SoC INTEST"); n_intest++;
    u_sdrv.ir_scan(9, 256'({3{WS_DELAY_EXTEST}}), o);
    check(cmode == 3'b111, "SoC Delay_EXTEST mode");
    u_sdrv.dr_scan(SL, sword(souts(6'b000000)), o, 60); n_stretch++;
    u_sdrv.dr_scan(SL, sword(souts(6'b011110)), o, 60); n_stretch++;
    u_sdrv.dr_scan(SL, sword(souts(6'b011110)), o, 60); n_stretch++;
    c = scells(o);
    check(c[1] && c[4] && c[6] && c[8], "SoC nets 1-4 captured within one clock");
    u_sdrv.ir_scan(9, 256'({3{WS_BYPASS}}), o);
    check(cmode == 3'b000, "SoC back to bypass");
  endtask

  // ---------------- board flow ----------------
  function automatic logic [255:0] bword(input logic o1, input logic o2);
    return 256'({1'b0, o1, 1'b0, o2});   // cells 0..3 = c1in c1out c2in c2out
  endfunction

  task automatic board_flow();
    logic [255:0] o;
    u_bdrv.reset();
    u_bdrv.ir_scan(6, 256'({2{IR_BYPASS}}), o);
    u_bdrv.dr_scan(8, 256'h96, o);
    check(o[7:0] == 8'(8'h96 << 2), "board bypass"); n_bypass++;
    u_bdrv.ir_scan(6, 256'({2{IR_DELAY_EXTEST}}), o);
    u_bdrv.dr_scan(4, bword(0, 0), o, 40); n_stretch++;
    u_bdrv.dr_scan(4, bword(1, 1), o, 40); n_stretch++;
    u_bdrv.dr_scan(4, bword(1, 1), o, 40); n_stretch++;
    check(o[1] == 1 && o[3] == 1, "board good wires");
    slow = 1'b1;
    u_bdrv.dr_scan(4, bword(0, 0), o, 40); n_stretch++;
    u_bdrv.dr_scan(4, bword(0, 0), o, 40); n_stretch++;
    check(o[1] == 1, "board slow wire caught");
    if (o[1] == 1) n_fault++;
    check(o[3] == 0, "board fast wire passes");
    u_bdrv.ir_scan(6, 256'({2{IR_EXTEST}}), o);
    u_bdrv.dr_scan(4, bword(1, 1), o);
    u_bdrv.dr_scan(4, bword(1, 1), o);
    check(o[1] == 1, "slow wire passes static EXTEST");
    if (o[1] == 1) n_fault_missed_by_extest++;
    n_extest++;
  endtask

  initial begin
    fork
      soc_flow();
      board_flow();
    join
    check(n_bypass >= 2, "bypass happened");
    check(n_extest >= 2, "EXTEST happened");
    check(n_intest >= 1, "INTEST happened");
    check(n_mode_on >= 1 && n_mode_off >= 1, "IDFT mode switched on and off");
    check(n_stretch >= 1, "stretched Update-DR happened");
    check(n_fault >= 1, "delay fault detected");
    check(n_fault_missed_by_extest >= 1, "static EXTEST missed the delay fault");
    for (int i = 0; i < 6; i++) check(n_interval[i] >= 1, $sformatf("controller %0d launched and captured", i));
    $display("mechanisms: bypass=%0d extest=%0d intest=%0d mode_on=%0d mode_off=%0d stretch=%0d fault=%0d",
             n_bypass, n_extest, n_intest, n_mode_on, n_mode_off, n_stretch, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
