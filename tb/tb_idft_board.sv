// tb_idft_board: two-chip board on one 200 MHz system clock, TCK = 100 MHz.
// The wire chip 1 -> chip 2 is 1 ns long, or 10 ns when made slow; the wire
// chip 2 -> chip 1 is 1 ns. Checks the chained IR and bypass path, static
// EXTEST across the board, Delay_EXTEST launch/capture one SysCLK apart in
// both chips, and that only Delay_EXTEST detects the slow wire.
// Boundary cells from TDI: 0 chip1-in, 1 chip1-out, 2 chip2-in, 3 chip2-out.
module tb_idft_board;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;

  localparam int LEN = 4;

  logic tck, tms, tdi, trst_n, tdo, tdo_en;
  logic sysclk = 1'b0;
  logic c1_out, c1_in, c2_out, c2_in, c1_to, c2_to;
  logic [1:0] updr, capdr;
  logic slow = 1'b0;
  logic w12_fast, w12_slow, w21;
  int checks = 0, failures = 0;

  jtag_driver #(.HALF(5)) u_drv (.tck, .tms, .tdi, .trst_n, .tdo);

  idft_board dut (
    .tck, .tms, .trst_n, .tdi, .tdo, .tdo_en, .sysclk,
    .chip1_pin_out(c1_out), .chip1_pin_in(c1_in),
    .chip2_pin_out(c2_out), .chip2_pin_in(c2_in),
    .chip1_from_core(1'b1), .chip1_to_core(c1_to),
    .chip2_from_core(1'b0), .chip2_to_core(c2_to),
    .updr, .capdr
  );

  always #2.5 sysclk = ~sysclk;
  always @(c1_out) w12_fast <= #1 c1_out;
  always @(c1_out) w12_slow <= #10 c1_out;
  always @(c2_out) w21 <= #1 c2_out;
  assign c2_in = slow ? w12_slow : w12_fast;
  assign c1_in = w21;

  realtime t_up; logic armed = 1'b0; realtime interval = 0;
  always @(posedge updr[0]) if (dut.u_chip1.idft_mode) begin t_up = $realtime; armed = 1'b1; end
  always @(posedge capdr[1]) if (armed) begin interval = $realtime - t_up; armed = 1'b0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [255:0] word(input logic o1, input logic o2);
    logic [LEN-1:0] c = {o2, 1'b0, o1, 1'b0};
    logic [255:0] w = '0;
    for (int k = 0; k < LEN; k++) w[LEN-1-k] = c[k];
    return w;
  endfunction
  function automatic logic [LEN-1:0] cells_of(input logic [255:0] w);
    logic [LEN-1:0] c;
    for (int k = 0; k < LEN; k++) c[k] = w[LEN-1-k];
    return c;
  endfunction

  logic [255:0] o;
  logic [LEN-1:0] c;

  initial begin
    u_drv.reset();
    u_drv.ir_scan(2*IR_LEN, 256'({IR_BYPASS, IR_BYPASS}), o);
    check(o[5:0] == 6'b001_001, "two IR capture patterns");
    u_drv.dr_scan(8, 256'h69, o);
    check(o[7:0] == 8'(8'h69 << 2), "two bypass bits");

    u_drv.ir_scan(2*IR_LEN, 256'({IR_EXTEST, IR_EXTEST}), o);
    u_drv.dr_scan(LEN, word(1, 1), o);
    u_drv.dr_scan(LEN, word(0, 1), o);
    c = cells_of(o);
    check(c[2] == 1 && c[0] == 1, "EXTEST across the board");

    u_drv.ir_scan(2*IR_LEN, 256'({IR_DELAY_EXTEST, IR_DELAY_EXTEST}), o);
    u_drv.dr_scan(LEN, word(0, 0), o, 40);
    u_drv.dr_scan(LEN, word(1, 1), o, 40);
    check(interval == 5.0, $sformatf("chip1 launch to chip2 capture %0t", interval));
    u_drv.dr_scan(LEN, word(1, 1), o, 40);
    c = cells_of(o);
    check(c[2] == 1 && c[0] == 1, "Delay_EXTEST good wires pass");

    slow = 1'b1;
    u_drv.dr_scan(LEN, word(0, 0), o, 40);
    u_drv.dr_scan(LEN, word(0, 0), o, 40);
    c = cells_of(o);
    check(c[2] == 1, "slow wire detected by Delay_EXTEST");
    check(c[0] == 0, "fast wire passes");

    u_drv.ir_scan(2*IR_LEN, 256'({IR_EXTEST, IR_EXTEST}), o);
    u_drv.dr_scan(LEN, word(1, 1), o);
    u_drv.dr_scan(LEN, word(1, 1), o);
    c = cells_of(o);
    check(c[2] == 1, "slow wire passes EXTEST");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
