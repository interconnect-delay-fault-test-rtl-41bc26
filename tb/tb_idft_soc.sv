// tb_idft_soc: end-to-end test of the three-core SoC with CLK1 = 200 MHz,
// CLK2 = 125 MHz and TCK = 100 MHz. Checks the WIR capture pattern, the
// three-WBY bypass path, static EXTEST through nets 1-4, INTEST, and
// Delay_EXTEST: for each of the four IDFT controllers the launch (UpDR) to
// capture (CapDR) interval must be one period of its own clock, and the
// rising and falling transitions launched on nets 1-4 must be captured by the
// receiving cells I3, I2, I5, I4.
// Wrapper cell order from TDI (cell k):
//   0 I1  1 I2  2 O1  3 O2 | 4 I3  5 O3  6 I4  7 O4 | 8 I5  9 I6  10 O5  11 O6
module tb_idft_soc;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;

  localparam int LEN = 12;
  localparam int WLEN = 3 * WIR_LEN;
  localparam real PER [4] = '{5.0, 5.0, 8.0, 8.0};

  logic tck, tms, tdi, trst_n, tdo, tdo_en;
  logic clk1 = 1'b0, clk2 = 1'b0;
  logic [1:0] soc_in = 2'b01, soc_out;
  logic [1:0] c1_to_core, c2_to_core, c3_to_core;
  logic [1:0] c1_from_core = 2'b01, c2_from_core = 2'b10, c3_from_core = 2'b11;
  logic [4:1] nets;
  logic [2:0] core_idft_mode;
  logic [3:0] updr, capdr;
  int checks = 0, failures = 0;

  jtag_driver #(.HALF(5)) u_drv (.tck, .tms, .tdi, .trst_n, .tdo);

  idft_soc dut (
    .tck, .tms, .trst_n, .tdi, .tdo, .tdo_en, .clk1, .clk2, .soc_in, .soc_out,
    .c1_to_core, .c1_from_core, .c2_to_core, .c2_from_core,
    .c3_to_core, .c3_from_core, .nets, .core_idft_mode, .updr, .capdr
  );

  always #2.5 clk1 = ~clk1;
  always #4.0 clk2 = ~clk2;

  for (genvar i = 0; i < 4; i++) begin : g_mon
    realtime t_up; logic armed = 1'b0; realtime interval = 0;
    always @(posedge updr[i]) if (core_idft_mode == 3'b111) begin
      t_up = $realtime; armed = 1'b1;
    end
    always @(posedge capdr[i]) if (armed) begin
      interval = $realtime - t_up; armed = 1'b0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] word(input logic [LEN-1:0] cells);
    logic [255:0] w = '0;
    for (int k = 0; k < LEN; k++) w[LEN-1-k] = cells[k];
    return w;
  endfunction
  function automatic logic [LEN-1:0] cells_of(input logic [255:0] w);
    logic [LEN-1:0] c;
    for (int k = 0; k < LEN; k++) c[k] = w[LEN-1-k];
    return c;
  endfunction
  // drive values for O1..O6 (index 1..6), everything else 0
  function automatic logic [LEN-1:0] outs(input logic [6:1] o);
    logic [LEN-1:0] c = '0;
    c[2] = o[1]; c[3] = o[2]; c[5] = o[3]; c[7] = o[4]; c[10] = o[5]; c[11] = o[6];
    return c;
  endfunction
  function automatic logic [255:0] wir3(input logic [WIR_LEN-1:0] op);
    return 256'({op, op, op});
  endfunction

  logic [255:0] o;
  logic [LEN-1:0] c;

  initial begin
    u_drv.reset();

    // WIR capture pattern and bypass
    u_drv.ir_scan(WLEN, wir3(WS_BYPASS), o);
    check(o[WLEN-1:0] == 9'b001_001_001, $sformatf("WIR capture %b", o[WLEN-1:0]));
    check(core_idft_mode == 3'b000, "bypass leaves Core_IDFT_Mode low");
    u_drv.dr_scan(16, 256'hA5C3, o);
    check(o[15:0] == 16'(16'hA5C3 << 3), $sformatf("three WBY bits, got %h", o[15:0]));

    // static EXTEST: drive 1 on nets 1..4 and SoC outputs
    u_drv.ir_scan(WLEN, wir3(WS_EXTEST), o);
    u_drv.dr_scan(LEN, word(outs(6'b111111)), o);
    check(nets == 4'b1111 && soc_out == 2'b11, "EXTEST drives nets");
    u_drv.dr_scan(LEN, word(outs(6'b000000)), o);
    c = cells_of(o);
    check(c[1] && c[4] && c[6] && c[8], "EXTEST captures nets 1-4");
    check(c[0] == soc_in[0] && c[9] == soc_in[1], "EXTEST captures SoC inputs");
    check(c[2] == c1_from_core[0] && c[11] == c3_from_core[1], "EXTEST output cells capture core");
    check(nets == 4'b0000, "EXTEST second pattern");

    // INTEST: input cells drive the cores
    u_drv.ir_scan(WLEN, wir3(WS_INTEST), o);
    u_drv.dr_scan(LEN, word(12'b0011_0100_0001), o);
    check(c1_to_core == 2'b01 && c2_to_core == 2'b10 && c3_to_core == 2'b11,
          $sformatf("INTEST to_core %b %b %b", c1_to_core, c2_to_core, c3_to_core));

    // Delay_EXTEST
    u_drv.ir_scan(WLEN, wir3(WS_DELAY_EXTEST), o);
    check(core_idft_mode == 3'b111, "Delay_EXTEST raises Core_IDFT_Mode");
    u_drv.dr_scan(LEN, word(outs(6'b000000)), o, 60);
    check(nets == 4'b0000, "initial pattern");
    for (int i = 0; i < 4; i++) g_mon[0].interval = 0;
    u_drv.dr_scan(LEN, word(outs(6'b011110)), o, 60);
    check(nets == 4'b1111, "rising transitions launched");
    check(g_mon[0].interval == PER[0], $sformatf("IDFTC1 interval %0t", g_mon[0].interval));
    check(g_mon[1].interval == PER[1], $sformatf("IDFTC2_1 interval %0t", g_mon[1].interval));
    check(g_mon[2].interval == PER[2], $sformatf("IDFTC2_2 interval %0t", g_mon[2].interval));
    check(g_mon[3].interval == PER[3], $sformatf("IDFTC3 interval %0t", g_mon[3].interval));
    u_drv.dr_scan(LEN, word(outs(6'b000000)), o, 60);
    c = cells_of(o);
    check(c[4] && c[1] && c[8] && c[6], "rising transitions captured at I3 I2 I5 I4");
    check(nets == 4'b0000, "falling transitions launched");
    u_drv.dr_scan(LEN, word(outs(6'b000000)), o, 60);
    c = cells_of(o);
    check(!c[4] && !c[1] && !c[8] && !c[6], "falling transitions captured");
    u_drv.idle(2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
