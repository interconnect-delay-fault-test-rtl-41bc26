// tb_chip_1149: self-checking test of one 1149.1 chip with two system clock
// domains (5 ns and 8 ns). Each output pin is looped back to the input pin of
// its domain through a wire of 1 ns, or 10 ns when made slow. Checks:
// IR capture pattern, BYPASS length, SAMPLE/PRELOAD, static EXTEST, Delay_EXTEST with a
// launch-to-capture interval of exactly one system clock per domain, detection
// of a slow wire in Delay_EXTEST, and that the same slow wire passes EXTEST.
// Boundary register order from TDI: d0-in, d0-out, d1-in, d1-out.
module tb_chip_1149;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;

  localparam int N_DOM = 2;
  localparam int LEN   = 4;
  localparam real PER [N_DOM] = '{5.0, 8.0};

  logic tck, tms, tdi, trst_n, tdo, tdo_en;
  logic [N_DOM-1:0] sysclk = '0;
  logic [N_DOM-1:0] pin_in, to_core, pin_out, updr, capdr;
  logic [N_DOM-1:0] from_core = 2'b10;
  logic idft_mode;
  logic [N_DOM-1:0] slow = '0;   // wire d has a 10 ns delay, else 1 ns
  int   checks = 0, failures = 0;

  jtag_driver #(.HALF(5)) u_drv (.tck, .tms, .tdi, .trst_n, .tdo);

  chip_1149 #(.N_DOM(N_DOM), .N_IN(1), .N_OUT(1)) dut (
    .tck, .tms, .trst_n, .tdi, .tdo, .tdo_en, .sysclk,
    .pin_in, .to_core, .from_core, .pin_out, .idft_mode, .updr, .capdr
  );

  always #2.5 sysclk[0] = ~sysclk[0];
  always #4.0 sysclk[1] = ~sysclk[1];

  // board wires with transport delay
  for (genvar d = 0; d < N_DOM; d++) begin : g_wire
    logic w_fast, w_slow;
    always @(pin_out[d]) w_fast <= #1 pin_out[d];
    always @(pin_out[d]) w_slow <= #10 pin_out[d];
    assign pin_in[d] = slow[d] ? w_slow : w_fast;
    // launch-to-capture interval
    realtime t_up; logic armed = 1'b0; realtime interval = 0;
    always @(posedge updr[d]) if (idft_mode) begin t_up = $realtime; armed = 1'b1; end
    always @(posedge capdr[d]) if (armed) begin interval = $realtime - t_up; armed = 1'b0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // boundary data word from cell values (cell k = k-th cell from TDI)
  function automatic logic [255:0] bsr_word(input logic [LEN-1:0] cells);
    logic [255:0] w = '0;
    for (int k = 0; k < LEN; k++) w[LEN-1-k] = cells[k];
    return w;
  endfunction
  function automatic logic [LEN-1:0] bsr_cells(input logic [255:0] w);
    logic [LEN-1:0] c;
    for (int k = 0; k < LEN; k++) c[k] = w[LEN-1-k];
    return c;
  endfunction
  // cells: {d1-out, d1-in, d0-out, d0-in}
  function automatic logic [LEN-1:0] outs(input logic o0, input logic o1);
    return {o1, 1'b0, o0, 1'b0};
  endfunction

  logic [255:0] o;
  logic [LEN-1:0] c;

  initial begin
    u_drv.reset();
    check(!idft_mode, "reset instruction is not Delay_EXTEST");

    // IR capture pattern ...01
    u_drv.ir_scan(IR_LEN, 256'(IR_BYPASS), o);
    check(o[1:0] == 2'b01, "IR captures 01");

    // BYPASS: one-bit register
    u_drv.dr_scan(8, 256'h5A, o);
    check(o[7:0] == 8'hB4, $sformatf("bypass delays by one bit, got %h", o[7:0]));

    // SAMPLE/PRELOAD: functional pins, boundary register captures them
    u_drv.ir_scan(IR_LEN, 256'(IR_SAMPLE), o);
    u_drv.dr_scan(LEN, bsr_word(outs(0, 1)), o);   // preload
    check(pin_out == from_core, "SAMPLE keeps functional mode");
    u_drv.dr_scan(LEN, bsr_word(outs(0, 1)), o);
    c = bsr_cells(o);
    check(c[1] == from_core[0] && c[3] == from_core[1], "SAMPLE captures core outputs");
    check(c[0] == pin_in[0] && c[2] == pin_in[1], "SAMPLE captures input pins");

    // EXTEST, static: starts from the preloaded values
    u_drv.ir_scan(IR_LEN, 256'(IR_EXTEST), o);
    check(pin_out == 2'b10, "EXTEST drives the preloaded values");
    u_drv.dr_scan(LEN, bsr_word(outs(1, 0)), o);
    check(pin_out == 2'b01, "EXTEST drives update stage on pins");
    u_drv.dr_scan(LEN, bsr_word(outs(0, 1)), o);
    c = bsr_cells(o);
    check(c[0] == 1 && c[2] == 0, "EXTEST captures pins 01");
    check(c[1] == 0 && c[3] == 1, "EXTEST output cells capture core values");
    check(pin_out == 2'b10, "EXTEST second pattern");

    // Delay_EXTEST, good wires
    u_drv.ir_scan(IR_LEN, 256'(IR_DELAY_EXTEST), o);
    check(idft_mode, "Delay_EXTEST raises IDFT_Mode");
    u_drv.dr_scan(LEN, bsr_word(outs(0, 0)), o, 60);
    check(pin_out == 2'b00, "Delay_EXTEST initial pattern");
    u_drv.dr_scan(LEN, bsr_word(outs(1, 1)), o, 60);
    check(pin_out == 2'b11, "Delay_EXTEST launches");
    check(g_wire[0].interval == PER[0], $sformatf("domain0 interval %0t", g_wire[0].interval));
    check(g_wire[1].interval == PER[1], $sformatf("domain1 interval %0t", g_wire[1].interval));
    u_drv.dr_scan(LEN, bsr_word(outs(1, 1)), o, 60);
    c = bsr_cells(o);
    check(c[0] == 1 && c[2] == 1, "Delay_EXTEST captures rising transitions");

    // Delay fault on domain 1 (wire 10 ns > 8 ns), domain 0 fine (1 ns < 5 ns)
    slow = 2'b10;
    u_drv.dr_scan(LEN, bsr_word(outs(0, 0)), o, 60);
    u_drv.dr_scan(LEN, bsr_word(outs(0, 0)), o, 60);
    c = bsr_cells(o);
    check(c[0] == 0, "domain0 falling transition in time");
    check(c[2] == 1, "domain1 slow wire caught (old value captured)");

    // The same slow wire passes plain EXTEST (2.5 TCK)
    u_drv.ir_scan(IR_LEN, 256'(IR_EXTEST), o);
    check(!idft_mode, "EXTEST clears IDFT_Mode");
    u_drv.dr_scan(LEN, bsr_word(outs(1, 1)), o);
    u_drv.dr_scan(LEN, bsr_word(outs(1, 1)), o);
    c = bsr_cells(o);
    check(c[0] == 1 && c[2] == 1, "EXTEST cannot see the slow wire");

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
