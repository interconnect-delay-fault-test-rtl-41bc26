// tb_bsc_chain: a chain of 2 input and 3 output cells. Shifts random patterns
// through it (checking scan order and length), updates them onto the pins,
// captures pins and core outputs, and checks the mode muxes.
module tb_bsc_chain;
  timeunit 1ns; timeprecision 1ps;
  localparam int NI = 2, NO = 3, L = NI + NO;
  logic clock_dr = 1'b1, update_dr = 1'b0, shift_dr = 1'b0;
  logic in_mode = 1'b0, out_mode = 1'b0, si = 1'b0, so;
  logic [NI-1:0] pin_in = '0, to_core;
  logic [NO-1:0] from_core = '0, pin_out;
  logic [L-1:0] pat, got;
  int checks = 0, failures = 0;

  bsc_chain #(.N_IN(NI), .N_OUT(NO)) dut (.clock_dr, .update_dr, .shift_dr,
    .in_mode, .out_mode, .si, .so, .pin_in, .to_core, .from_core, .pin_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask
  task automatic pulse(); #1 clock_dr = 0; #1 clock_dr = 1; #1; endtask

  // shift pat in (cell k ends up with pat[k]); return old contents (cell k)
  task automatic scan(input logic [L-1:0] p, output logic [L-1:0] old);
    shift_dr = 1;
    for (int i = 0; i < L; i++) begin
      old[L-1-i] = so;
      si = p[L-1-i];
      pulse();
    end
    shift_dr = 0;
  endtask

  initial begin
    repeat (30) begin
      pat = $urandom;
      scan(pat, got);
      update_dr = 1; #1 update_dr = 0; #1;
      out_mode = 1; in_mode = 0; #1;
      check(pin_out == pat[L-1:NI], "output cells drive update stage");
      check(to_core == pin_in, "input cells pass pins");
      out_mode = 0; in_mode = 1; #1;
      check(to_core == pat[NI-1:0], "input cells drive update stage");
      check(pin_out == from_core, "output cells pass core");
      out_mode = 0; in_mode = 0;
      from_core = $urandom; pin_in = $urandom; #1;
      check(pin_out == from_core && to_core == pin_in, "functional mode");
      pulse();  // capture
      scan('0, got);
      check(got == {from_core, pin_in}, "capture of pins and core");
      scan(pat, got);
      scan('1, got);
      check(got == pat, "shift order and length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
