// tb_boundary_scan_cell: random capture, shift, update and mode operations on
// one cell, checked against a two-register reference model.
module tb_boundary_scan_cell;
  timeunit 1ns; timeprecision 1ps;
  logic clock_dr = 1'b1, update_dr = 1'b0, shift_dr = 1'b0, mode = 1'b0;
  logic pi = 1'b0, si = 1'b0, po, so;
  logic r_cap, r_upd;
  int checks = 0, failures = 0;

  boundary_scan_cell dut (.clock_dr, .update_dr, .shift_dr, .mode, .pi, .si, .po, .so);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    // fill both stages first
    shift_dr = 1; si = 0; #1 clock_dr = 0; #1 clock_dr = 1; #1 update_dr = 1; #1 update_dr = 0;
    r_cap = 0; r_upd = 0;
    repeat (500) begin
      pi = $urandom_range(0, 1); si = $urandom_range(0, 1);
      shift_dr = $urandom_range(0, 1); mode = $urandom_range(0, 1);
      #1;
      case ($urandom_range(0, 2))
        0: begin clock_dr = 0; #1 clock_dr = 1; r_cap = shift_dr ? si : pi; end
        1: begin update_dr = 1; r_upd = r_cap; #1 update_dr = 0; end
        default: ;
      endcase
      #1;
      check(so == r_cap, "capture/shift stage");
      check(po == (mode ? r_upd : pi), "mode mux / update stage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
