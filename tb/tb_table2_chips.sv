// tb_table2_chips: Delay_EXTEST on chips of the sizes used to compare the
// area of delay-test schemes: 126 input cells in 3 clock domains, about 165
// input cells in 4 domains (168, as the cells are split evenly: 42 per
// domain), and 284 input cells in 4 domains. Each chip also has as many
// output cells, wired back to its inputs. One IDFT controller per domain
// serves all the cells of that domain whatever their number. The three chips
// run in parallel, each from its own chip_delay_run harness.
module tb_table2_chips;
  timeunit 1ns; timeprecision 1ps;

  int c0, f0, c1, f1, c2, f2;
  bit d0, d1, d2;
  int checks = 0, failures = 0;

  chip_delay_run #(.N_DOM(3), .N_IN(42)) u_c6713 (.checks(c0), .failures(f0), .done(d0));
  chip_delay_run #(.N_DOM(4), .N_IN(42)) u_xeon  (.checks(c1), .failures(f1), .done(d1));
  chip_delay_run #(.N_DOM(4), .N_IN(71)) u_p3x   (.checks(c2), .failures(f2), .done(d2));

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures = f0 + f1 + f2 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, failures);
    $finish;
  end
endmodule
