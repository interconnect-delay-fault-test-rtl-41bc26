// jtag_driver: testbench-only IEEE 1149.1 master. Its tasks drive TCK, TMS,
// TDI and TRST_N and sample TDO just before each rising TCK edge.
// reset() must be called first. Scans start from Run-Test/Idle or from an Update state (TMS=1 leads to
// Select-DR from both) and end in Update-IR / Update-DR, so a DR scan can
// follow a stretched Update-DR directly, as Select-DR -> Capture-DR.
// dr_scan's stretch argument holds TCK low in Update-DR for that many extra
// time units: the stretched Update-DR used by Delay_EXTEST.
module jtag_driver #(
  parameter int HALF = 5            // half TCK period, time units (ns)
) (
  output logic tck,
  output logic tms,
  output logic tdi,
  output logic trst_n,
  input  logic tdo
);
  timeunit 1ns; timeprecision 1ps;

  initial begin
    tck = 1'b0; tms = 1'b1; tdi = 1'b0; trst_n = 1'b1;
  end

  task automatic tick(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #(HALF);
    o = tdo;
    tck = 1'b1;
    #(HALF);
    tck = 1'b0;
  endtask

  // Reach Test-Logic-Reset with TMS, leave it, then pulse TRST_N: the TAP's
  // reset output then sees a falling edge whatever the power-up state was.
  task automatic reset();
    logic o;
    trst_n = 1'b1;
    repeat (5) tick(1'b1, 1'b0, o);
    tick(1'b0, 1'b0, o);          // Run-Test/Idle
    tick(1'b0, 1'b0, o);
    trst_n = 1'b0;
    #(2*HALF);
    trst_n = 1'b1;
    tick(1'b0, 1'b0, o);          // Run-Test/Idle
  endtask

  task automatic idle(input int n = 1);
    logic o;
    repeat (n) tick(1'b0, 1'b0, o);
  endtask

  // Shift 'len' bits of 'data' (LSB first) in, return what came out.
  task automatic shift(input int len, input logic [255:0] data,
                       output logic [255:0] out);
    logic o;
    out = '0;
    for (int i = 0; i < len; i++) begin
      tick(i == len - 1, data[i], o);
      out[i] = o;
    end
  endtask

  task automatic ir_scan(input int len, input logic [255:0] data,
                         output logic [255:0] out);
    logic o;
    tick(1'b1, 1'b0, o);  // Select-DR
    tick(1'b1, 1'b0, o);  // Select-IR
    tick(1'b0, 1'b0, o);  // Capture-IR
    tick(1'b0, 1'b0, o);  // Shift-IR
    shift(len, data, out); // ... Exit1-IR
    tick(1'b1, 1'b0, o);  // Update-IR (update on the falling edge)
    #1;                   // let the update settle
  endtask

  task automatic dr_scan(input int len, input logic [255:0] data,
                         output logic [255:0] out, input int stretch = 0);
    logic o;
    tick(1'b1, 1'b0, o);  // Select-DR
    tick(1'b0, 1'b0, o);  // Capture-DR
    tick(1'b0, 1'b0, o);  // Shift-DR
    shift(len, data, out); // ... Exit1-DR
    tick(1'b1, 1'b0, o);  // Update-DR
    #1;                   // let the update settle
    #(stretch);           // TCK held low: stretched Update-DR
  endtask

endmodule
