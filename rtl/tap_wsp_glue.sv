// tap_wsp_glue: glue between an IEEE 1149.1 TAP controller and the wrapper
// serial port (WSP) of IEEE 1500 wrapped cores.
//
// WRCK is TCK, WRSTN is the TAP reset, WSI is TDI and SelectWIR is the TAP's
// Select (1: instruction side, WIR; 0: data side, WBR or WBY).
// ShiftWR and CaptureWR are "in Shift-IR or Shift-DR" and "in Capture-IR or
// Capture-DR", each registered on the falling TCK edge, so they are steady
// around the rising WRCK edge that shifts or captures. UpdateWR is "in
// Update-IR or Update-DR", straight from the state: it is high for the whole
// Update state, including a stretched one. The flip-flops are cleared while
// the TAP is reset (this design's choice).
module tap_wsp_glue (
  input  logic tck,
  input  logic tdi,
  input  logic reset_n,
  input  logic select,
  input  logic st_capture_dr,
  input  logic st_shift_dr,
  input  logic st_update_dr,
  input  logic st_capture_ir,
  input  logic st_shift_ir,
  input  logic st_update_ir,
  output logic wrck,
  output logic wrstn,
  output logic wsi,
  output logic shiftwr,
  output logic capturewr,
  output logic updatewr,
  output logic selectwir
);

  assign wrck      = tck;
  assign wrstn     = reset_n;
  assign wsi       = tdi;
  assign selectwir = select;
  assign updatewr  = st_update_ir | st_update_dr;

  always_ff @(negedge tck or negedge reset_n)
    if (!reset_n) begin
      shiftwr   <= 1'b0;
      capturewr <= 1'b0;
    end else begin
      shiftwr   <= st_shift_ir | st_shift_dr;
      capturewr <= st_capture_ir | st_capture_dr;
    end

endmodule
