// boundary_scan_cell: two-flip-flop boundary scan cell, used both as the
// input/output BSC of an IEEE 1149.1 chip and as the wrapper boundary cell
// (WBC) of an IEEE 1500 wrapper.
//
// The capture/shift stage loads either the parallel input pi (capture) or the
// serial input si (shift, shift_dr = 1) on the rising edge of clock_dr. The
// update stage copies the capture/shift stage on the rising edge of
// update_dr. mode selects what the cell drives on po: pi in functional mode
// (0), the update stage in test mode (1). so is the capture/shift stage.
// This is the cell drawn for the boards as well as the wrapped cores; the IDFT
// scheme needs no change to it, it only changes which edges reach clock_dr and
// update_dr. The stages have no reset: a scan fills them before they are used.
module boundary_scan_cell (
  input  logic clock_dr,  // capture/shift clock (ClockDR, CapDR)
  input  logic update_dr, // update clock (UpdateDR, UpDR)
  input  logic shift_dr,
  input  logic mode,
  input  logic pi,
  input  logic si,
  output logic po,
  output logic so
);

  logic cap_q, upd_q;

  always_ff @(posedge clock_dr) cap_q <= shift_dr ? si : pi;
  always_ff @(posedge update_dr) upd_q <= cap_q;

  assign so = cap_q;
  assign po = mode ? upd_q : pi;

endmodule
