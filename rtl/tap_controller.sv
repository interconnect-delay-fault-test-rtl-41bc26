// tap_controller: IEEE 1149.1 TAP controller, the 16-state machine of the
// standard, with the register control signals a boundary-scan chip needs.
//
// The state moves on the rising edge of TCK under TMS; TRST_N resets it
// asynchronously to Test-Logic-Reset. The control outputs follow the standard
// timing, which the IDFT controller relies on:
//   * clock_dr / clock_ir idle high and go low while TCK is low in Capture or
//     Shift; their rising edge (= rising TCK leaving that state) is the
//     capture or shift edge.
//   * update_dr / update_ir are high from the falling TCK edge in Update-DR /
//     Update-IR until the rising edge that leaves the state, so holding TCK low
//     in Update-DR stretches the update pulse (the "stretched Update-DR").
//   * shift_dr / shift_ir, select (IR side of the graph) and reset_n are
//     retimed on the falling TCK edge.
//   * tdo is tdo_d sampled on the falling TCK edge; tdo_en is high during
//     Shift-DR/Shift-IR (this two-valued design has no tri-state pin).
// The state graph comes from the standard; the state encoding is the one in
// idft_pkg. Decoded state flags are brought out for the TAP-to-WSP glue.
module tap_controller
  import idft_pkg::*;
(
  input  logic       tck,
  input  logic       tms,
  input  logic       trst_n,
  input  logic       tdo_d,       // serial data selected for TDO
  output tap_state_e state,
  output logic       clock_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       clock_ir,
  output logic       shift_ir,
  output logic       update_ir,
  output logic       select,      // 1: IR column of the state graph
  output logic       reset_n,     // low in Test-Logic-Reset
  output logic       tdo,
  output logic       tdo_en,
  // decoded current state
  output logic       st_capture_dr,
  output logic       st_shift_dr,
  output logic       st_update_dr,
  output logic       st_capture_ir,
  output logic       st_shift_ir,
  output logic       st_update_ir
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TLR:        next = tms ? TLR       : RTI;
      RTI:        next = tms ? SEL_DR    : RTI;
      SEL_DR:     next = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: next = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   next = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   next = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  next = tms ? SEL_DR    : RTI;
      SEL_IR:     next = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: next = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   next = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   next = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  next = tms ? SEL_DR    : RTI;
      default:    next = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TLR;
    else         state <= next;

  assign st_capture_dr = (state == CAPTURE_DR);
  assign st_shift_dr   = (state == SHIFT_DR);
  assign st_update_dr  = (state == UPDATE_DR);
  assign st_capture_ir = (state == CAPTURE_IR);
  assign st_shift_ir   = (state == SHIFT_IR);
  assign st_update_ir  = (state == UPDATE_IR);

  // Gated register clocks and update strobes.
  assign clock_dr  = tck | ~(st_capture_dr | st_shift_dr);
  assign clock_ir  = tck | ~(st_capture_ir | st_shift_ir);
  assign update_dr = ~tck & st_update_dr;
  assign update_ir = ~tck & st_update_ir;

  // Signals retimed on the falling edge of TCK.
  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) begin
      shift_dr <= 1'b0;
      shift_ir <= 1'b0;
      select   <= 1'b0;
      reset_n  <= 1'b0;
      tdo      <= 1'b0;
      tdo_en   <= 1'b0;
    end else begin
      shift_dr <= st_shift_dr;
      shift_ir <= st_shift_ir;
      select   <= state inside {SEL_IR, CAPTURE_IR, SHIFT_IR, EXIT1_IR,
                                PAUSE_IR, EXIT2_IR, UPDATE_IR};
      reset_n  <= (state != TLR);
      tdo      <= tdo_d;
      tdo_en   <= st_shift_dr | st_shift_ir;
    end

endmodule
