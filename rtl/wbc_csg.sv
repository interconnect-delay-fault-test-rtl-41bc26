// wbc_csg: WBC control signal generator. Turns the wrapper serial control
// into the shift, capture and update controls of the wrapper boundary cells,
// shaped like the ShiftDR, ClockDR and UpdateDR signals of a boundary scan cell.
// All three are forced low while the WIR is selected (selectwir = 1).
//   ShiftDR_Sig = ShiftWR & ~SelectWIR
//   CapDR_Sig   = WRCK & (ShiftWR | CaptureWR) & ~SelectWIR
//                 (a rising edge on each rising WRCK that shifts or captures)
//   UpDR_Sig    = ~WRCK & UpdateWR & ~SelectWIR
//                 (rises on the falling WRCK in Update-DR and stays high while
//                  Update-DR is stretched)
// The functions are read from the published logic and its timing diagram.
module wbc_csg (
  input  logic wrck,
  input  logic shiftwr,
  input  logic capturewr,
  input  logic updatewr,
  input  logic selectwir,
  output logic shiftdr_sig,
  output logic capdr_sig,
  output logic updr_sig
);

  logic shift_en, capture_en, update_en;

  assign shift_en   = shiftwr   & ~selectwir;
  assign capture_en = capturewr & ~selectwir;
  assign update_en  = updatewr  & ~selectwir;

  assign shiftdr_sig = shift_en;
  assign capdr_sig   = wrck & (shift_en | capture_en);
  assign updr_sig    = ~wrck & update_en;

endmodule
