// idft_controller: interconnect delay fault test edge generator for one system
// clock domain.
//
// A standard TAP controller launches boundary-scan data at UpdateDR and
// captures 2.5 TCK later, far more than one system clock. This controller sits
// between the TAP (or the IEEE 1500 WBC control logic) and the boundary cells
// of one clock domain and, in Delay_EXTEST (idft_mode = 1), turns a stretched
// Update-DR state into a launch and a capture exactly one system clock apart:
//   FF1 samples idft_mode & update_dr on each rising sysclk; its output
//       IDFT_UpDR rises on the first sysclk edge after update_dr rises (the
//       launch) and falls on the first sysclk edge after update_dr falls.
//   FF2 copies FF1 one sysclk later: IDFT_CapDR rises one system clock after
//       the launch (the capture).
// Both flip-flops run on sysclk & idft_mode, so they are idle in normal mode.
//   updr  = idft_mode ? IDFT_UpDR : update_dr                (M1)
//   capdr = (idft_mode & ~shift_dr) ? IDFT_CapDR : clock_dr  (M2)
// so normal mode passes the TAP signals through, and in Delay_EXTEST the
// capture edge of Capture-DR is suppressed (IDFT_CapDR is low there) while
// clock_dr is passed again in Shift-DR to shift the responses out.
// Structure and the three gates follow the published controller; the
// asynchronous reset of FF1/FF2 (rst_n, low in Test-Logic-Reset) is this
// design's addition so that the first Delay_EXTEST starts from a known state.
// update_dr is asynchronous to sysclk: a silicon version would put a
// synchroniser ahead of FF1.
module idft_controller (
  input  logic sysclk,
  input  logic rst_n,
  input  logic idft_mode,   // IDFT_Mode / Core_IDFT_Mode
  input  logic shift_dr,    // ShiftDR / ShiftDR_Sig
  input  logic update_dr,   // UpdateDR / UpDR_Sig
  input  logic clock_dr,    // ClockDR / CapDR_Sig
  output logic updr,        // UpDR to the update stage of the cells
  output logic capdr,       // CapDR to the capture/shift stage of the cells
  output logic idft_updr,   // FF1
  output logic idft_capdr   // FF2
);

  logic gclk;
  assign gclk = sysclk & idft_mode;

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) begin
      idft_updr  <= 1'b0;
      idft_capdr <= 1'b0;
    end else begin
      idft_updr  <= idft_mode & update_dr;
      idft_capdr <= idft_updr;
    end

  assign updr  = idft_mode ? idft_updr : update_dr;
  assign capdr = (idft_mode & ~shift_dr) ? idft_capdr : clock_dr;

endmodule
