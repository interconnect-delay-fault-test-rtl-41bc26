// core_wrapper: IEEE 1500 wrapper of one embedded core, with one IDFT
// controller per system clock domain of the core.
//
// Serial path: wsi -> WIR / WBY / WBR -> wso. selectwir picks the WIR; with
// selectwir = 0 the WIR instruction picks the WBR (EXTEST, INTEST,
// DELAY_EXTEST) or the one-bit WBY (BYPASS). The WBR is one bsc_chain per
// clock domain, domain 0 first, N_IN input cells then N_OUT output cells each.
// The WBC control signal generator (wbc_csg) makes ShiftDR_Sig, CapDR_Sig and
// UpDR_Sig from the WSC; CapDR_Sig and UpDR_Sig are steered to the WBR or the
// WBY by the instruction. The WBR copies pass through the IDFT controller of
// each domain, clocked by that domain's core clock, so in DELAY_EXTEST
// (Core_IDFT_Mode = 1) the cells of a domain launch on UpDR and capture one
// core clock later on CapDR.
// Ports wpi/wpo are the wrapper's functional terminals towards other cores or
// pins; to_core/from_core face the (unwrapped) core logic. Vectors are indexed
// domain-major: bit d*N_IN+i is input cell i of domain d.
// The wrapper structure follows the published SoC; the per-domain split of the
// WBR, the scan order and the instruction steering are this design's.
module core_wrapper
  import idft_pkg::*;
#(
  parameter int unsigned N_DOM = 1,
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_OUT = 1
) (
  input  logic                   wrck,
  input  logic                   wrstn,
  input  logic                   shiftwr,
  input  logic                   capturewr,
  input  logic                   updatewr,
  input  logic                   selectwir,
  input  logic                   wsi,
  output logic                   wso,
  input  logic [N_DOM-1:0]       core_clk,
  input  logic [N_DOM*N_IN-1:0]  wpi,
  output logic [N_DOM*N_IN-1:0]  to_core,
  input  logic [N_DOM*N_OUT-1:0] from_core,
  output logic [N_DOM*N_OUT-1:0] wpo,
  output logic                   core_idft_mode,
  output logic [N_DOM-1:0]       updr,
  output logic [N_DOM-1:0]       capdr
);

  test_ctrl_t          ctrl;
  logic [WIR_LEN-1:0]  wir_q;
  logic                wir_so, wby_so;
  logic                shiftdr_sig, capdr_sig, updr_sig;
  logic                wbr_cap, wbr_upd, wby_cap;
  logic [N_DOM:0]      chain;

  wir u_wir (
    .wrck, .wrstn, .shiftwr, .capturewr, .updatewr, .selectwir,
    .wsi, .wso(wir_so), .wir_q, .ctrl
  );

  wbc_csg u_csg (
    .wrck, .shiftwr, .capturewr, .updatewr, .selectwir,
    .shiftdr_sig, .capdr_sig, .updr_sig
  );

  assign core_idft_mode = ctrl.idft_mode;
  assign wbr_cap = capdr_sig &  ctrl.sel_bsr;
  assign wbr_upd = updr_sig  &  ctrl.sel_bsr;
  assign wby_cap = capdr_sig & ~ctrl.sel_bsr;

  bypass_register u_wby (
    .clock_dr(wby_cap), .rst_n(wrstn), .shift_dr(shiftdr_sig),
    .si(wsi), .so(wby_so)
  );

  assign chain[0] = wsi;

  for (genvar d = 0; d < N_DOM; d++) begin : g_dom
    idft_controller u_idftc (
      .sysclk    (core_clk[d]),
      .rst_n     (wrstn),
      .idft_mode (ctrl.idft_mode),
      .shift_dr  (shiftdr_sig),
      .update_dr (wbr_upd),
      .clock_dr  (wbr_cap),
      .updr      (updr[d]),
      .capdr     (capdr[d]),
      .idft_updr (),
      .idft_capdr()
    );

    bsc_chain #(.N_IN(N_IN), .N_OUT(N_OUT)) u_wbr (
      .clock_dr  (capdr[d]),
      .update_dr (updr[d]),
      .shift_dr  (shiftdr_sig),
      .in_mode   (ctrl.in_mode),
      .out_mode  (ctrl.out_mode),
      .si        (chain[d]),
      .so        (chain[d+1]),
      .pin_in    (wpi[d*N_IN +: N_IN]),
      .to_core   (to_core[d*N_IN +: N_IN]),
      .from_core (from_core[d*N_OUT +: N_OUT]),
      .pin_out   (wpo[d*N_OUT +: N_OUT])
    );
  end

  assign wso = selectwir    ? wir_so :
               ctrl.sel_bsr ? chain[N_DOM] : wby_so;

endmodule
