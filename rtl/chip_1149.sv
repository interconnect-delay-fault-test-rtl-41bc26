// chip_1149: an IEEE 1149.1 boundary-scan chip with IDFT controllers.
//
// Standard parts: TAP controller, instruction register, bypass register and a
// boundary scan register of N_IN input and N_OUT output cells per system clock
// domain (domain 0 nearest TDI). The only addition to a standard chip is one
// idft_controller per system clock, placed between the TAP's ClockDR/UpdateDR
// and the capture/update clocks of the cells of that domain.
// With DELAY_EXTEST loaded, holding TCK low in Update-DR ("stretched
// Update-DR") makes every domain launch its output cells on one rising edge of
// its own sysclk and capture its input cells on the next one; the captured
// responses are scanned out in the following DR scan. EXTEST, SAMPLE and BYPASS
// behave as in any 1149.1 chip: the IDFT controllers then pass ClockDR and
// UpdateDR through.
// ClockDR/UpdateDR reach the boundary register only while it is the selected
// data register (gated so that no edge is produced when the selection
// changes). TDO is retimed on falling TCK; tdo_en marks when it is driven.
// Vectors are domain-major: bit d*N_IN+i is input cell i of domain d.
// The defaults, one domain with one input and one output cell, match the two
// chips drawn on the example board. The split of the boundary register per
// clock domain follows the published scheme; the register gating, scan order,
// opcodes and the separate TDO enable are this design's choices.
module chip_1149
  import idft_pkg::*;
#(
  parameter int unsigned N_DOM = 1,
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_OUT = 1
) (
  input  logic                   tck,
  input  logic                   tms,
  input  logic                   trst_n,
  input  logic                   tdi,
  output logic                   tdo,
  output logic                   tdo_en,
  input  logic [N_DOM-1:0]       sysclk,
  input  logic [N_DOM*N_IN-1:0]  pin_in,
  output logic [N_DOM*N_IN-1:0]  to_core,
  input  logic [N_DOM*N_OUT-1:0] from_core,
  output logic [N_DOM*N_OUT-1:0] pin_out,
  output logic                   idft_mode,
  output logic [N_DOM-1:0]       updr,
  output logic [N_DOM-1:0]       capdr
);

  tap_state_e        state;
  logic              clock_dr, shift_dr, update_dr;
  logic              clock_ir, shift_ir, update_ir;
  logic              select, reset_n, tdo_d;
  logic              st_cdr, st_sdr, st_udr, st_cir, st_sir, st_uir;
  logic [IR_LEN-1:0] ir;
  test_ctrl_t        ctrl;
  logic              ir_so, byp_so;
  logic              bsr_clk, bsr_upd, byp_clk;
  logic [N_DOM:0]    chain;

  tap_controller u_tap (
    .tck, .tms, .trst_n, .tdo_d, .state,
    .clock_dr, .shift_dr, .update_dr, .clock_ir, .shift_ir, .update_ir,
    .select, .reset_n, .tdo, .tdo_en,
    .st_capture_dr(st_cdr), .st_shift_dr(st_sdr), .st_update_dr(st_udr),
    .st_capture_ir(st_cir), .st_shift_ir(st_sir), .st_update_ir(st_uir)
  );

  instruction_register u_ir (
    .clock_ir, .update_ir, .shift_ir, .rst_n(reset_n),
    .si(tdi), .so(ir_so), .ir, .ctrl
  );

  assign idft_mode = ctrl.idft_mode;
  assign bsr_clk   = clock_dr  | ~ctrl.sel_bsr;
  assign bsr_upd   = update_dr &  ctrl.sel_bsr;
  assign byp_clk   = clock_dr  |  ctrl.sel_bsr;

  bypass_register u_byp (
    .clock_dr(byp_clk), .rst_n(reset_n), .shift_dr, .si(tdi), .so(byp_so)
  );

  assign chain[0] = tdi;

  for (genvar d = 0; d < N_DOM; d++) begin : g_dom
    idft_controller u_idftc (
      .sysclk    (sysclk[d]),
      .rst_n     (reset_n),
      .idft_mode (ctrl.idft_mode),
      .shift_dr  (shift_dr),
      .update_dr (bsr_upd),
      .clock_dr  (bsr_clk),
      .updr      (updr[d]),
      .capdr     (capdr[d]),
      .idft_updr (),
      .idft_capdr()
    );

    bsc_chain #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
      .clock_dr  (capdr[d]),
      .update_dr (updr[d]),
      .shift_dr  (shift_dr),
      .in_mode   (ctrl.in_mode),
      .out_mode  (ctrl.out_mode),
      .si        (chain[d]),
      .so        (chain[d+1]),
      .pin_in    (pin_in[d*N_IN +: N_IN]),
      .to_core   (to_core[d*N_IN +: N_IN]),
      .from_core (from_core[d*N_OUT +: N_OUT]),
      .pin_out   (pin_out[d*N_OUT +: N_OUT])
    );
  end

  assign tdo_d = select       ? ir_so :
                 ctrl.sel_bsr ? chain[N_DOM] : byp_so;

endmodule
