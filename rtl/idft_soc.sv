// idft_soc: SoC with three IEEE 1500 wrapped cores in two system clock
// domains, tested through one IEEE 1149.1 TAP.
//
// CLK1 runs the interface between core 1 and core 2, CLK2 the interface
// between core 2 and core 3. Core 1 and core 3 each have one IDFT controller
// (CLK1 and CLK2); core 2 has a CLK1 part and a CLK2 part and so two.
// Interconnect nets between the wrapper cells:
//   net1: core 1 O2 -> core 2 I3   (CLK1)     net2: core 2 O3 -> core 1 I2 (CLK1)
//   net3: core 2 O4 -> core 3 I5   (CLK2)     net4: core 3 O5 -> core 2 I4 (CLK2)
// Core 1 I1/O1 and core 3 I6/O6 are SoC pins (soc_in[0]/soc_out[0] and
// soc_in[1]/soc_out[1]).
// The TAP controller drives the wrapper serial control through tap_wsp_glue;
// the wrapper serial path is WSI -> core 1 -> core 2 -> core 3 -> WSO -> TDO,
// so an IR scan loads the three WIRs (9 bits, core 3's first out) and a DR scan
// with all three in DELAY_EXTEST runs through the 12 wrapper cells, in order
// from TDI: I1 I2 O1 O2 | I3 O3 I4 O4 | I5 I6 O5 O6.
// The core logic is not part of this design: its terminals are the c*_to_core
// and c*_from_core ports. nets, updr, capdr and core_idft_mode are outputs for
// observation only.
module idft_soc
  import idft_pkg::*;
(
  input  logic       tck,
  input  logic       tms,
  input  logic       trst_n,
  input  logic       tdi,
  output logic       tdo,
  output logic       tdo_en,
  input  logic       clk1,
  input  logic       clk2,
  input  logic [1:0] soc_in,
  output logic [1:0] soc_out,
  output logic [1:0] c1_to_core,
  input  logic [1:0] c1_from_core,
  output logic [1:0] c2_to_core,
  input  logic [1:0] c2_from_core,
  output logic [1:0] c3_to_core,
  input  logic [1:0] c3_from_core,
  output logic [4:1] nets,
  output logic [2:0] core_idft_mode,
  // UpDR/CapDR of IDFTC1, IDFTC2_1, IDFTC2_2, IDFTC3 (bits 0..3)
  output logic [3:0] updr,
  output logic [3:0] capdr
);

  tap_state_e state;
  logic clock_dr, shift_dr, update_dr, clock_ir, shift_ir, update_ir;
  logic select, reset_n, wso;
  logic st_cdr, st_sdr, st_udr, st_cir, st_sir, st_uir;
  logic wrck, wrstn, wsi, shiftwr, capturewr, updatewr, selectwir;
  logic wso1, wso2;
  logic [1:0] c1_wpo, c2_wpo, c3_wpo;

  tap_controller u_tap (
    .tck, .tms, .trst_n, .tdo_d(wso), .state,
    .clock_dr, .shift_dr, .update_dr, .clock_ir, .shift_ir, .update_ir,
    .select, .reset_n, .tdo, .tdo_en,
    .st_capture_dr(st_cdr), .st_shift_dr(st_sdr), .st_update_dr(st_udr),
    .st_capture_ir(st_cir), .st_shift_ir(st_sir), .st_update_ir(st_uir)
  );

  tap_wsp_glue u_glue (
    .tck, .tdi, .reset_n, .select,
    .st_capture_dr(st_cdr), .st_shift_dr(st_sdr), .st_update_dr(st_udr),
    .st_capture_ir(st_cir), .st_shift_ir(st_sir), .st_update_ir(st_uir),
    .wrck, .wrstn, .wsi, .shiftwr, .capturewr, .updatewr, .selectwir
  );

  // core 1: CLK1; cells I1 I2 | O1 O2
  core_wrapper #(.N_DOM(1), .N_IN(2), .N_OUT(2)) u_core1 (
    .wrck, .wrstn, .shiftwr, .capturewr, .updatewr, .selectwir,
    .wsi, .wso(wso1),
    .core_clk       (clk1),
    .wpi            ({nets[2], soc_in[0]}),
    .to_core        (c1_to_core),
    .from_core      (c1_from_core),
    .wpo            (c1_wpo),
    .core_idft_mode (core_idft_mode[0]),
    .updr           (updr[0]),
    .capdr          (capdr[0])
  );

  // core 2: domain 0 on CLK1 (I3, O3), domain 1 on CLK2 (I4, O4)
  core_wrapper #(.N_DOM(2), .N_IN(1), .N_OUT(1)) u_core2 (
    .wrck, .wrstn, .shiftwr, .capturewr, .updatewr, .selectwir,
    .wsi(wso1), .wso(wso2),
    .core_clk       ({clk2, clk1}),
    .wpi            ({nets[4], nets[1]}),
    .to_core        (c2_to_core),
    .from_core      (c2_from_core),
    .wpo            (c2_wpo),
    .core_idft_mode (core_idft_mode[1]),
    .updr           (updr[2:1]),
    .capdr          (capdr[2:1])
  );

  // core 3: CLK2; cells I5 I6 | O5 O6
  core_wrapper #(.N_DOM(1), .N_IN(2), .N_OUT(2)) u_core3 (
    .wrck, .wrstn, .shiftwr, .capturewr, .updatewr, .selectwir,
    .wsi(wso2), .wso(wso),
    .core_clk       (clk2),
    .wpi            ({soc_in[1], nets[3]}),
    .to_core        (c3_to_core),
    .from_core      (c3_from_core),
    .wpo            (c3_wpo),
    .core_idft_mode (core_idft_mode[2]),
    .updr           (updr[3]),
    .capdr          (capdr[3])
  );

  assign soc_out[0] = c1_wpo[0];  // O1
  assign nets[1]    = c1_wpo[1];  // O2
  assign nets[2]    = c2_wpo[0];  // O3
  assign nets[3]    = c2_wpo[1];  // O4
  assign nets[4]    = c3_wpo[0];  // O5
  assign soc_out[1] = c3_wpo[1];  // O6

endmodule
