// idft_top: the two demonstrators of the interconnect delay fault test, side
// by side and independent of each other:
//   soc_*  the SoC of three IEEE 1500 wrapped cores in two clock domains
//          (idft_soc), with its own TAP and clocks CLK1/CLK2;
//   brd_*  the board of two IEEE 1149.1 chips on one system clock
//          (idft_board), whose interconnect wires are external connections.
// See idft_soc and idft_board for the behaviour and timing of each.
module idft_top (
  // SoC
  input  logic       soc_tck,
  input  logic       soc_tms,
  input  logic       soc_trst_n,
  input  logic       soc_tdi,
  output logic       soc_tdo,
  output logic       soc_tdo_en,
  input  logic       soc_clk1,
  input  logic       soc_clk2,
  input  logic [1:0] soc_in,
  output logic [1:0] soc_out,
  output logic [1:0] soc_c1_to_core,
  input  logic [1:0] soc_c1_from_core,
  output logic [1:0] soc_c2_to_core,
  input  logic [1:0] soc_c2_from_core,
  output logic [1:0] soc_c3_to_core,
  input  logic [1:0] soc_c3_from_core,
  output logic [4:1] soc_nets,
  output logic [2:0] soc_core_idft_mode,
  output logic [3:0] soc_updr,
  output logic [3:0] soc_capdr,
  // board
  input  logic       brd_tck,
  input  logic       brd_tms,
  input  logic       brd_trst_n,
  input  logic       brd_tdi,
  output logic       brd_tdo,
  output logic       brd_tdo_en,
  input  logic       brd_sysclk,
  output logic       brd_chip1_pin_out,
  input  logic       brd_chip1_pin_in,
  output logic       brd_chip2_pin_out,
  input  logic       brd_chip2_pin_in,
  input  logic       brd_chip1_from_core,
  output logic       brd_chip1_to_core,
  input  logic       brd_chip2_from_core,
  output logic       brd_chip2_to_core,
  output logic [1:0] brd_updr,
  output logic [1:0] brd_capdr
);

  idft_soc u_soc (
    .tck(soc_tck), .tms(soc_tms), .trst_n(soc_trst_n), .tdi(soc_tdi),
    .tdo(soc_tdo), .tdo_en(soc_tdo_en), .clk1(soc_clk1), .clk2(soc_clk2),
    .soc_in, .soc_out,
    .c1_to_core(soc_c1_to_core), .c1_from_core(soc_c1_from_core),
    .c2_to_core(soc_c2_to_core), .c2_from_core(soc_c2_from_core),
    .c3_to_core(soc_c3_to_core), .c3_from_core(soc_c3_from_core),
    .nets(soc_nets), .core_idft_mode(soc_core_idft_mode),
    .updr(soc_updr), .capdr(soc_capdr)
  );

  idft_board u_board (
    .tck(brd_tck), .tms(brd_tms), .trst_n(brd_trst_n), .tdi(brd_tdi),
    .tdo(brd_tdo), .tdo_en(brd_tdo_en), .sysclk(brd_sysclk),
    .chip1_pin_out(brd_chip1_pin_out), .chip1_pin_in(brd_chip1_pin_in),
    .chip2_pin_out(brd_chip2_pin_out), .chip2_pin_in(brd_chip2_pin_in),
    .chip1_from_core(brd_chip1_from_core), .chip1_to_core(brd_chip1_to_core),
    .chip2_from_core(brd_chip2_from_core), .chip2_to_core(brd_chip2_to_core),
    .updr(brd_updr), .capdr(brd_capdr)
  );

endmodule
