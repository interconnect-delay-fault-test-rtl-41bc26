// idft_board: two IEEE 1149.1 chips on a board sharing one system clock,
// each with its own IDFT controller, as in the single-clock board example.
//
// The JTAG chain is TDI -> chip 1 -> chip 2 -> TDO with common TCK, TMS and
// TRST. The board interconnect wires are not logic: the pins of both chips are
// brought out (chip1_pin_out, chip2_pin_in, ...) and the board wiring, with
// whatever delay it has, is connected outside this module. A delay fault on
// the wire from chip 1's output cell to chip 2's input cell is caught when,
// in DELAY_EXTEST, chip 2 captures the old value one SysCLK after chip 1
// launched a transition.
module idft_board (
  input  logic tck,
  input  logic tms,
  input  logic trst_n,
  input  logic tdi,
  output logic tdo,
  output logic tdo_en,
  input  logic sysclk,
  // board-side pins of the two chips
  output logic chip1_pin_out,
  input  logic chip1_pin_in,
  output logic chip2_pin_out,
  input  logic chip2_pin_in,
  // core-side signals of the two chips
  input  logic chip1_from_core,
  output logic chip1_to_core,
  input  logic chip2_from_core,
  output logic chip2_to_core,
  // IDFT control signals, for observation
  output logic [1:0] updr,
  output logic [1:0] capdr
);

  logic tdo1, tdo1_en, tdo2_en;

  chip_1149 u_chip1 (
    .tck, .tms, .trst_n, .tdi, .tdo(tdo1), .tdo_en(tdo1_en),
    .sysclk    (sysclk),
    .pin_in    (chip1_pin_in),
    .to_core   (chip1_to_core),
    .from_core (chip1_from_core),
    .pin_out   (chip1_pin_out),
    .idft_mode (),
    .updr      (updr[0]),
    .capdr     (capdr[0])
  );

  chip_1149 u_chip2 (
    .tck, .tms, .trst_n, .tdi(tdo1), .tdo, .tdo_en(tdo2_en),
    .sysclk    (sysclk),
    .pin_in    (chip2_pin_in),
    .to_core   (chip2_to_core),
    .from_core (chip2_from_core),
    .pin_out   (chip2_pin_out),
    .idft_mode (),
    .updr      (updr[1]),
    .capdr     (capdr[1])
  );

  assign tdo_en = tdo2_en;

endmodule
