// idft_pkg: types and constants shared by the interconnect delay fault test
// (IDFT) design.
//
// The TAP state encoding is the 4-bit encoding commonly used for IEEE 1149.1
// controllers; the standard fixes only the state graph (16 states), not the
// codes. The instruction opcodes of the 1149.1 instruction register and of the
// IEEE 1500 wrapper instruction register are this design's own choice: the
// only fixed rule honoured is that an all-ones opcode selects BYPASS.
package idft_pkg;

  typedef enum logic [3:0] {
    TLR        = 4'hF,  // Test-Logic-Reset
    RTI        = 4'hC,  // Run-Test/Idle
    SEL_DR     = 4'h7,
    CAPTURE_DR = 4'h6,
    SHIFT_DR   = 4'h2,
    EXIT1_DR   = 4'h1,
    PAUSE_DR   = 4'h3,
    EXIT2_DR   = 4'h0,
    UPDATE_DR  = 4'h5,
    SEL_IR     = 4'h4,
    CAPTURE_IR = 4'hE,
    SHIFT_IR   = 4'hA,
    EXIT1_IR   = 4'h9,
    PAUSE_IR   = 4'hB,
    EXIT2_IR   = 4'h8,
    UPDATE_IR  = 4'hD
  } tap_state_e;

  // 1149.1 chip instruction register
  localparam int unsigned IR_LEN = 3;
  localparam logic [IR_LEN-1:0] IR_EXTEST       = 3'b000;
  localparam logic [IR_LEN-1:0] IR_SAMPLE       = 3'b001;
  localparam logic [IR_LEN-1:0] IR_DELAY_EXTEST = 3'b010;
  localparam logic [IR_LEN-1:0] IR_BYPASS       = 3'b111;

  // IEEE 1500 wrapper instruction register
  localparam int unsigned WIR_LEN = 3;
  localparam logic [WIR_LEN-1:0] WS_EXTEST       = 3'b000;
  localparam logic [WIR_LEN-1:0] WS_INTEST       = 3'b001;
  localparam logic [WIR_LEN-1:0] WS_DELAY_EXTEST = 3'b010;
  localparam logic [WIR_LEN-1:0] WS_BYPASS       = 3'b111;

  // Decoded test-register controls shared by both instruction registers.
  typedef struct packed {
    logic sel_bsr;    // boundary register is the selected data register
    logic out_mode;   // output cells drive their pins from the update stage
    logic in_mode;    // input cells drive the core from the update stage
    logic idft_mode;  // Delay_EXTEST: IDFT_Mode / Core_IDFT_Mode
  } test_ctrl_t;

endpackage
