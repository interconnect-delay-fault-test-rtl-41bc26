// instruction_register: IEEE 1149.1 instruction register and decoder of a chip
// with the Delay_EXTEST instruction.
//
// The shift stage captures the fixed pattern ...01 on the rising clock_ir edge
// leaving Capture-IR and shifts tdi in at the MSB, LSB first out on so, on each
// rising clock_ir edge leaving Shift-IR. The update stage loads on the rising
// update_ir edge (falling TCK in Update-IR) and is reset to BYPASS by rst_n
// (low in Test-Logic-Reset). Decoding (opcodes in idft_pkg):
//   EXTEST        boundary register selected, output cells drive the pins
//   SAMPLE        boundary register selected, functional mode
//   DELAY_EXTEST  like EXTEST, and IDFT_Mode = 1 for the IDFT controllers
//   others        BYPASS
// The instruction set follows the text; opcodes and length are this design's.
module instruction_register
  import idft_pkg::*;
(
  input  logic              clock_ir,
  input  logic              update_ir,
  input  logic              shift_ir,
  input  logic              rst_n,
  input  logic              si,
  output logic              so,
  output logic [IR_LEN-1:0] ir,
  output test_ctrl_t        ctrl
);

  logic [IR_LEN-1:0] sh;

  always_ff @(posedge clock_ir)
    if (shift_ir) sh <= {si, sh[IR_LEN-1:1]};
    else          sh <= IR_LEN'(2'b01);

  always_ff @(posedge update_ir or negedge rst_n)
    if (!rst_n) ir <= IR_BYPASS;
    else        ir <= sh;

  assign so = sh[0];

  always_comb begin
    ctrl = '0;
    unique case (ir)
      IR_EXTEST:       begin ctrl.sel_bsr = 1'b1; ctrl.out_mode = 1'b1; end
      IR_SAMPLE:       ctrl.sel_bsr = 1'b1;
      IR_DELAY_EXTEST: begin
        ctrl.sel_bsr = 1'b1; ctrl.out_mode = 1'b1; ctrl.idft_mode = 1'b1;
      end
      default:         ctrl = '0;
    endcase
  end

endmodule
