// wir: IEEE 1500 wrapper instruction register and decoder, with the
// Delay_EXTEST instruction that raises Core_IDFT_Mode.
//
// Operated by the wrapper serial control (WSC): while selectwir = 1 the shift
// stage captures ...01 on a rising wrck with capturewr, and shifts wsi in at the
// MSB (LSB out first on wso) on a rising wrck with shiftwr. The update stage
// loads on the falling wrck while updatewr and selectwir are high, and wrstn
// resets it to WS_BYPASS. Decoding (opcodes in idft_pkg):
//   WS_EXTEST        WBR selected, output cells drive the wrapper outputs
//   WS_INTEST        WBR selected, input cells drive the core
//   WS_DELAY_EXTEST  as WS_EXTEST, and Core_IDFT_Mode = 1
//   others           WS_BYPASS (WBY selected)
// Modes follow the text (core test, interconnect test, bypass); opcodes and
// length are this design's.
module wir
  import idft_pkg::*;
(
  input  logic               wrck,
  input  logic               wrstn,
  input  logic               shiftwr,
  input  logic               capturewr,
  input  logic               updatewr,
  input  logic               selectwir,
  input  logic               wsi,
  output logic               wso,
  output logic [WIR_LEN-1:0] wir_q,
  output test_ctrl_t         ctrl
);

  logic [WIR_LEN-1:0] sh;

  always_ff @(posedge wrck)
    if (selectwir) begin
      if (shiftwr)        sh <= {wsi, sh[WIR_LEN-1:1]};
      else if (capturewr) sh <= WIR_LEN'(2'b01);
    end

  always_ff @(negedge wrck or negedge wrstn)
    if (!wrstn)                      wir_q <= WS_BYPASS;
    else if (updatewr && selectwir)  wir_q <= sh;

  assign wso = sh[0];

  always_comb begin
    ctrl = '0;
    unique case (wir_q)
      WS_EXTEST:       begin ctrl.sel_bsr = 1'b1; ctrl.out_mode = 1'b1; end
      WS_INTEST:       begin ctrl.sel_bsr = 1'b1; ctrl.in_mode  = 1'b1; end
      WS_DELAY_EXTEST: begin
        ctrl.sel_bsr = 1'b1; ctrl.out_mode = 1'b1; ctrl.idft_mode = 1'b1;
      end
      default:         ctrl = '0;
    endcase
  end

endmodule
