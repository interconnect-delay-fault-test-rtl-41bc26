// bypass_register: one-bit bypass register (IEEE 1149.1 BYPASS register,
// IEEE 1500 WBY). On each rising clock_dr edge it loads si while shifting and
// a constant 0 on capture, so a scan through it is one bit long. The register
// is reset to 0 by rst_n. The one-bit register is the usual boundary-scan
// bypass; its reset is this design's choice.
module bypass_register (
  input  logic clock_dr,
  input  logic rst_n,
  input  logic shift_dr,
  input  logic si,
  output logic so
);

  always_ff @(posedge clock_dr or negedge rst_n)
    if (!rst_n) so <= 1'b0;
    else        so <= shift_dr & si;

endmodule
