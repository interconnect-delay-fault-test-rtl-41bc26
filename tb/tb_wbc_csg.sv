// tb_wbc_csg: exhaustive check of the WBC control signal generator over all
// 32 input combinations against its Boolean definition.
module tb_wbc_csg;
  timeunit 1ns; timeprecision 1ps;
  logic wrck, shiftwr, capturewr, updatewr, selectwir;
  logic shiftdr_sig, capdr_sig, updr_sig;
  int checks = 0, failures = 0;

  wbc_csg dut (.wrck, .shiftwr, .capturewr, .updatewr, .selectwir,
               .shiftdr_sig, .capdr_sig, .updr_sig);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      {wrck, shiftwr, capturewr, updatewr, selectwir} = 5'(v);
      #1;
      if (selectwir) check({shiftdr_sig, capdr_sig, updr_sig} == 3'b000, "WIR selected: all low");
      else begin
        check(shiftdr_sig == shiftwr, "ShiftDR_Sig = ShiftWR");
        check(capdr_sig == (wrck && (shiftwr || capturewr)), "CapDR_Sig = WRCK in shift/capture");
        check(updr_sig == (!wrck && updatewr), "UpDR_Sig = inverted WRCK in update");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
