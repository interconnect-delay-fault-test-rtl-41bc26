// tb_tap_controller: drives 3000 random TMS bits into the TAP controller and
// compares its state with an independent reference model of the 16-state
// graph, written as a table of (state, TMS) -> next state. Also checks: five
// TMS=1 clocks reach Test-Logic-Reset from anywhere, TRST_N resets
// asynchronously, ClockDR/ClockIR low only while TCK is low in Capture/Shift,
// UpdateDR/UpdateIR high only while TCK is low in Update, ShiftDR, Select and
// TDO retimed on the falling edge.
module tb_tap_controller;
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;

  logic tck = 1'b0, tms = 1'b1, trst_n = 1'b1, tdo_d = 1'b0;
  tap_state_e state;
  logic clock_dr, shift_dr, update_dr, clock_ir, shift_ir, update_ir;
  logic select, reset_n, tdo, tdo_en;
  logic s_cdr, s_sdr, s_udr, s_cir, s_sir, s_uir;
  int checks = 0, failures = 0;

  tap_controller dut (
    .tck, .tms, .trst_n, .tdo_d, .state, .clock_dr, .shift_dr, .update_dr,
    .clock_ir, .shift_ir, .update_ir, .select, .reset_n, .tdo, .tdo_en,
    .st_capture_dr(s_cdr), .st_shift_dr(s_sdr), .st_update_dr(s_udr),
    .st_capture_ir(s_cir), .st_shift_ir(s_sir), .st_update_ir(s_uir)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Reference state graph: index by name string, to stay independent of the
  // encoding used by the design.
  string ref_s;
  function automatic string nxt(input string s, input logic m);
    case (s)
      "TLR":  return m ? "TLR"  : "RTI";
      "RTI":  return m ? "SDR"  : "RTI";
      "SDR":  return m ? "SIR"  : "CDR";
      "CDR":  return m ? "E1D"  : "SHD";
      "SHD":  return m ? "E1D"  : "SHD";
      "E1D":  return m ? "UDR"  : "PD";
      "PD":   return m ? "E2D"  : "PD";
      "E2D":  return m ? "UDR"  : "SHD";
      "UDR":  return m ? "SDR"  : "RTI";
      "SIR":  return m ? "TLR"  : "CIR";
      "CIR":  return m ? "E1I"  : "SHI";
      "SHI":  return m ? "E1I"  : "SHI";
      "E1I":  return m ? "UIR"  : "PI";
      "PI":   return m ? "E2I"  : "PI";
      "E2I":  return m ? "UIR"  : "SHI";
      "UIR":  return m ? "SDR"  : "RTI";
      default: return "???";
    endcase
  endfunction
  function automatic string name(input tap_state_e s);
    case (s)
      TLR: return "TLR"; RTI: return "RTI"; SEL_DR: return "SDR";
      CAPTURE_DR: return "CDR"; SHIFT_DR: return "SHD"; EXIT1_DR: return "E1D";
      PAUSE_DR: return "PD"; EXIT2_DR: return "E2D"; UPDATE_DR: return "UDR";
      SEL_IR: return "SIR"; CAPTURE_IR: return "CIR"; SHIFT_IR: return "SHI";
      EXIT1_IR: return "E1I"; PAUSE_IR: return "PI"; EXIT2_IR: return "E2I";
      UPDATE_IR: return "UIR"; default: return "???";
    endcase
  endfunction
  function automatic bit ir_side(input string s);
    return s inside {"SIR", "CIR", "SHI", "E1I", "PI", "E2I", "UIR"};
  endfunction

  initial begin
    // asynchronous reset
    #3 trst_n = 1'b0;
    #1 check(state == TLR, "TRST_N resets to Test-Logic-Reset");
    check(!reset_n, "reset_n low during TRST");
    #1 trst_n = 1'b1;
    ref_s = "TLR";
    for (int n = 0; n < 3000; n++) begin
      logic m, d;
      string prev;
      m = ($urandom_range(0, 99) < 40);
      if (n % 400 == 399) m = 1'b1;
      d = $urandom_range(0, 1);
      tms = m; tdo_d = d;
      #5;
      // TCK low half: gated clocks and update strobes
      check(clock_dr == !(ref_s inside {"CDR", "SHD"}), "ClockDR low in Capture/Shift-DR");
      check(clock_ir == !(ref_s inside {"CIR", "SHI"}), "ClockIR low in Capture/Shift-IR");
      check(update_dr == (ref_s == "UDR"), "UpdateDR high in Update-DR");
      check(update_ir == (ref_s == "UIR"), "UpdateIR high in Update-IR");
      check(shift_dr == (ref_s == "SHD"), "ShiftDR retimed");
      check(shift_ir == (ref_s == "SHI"), "ShiftIR retimed");
      check(select == ir_side(ref_s), "Select");
      check(reset_n == (ref_s != "TLR"), "reset_n");
      tck = 1'b1;
      prev = ref_s;
      ref_s = nxt(ref_s, m);
      #1;
      check(name(state) == ref_s, $sformatf("state %s -> %s, got %s", prev, ref_s, name(state)));
      check(clock_dr && clock_ir && !update_dr && !update_ir, "strobes idle while TCK high");
      #4 tck = 1'b0;
      #0.1 check(tdo == d, "TDO retimed on falling edge");
    end
    // five TMS=1 reach TLR
    repeat (5) begin tms = 1'b1; #5 tck = 1'b1; #5 tck = 1'b0; end
    check(state == TLR, "five TMS=1 reach Test-Logic-Reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
