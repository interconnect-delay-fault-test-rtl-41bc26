// tb_idft_controller: checks the IDFT edge generator against its timing.
// SysCLK has a 5 ns period; UpdateDR and ShiftDR are driven at random phases
// to it. Checks:
//   normal mode: UpDR follows UpdateDR, CapDR follows ClockDR;
//   IDFT mode: UpDR rises on the first rising SysCLK after UpdateDR rises,
//   CapDR rises exactly one SysCLK later, both fall on the first / second
//   SysCLK edges after UpdateDR falls, and ClockDR is not passed (no capture
//   in Capture-DR) until ShiftDR is high, when CapDR follows ClockDR again.
module tb_idft_controller;
  timeunit 1ns; timeprecision 1ps;

  logic sysclk = 1'b0, rst_n = 1'b1, idft_mode = 1'b0;
  logic shift_dr = 1'b0, update_dr = 1'b0, clock_dr = 1'b1;
  logic updr, capdr, idft_updr, idft_capdr;
  int checks = 0, failures = 0;
  realtime t_up, t_cap, t_edge;

  idft_controller dut (.sysclk, .rst_n, .idft_mode, .shift_dr, .update_dr,
                       .clock_dr, .updr, .capdr, .idft_updr, .idft_capdr);

  always #2.5 sysclk = ~sysclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // next rising SysCLK edge strictly after time t (edges at 2.5 + 5k)
  function automatic realtime next_edge(input realtime t);
    int k = $rtoi((t - 2.5) / 5.0) + 1;
    realtime e = 2.5 + 5.0 * k;
    while (e <= t) e += 5.0;
    while (e - 5.0 > t) e -= 5.0;
    return e;
  endfunction

  always @(posedge updr) t_up = $realtime;
  always @(posedge capdr) t_cap = $realtime;

  initial begin
    #0.3 rst_n = 1'b0;
    #0.3 rst_n = 1'b1;
    check(!idft_updr && !idft_capdr, "reset clears FF1/FF2");

    // normal mode: pass-through
    repeat (20) begin
      #($urandom_range(1, 9) * 0.7);
      update_dr = $urandom_range(0, 1);
      clock_dr  = $urandom_range(0, 1);
      shift_dr  = $urandom_range(0, 1);
      #0.01 check(updr == update_dr && capdr == clock_dr, "normal mode pass-through");
    end
    update_dr = 0; clock_dr = 1; shift_dr = 0;
    #20 idft_mode = 1'b1;
    #20;

    repeat (12) begin
      realtime t0, t1;
      // stretched Update-DR at a random phase
      #($urandom_range(0, 49) * 0.1);
      update_dr = 1'b1; t0 = $realtime;
      #($urandom_range(12, 40));
      update_dr = 1'b0; t1 = $realtime;
      // Capture-DR: ClockDR pulses low/high but must not reach CapDR
      #($urandom_range(2, 6));
      clock_dr = 1'b0; #0.01 check(capdr == idft_capdr, "Capture-DR edge suppressed");
      #5 clock_dr = 1'b1;
      check(t_up == next_edge(t0), $sformatf("UpDR at first SysCLK edge: %0t vs %0t", t_up, next_edge(t0)));
      check(t_cap - t_up == 5.0, $sformatf("CapDR one SysCLK after UpDR: %0t", t_cap - t_up));
      #15;
      check(!updr && !capdr, "UpDR/CapDR fall after Update-DR");
      // Shift-DR: ClockDR passed again
      clock_dr = 1'b0; #0.5 shift_dr = 1'b1;
      repeat (3) begin
        #5 clock_dr = 1'b1; #0.01 check(capdr == 1'b1, "ClockDR passed in Shift-DR");
        #5 clock_dr = 1'b0; #0.01 check(capdr == 1'b0, "ClockDR passed in Shift-DR");
      end
      #2 shift_dr = 1'b0; clock_dr = 1'b1;
      #0.01 check(capdr == 1'b0 && updr == 1'b0, "idle in IDFT mode");
      #10;
    end

    idft_mode = 1'b0;
    #0.01 check(capdr == clock_dr && updr == update_dr, "back to normal mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
