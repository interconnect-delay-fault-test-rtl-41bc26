// chip_delay_run: testbench-only harness that runs Delay_EXTEST on one
// chip_1149 of a given size and counts its own checks and failures.
// The chip has N_DOM system clock domains with N_IN input and N_IN output
// cells each. Output pin p is wired back to input pin p; each wire has a 1 ns
// delay, or 20 ns when it is made slow. Domain d runs at a period of
// 5 + 3*d ns (5, 8, 11, 14 ns), so a slow wire misses every domain's
// one-cycle capture but still meets the 2.5 TCK (25 ns) interval of EXTEST.
// Sequence: Delay_EXTEST with ROUNDS random pattern pairs (A launched and
// settled, then B launched with a stretched Update-DR and captured one system
// clock later) with a random set of slow wires from the second round on; for
// every domain the launch-to-capture interval must equal its period, and the
// scanned-out inputs must hold B except on slow wires where A and B differ.
// Then EXTEST must see B on every wire, slow or not. done rises at the end.
// Boundary register cell k (counted from TDI): domain d = k / (2*N_IN),
// input cells first, then output cells.
module chip_delay_run #(
  parameter int N_DOM  = 3,
  parameter int N_IN   = 42,
  parameter int ROUNDS = 4
) (
  output int checks,
  output int failures,
  output bit done
);
  timeunit 1ns; timeprecision 1ps;
  import idft_pkg::*;

  localparam int N_PIN = N_DOM * N_IN;
  localparam int LEN   = 2 * N_PIN;

  logic tck, tms, tdi, trst_n, tdo, tdo_en;
  logic [N_DOM-1:0] sysclk = '0;
  logic [N_DOM-1:0] updr, capdr;
  logic [N_PIN-1:0] pin_in, to_core, pin_out;
  logic [N_PIN-1:0] from_core = '0;
  logic [N_PIN-1:0] slow = '0;
  logic idft_mode;
  realtime interval [N_DOM];   // last launch-to-capture time of each domain

  jtag_driver #(.HALF(5)) u_drv (.tck, .tms, .tdi, .trst_n, .tdo);

  chip_1149 #(.N_DOM(N_DOM), .N_IN(N_IN), .N_OUT(N_IN)) dut (
    .tck, .tms, .trst_n, .tdi, .tdo, .tdo_en, .sysclk,
    .pin_in, .to_core, .from_core, .pin_out, .idft_mode, .updr, .capdr
  );

  for (genvar d = 0; d < N_DOM; d++) begin : g_dom
    localparam real PER = 5.0 + 3.0 * d;
    always #(PER / 2.0) sysclk[d] = ~sysclk[d];
    realtime t_up; logic armed = 1'b0;
    always @(posedge updr[d]) if (idft_mode) begin t_up = $realtime; armed = 1'b1; end
    always @(posedge capdr[d]) if (armed) begin interval[d] = $realtime - t_up; armed = 1'b0; end
  end

  for (genvar p = 0; p < N_PIN; p++) begin : g_wire
    logic w_fast, w_slow;
    always @(pin_out[p]) w_fast <= #1 pin_out[p];
    always @(pin_out[p]) w_slow <= #20 pin_out[p];
    initial begin #0.5; w_fast = pin_out[p]; w_slow = pin_out[p]; end  // power-up value
    assign pin_in[p] = slow[p] ? w_slow : w_fast;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (%0d domains x %0d): %s", N_DOM, N_IN, what); end
  endtask

  function automatic int in_cell(input int p);
    return (p / N_IN) * 2 * N_IN + (p % N_IN);
  endfunction
  function automatic int out_cell(input int p);
    return (p / N_IN) * 2 * N_IN + N_IN + (p % N_IN);
  endfunction

  // DR scan of the whole boundary register; cells are indexed from TDI.
  task automatic scan(input logic [N_PIN-1:0] drive, output logic [N_PIN-1:0] seen,
                      input int stretch);
    logic o;
    logic [LEN-1:0] cin = '0, cout;
    for (int p = 0; p < N_PIN; p++) cin[out_cell(p)] = drive[p];
    u_drv.tick(1'b1, 1'b0, o);  // Select-DR
    u_drv.tick(1'b0, 1'b0, o);  // Capture-DR
    u_drv.tick(1'b0, 1'b0, o);  // Shift-DR
    for (int i = 0; i < LEN; i++) begin
      u_drv.tick(i == LEN - 1, cin[LEN-1-i], o);
      cout[LEN-1-i] = o;
    end
    u_drv.tick(1'b1, 1'b0, o);  // Update-DR
    #1;
    #(stretch);
    for (int p = 0; p < N_PIN; p++) seen[p] = cout[in_cell(p)];
  endtask

  function automatic logic [N_PIN-1:0] rand_bits(input int one_in);
    logic [N_PIN-1:0] v;
    for (int p = 0; p < N_PIN; p++) v[p] = ($urandom % one_in) == 0;
    return v;
  endfunction

  logic [255:0]     ir_o;
  logic [N_PIN-1:0] a, b, seen, expect_in, slow_hit;
  int               caught = 0;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    u_drv.reset();
    u_drv.ir_scan(IR_LEN, 256'(IR_DELAY_EXTEST), ir_o);
    check(idft_mode, "Delay_EXTEST raises IDFT_Mode");

    for (int r = 0; r < ROUNDS; r++) begin
      a = rand_bits(2);
      b = rand_bits(2);
      slow = (r == 0) ? '0 : rand_bits(8);
      scan(a, seen, 60);
      check(pin_out == a, $sformatf("round %0d: pattern A on the pins", r));
      scan(b, seen, 60);
      check(pin_out == b, $sformatf("round %0d: pattern B launched", r));
      for (int d = 0; d < N_DOM; d++)
        check(interval[d] == 5.0 + 3.0 * d,
              $sformatf("round %0d: domain %0d launch-to-capture %0t", r, d, interval[d]));
      scan(b, seen, 60);
      slow_hit  = slow & (a ^ b);
      expect_in = (b & ~slow_hit) | (a & slow_hit);
      check(seen == expect_in,
            $sformatf("round %0d: %0d of %0d captured inputs differ", r,
                      $countones(seen ^ expect_in), N_PIN));
      check($countones(seen ^ b) == $countones(slow_hit),
            $sformatf("round %0d: %0d slow transitions, %0d caught", r,
                      $countones(slow_hit), $countones(seen ^ b)));
      caught += $countones(seen ^ b);
    end
    check(caught > 0, "some slow wires were exercised");
    $display("%0d domains x %0d input cells: %0d delay faults caught in %0d rounds",
             N_DOM, N_IN, caught, ROUNDS);

    // EXTEST leaves 2.5 TCK for the same slow wires: nothing is caught
    u_drv.ir_scan(IR_LEN, 256'(IR_EXTEST), ir_o);
    check(!idft_mode, "EXTEST clears IDFT_Mode");
    scan(a, seen, 0);
    scan(b, seen, 0);
    scan(b, seen, 0);
    check(seen == b, "EXTEST captures B on every wire");

    done = 1'b1;
  end

endmodule
