// bsc_chain: the part of a boundary scan register (or wrapper boundary
// register) that belongs to one system clock domain. All its cells share one
// capture/shift clock and one update clock, which in Delay_EXTEST come from the
// IDFT controller of that domain (CapDR, UpDR).
//
// Scan order: si -> input cells 0..N_IN-1 -> output cells 0..N_OUT-1 -> so.
// Input cells take pin_in and drive to_core (in_mode selects their update
// stage); output cells take from_core and drive pin_out (out_mode selects their
// update stage). The order and the split into input and output cells are this
// design's choice. Timing is that of boundary_scan_cell.
module bsc_chain #(
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_OUT = 1
) (
  input  logic             clock_dr,
  input  logic             update_dr,
  input  logic             shift_dr,
  input  logic             in_mode,
  input  logic             out_mode,
  input  logic             si,
  output logic             so,
  input  logic [N_IN-1:0]  pin_in,
  output logic [N_IN-1:0]  to_core,
  input  logic [N_OUT-1:0] from_core,
  output logic [N_OUT-1:0] pin_out
);

  logic [N_IN+N_OUT:0] chain;
  assign chain[0] = si;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    boundary_scan_cell u_cell (
      .clock_dr (clock_dr), .update_dr(update_dr), .shift_dr(shift_dr),
      .mode     (in_mode),  .pi(pin_in[i]),        .si(chain[i]),
      .po       (to_core[i]), .so(chain[i+1])
    );
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    boundary_scan_cell u_cell (
      .clock_dr (clock_dr), .update_dr(update_dr), .shift_dr(shift_dr),
      .mode     (out_mode), .pi(from_core[j]),     .si(chain[N_IN+j]),
      .po       (pin_out[j]), .so(chain[N_IN+j+1])
    );
  end

  assign so = chain[N_IN+N_OUT];

endmodule
