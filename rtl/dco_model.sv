// dco_model: behavioural model of the standard-cell digitally controlled
// oscillator (not synthesizable; the real block is a gate-level netlist).
//
// The real DCO is NRINGS identical ring oscillators whose delay-cell
// outputs are tied together through tri-state drivers. Each ring has one
// drive enable; enabling more rings lowers the effective resistance at every
// shared node and raises the frequency (coarse tuning). Each ring has seven
// programmable delay cells; two bypass muxes (skip_sel1, skip_sel2) shorten
// the ring to five or three cells (PVT calibration). Every cell has a 4-bit
// fine code; the fifteen non-zero codes give slightly different delays
// (fine tuning, about 1 MHz per step), and code 0000 stops the oscillation.
// These ports and that behaviour follow the source design.
//
// The timing numbers are this model's own: a cell delays by
//   PVT * (T_FIX_PS + T_RC_PS * (NRINGS/2) / n_active) - rank * T_FINE_PS
// where rank is 0 for the slowest code and 14 for the fastest, and the
// output period is twice the sum over the active cells. With the defaults,
// five cells, half the rings and the slowest codes give about 860 MHz.
//
// Interface: clk_out toggles each half period; a new setting takes effect
// at the next half period. No drive enabled or a zero code stops clk_out.
`timescale 1ps/1fs
module dco_model
  import adpll_pkg::*;
#(
  parameter int unsigned NRINGS    = 256,
  parameter real         PVT       = 1.0,
  parameter real         T_FIX_PS  = 60.0,
  parameter real         T_RC_PS   = 56.0,
  parameter real         T_FINE_PS = 0.5
) (
  input  logic [NRINGS-1:0] drive,
  input  logic              skip_sel1,
  input  logic              skip_sel2,
  input  logic [3:0]        fcw [MAX_CELLS],
  output logic              clk_out
);
  real half_ps;
  int  n_on, n_cells;
  bit  stopped;

  always_comb begin
    n_on = $countones(drive);
    n_cells = skip_sel2 ? 3 : (skip_sel1 ? 5 : 7);
    stopped = (n_on == 0);
    half_ps = 0.0;
    for (int k = 0; k < MAX_CELLS; k++)
      if (k < n_cells) begin
        if (fcw[k] == 4'd0) stopped = 1'b1;
        half_ps += PVT * (T_FIX_PS + T_RC_PS * (real'(NRINGS) / 2.0) / real'((n_on == 0) ? 1 : n_on))
                 - real'(fine_rank(fcw[k])) * T_FINE_PS;
      end
  end

  initial clk_out = 1'b0;
  always begin
    if (stopped) begin
      clk_out = 1'b0;
      #(1000.0);
    end else begin
      #(half_ps);
      clk_out = ~clk_out;
    end
  end
endmodule
