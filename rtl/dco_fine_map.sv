`timescale 1ps/1fs
// dco_fine_map: maps the linear DCO fine-tuning word to the 4-bit code of
// every delay cell in a ring.
//
// Each delay cell has fifteen usable codes; ordered from slowest to
// fastest they form fourteen small delay steps. For an increasing fine
// word the first cell is walked from its slowest to its fastest code, then
// the second cell, and so on, so word w sets cell k to step
// clamp(w - 14k, 0, 14). Only the cells in use (3, 5 or 7, from
// calibration) are walked; the word saturates at 14 * cells. Bypassed cells
// keep the slowest code. The walk order and the code order follow the
// source design; the word width and saturation are this implementation's.
//
// Interface: purely combinational. fine is unsigned; fcw[k] drives cell k.
//
// Synthesis note: fine_max is always a multiple of 14, so its bit 0 is a
// constant 0.
module dco_fine_map
  import adpll_pkg::*;
#(
  parameter int unsigned FINE_W = 7
) (
  input  logic [FINE_W-1:0] fine,
  input  stages_e           stages,
  output logic [3:0]        fcw [MAX_CELLS],
  output logic [FINE_W-1:0] fine_max     // largest useful word for this ring length
);
  int n_cells;
  int w, st;

  assign n_cells  = stages_count(stages);
  assign fine_max = FINE_W'(n_cells * FINE_STEPS_PER_CELL);

  always_comb begin
    w        = (int'(fine) > int'(fine_max)) ? int'(fine_max) : int'(fine);
    for (int k = 0; k < MAX_CELLS; k++) begin
      st = w - k * int'(FINE_STEPS_PER_CELL);
      if (st < 0 || k >= n_cells) st = 0;
      if (st > int'(FINE_STEPS_PER_CELL)) st = FINE_STEPS_PER_CELL;
      fcw[k] = fine_code(4'(st));
    end
  end
endmodule
