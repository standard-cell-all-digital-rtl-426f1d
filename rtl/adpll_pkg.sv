`timescale 1ps/1fs
// adpll_pkg: constants and small functions shared by the ADPLL blocks.
//
// The DCO delay cell has a 4-bit fine code (FCW). Code 0000 blocks the
// cell and is never used; the other fifteen codes give fifteen slightly
// different delays. FINE_ORDER lists them from the slowest to the fastest,
// in the order measured for the delay cell of the source design, so that
// index 0 is the slowest setting and index 14 the fastest. Everything else
// here (widths, the stage-count encoding) is this implementation's choice.
package adpll_pkg;

  // Fine-code steps per delay cell (15 usable codes -> 14 steps).
  localparam int unsigned FINE_STEPS_PER_CELL = 14;
  // Maximum number of delay cells in a DCO ring.
  localparam int unsigned MAX_CELLS = 7;

  // Fine codes ordered from slowest to fastest.
  function automatic logic [3:0] fine_code(input logic [3:0] step);
    case (step)
      4'd0:    fine_code = 4'd8;
      4'd1:    fine_code = 4'd2;
      4'd2:    fine_code = 4'd10;
      4'd3:    fine_code = 4'd4;
      4'd4:    fine_code = 4'd14;
      4'd5:    fine_code = 4'd12;
      4'd6:    fine_code = 4'd6;
      4'd7:    fine_code = 4'd9;
      4'd8:    fine_code = 4'd11;
      4'd9:    fine_code = 4'd15;
      4'd10:   fine_code = 4'd13;
      4'd11:   fine_code = 4'd1;
      4'd12:   fine_code = 4'd7;
      4'd13:   fine_code = 4'd5;
      default: fine_code = 4'd3;
    endcase
  endfunction

  // Inverse of fine_code: rank of a code from slowest (0) to fastest (14).
  function automatic int fine_rank(input logic [3:0] code);
    fine_rank = 0;
    for (int s = 0; s < 15; s++)
      if (fine_code(4'(s)) == code) fine_rank = s;
  endfunction

  // Number of delay cells in each DCO ring, chosen by calibration.
  typedef enum logic [1:0] {
    STAGES_7 = 2'b00,   // no cell bypassed
    STAGES_5 = 2'b01,   // first bypass mux active
    STAGES_3 = 2'b11    // both bypass muxes active
  } stages_e;

  function automatic int stages_count(input stages_e s);
    case (s)
      STAGES_3: stages_count = 3;
      STAGES_5: stages_count = 5;
      default:  stages_count = 7;
    endcase
  endfunction

endpackage
