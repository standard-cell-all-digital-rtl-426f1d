`timescale 1ps/1fs
// sync2: two-flip-flop synchronizer for a slow level signal entering a
// clock domain. Output follows the input two clock edges later; reset
// clears it. A standard building block, not taken from the source design.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic m;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {q, m} <= 2'b00;
    else        {q, m} <= {m, d};
endmodule
