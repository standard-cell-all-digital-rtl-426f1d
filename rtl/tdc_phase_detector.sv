`timescale 1ps/1fs
// tdc_phase_detector: converts the time between the rising edges of the
// reference clock and the feedback clock into a pulse plus a sign.
//
// Two edge-set flip-flops record which clock has risen; when both have,
// both are cleared. The time-input pulse is high from the first rising edge
// to the second, and sign is 1 when the reference edge came first (the
// feedback clock lags). Working from rising edge to rising edge and giving
// a positive result for a leading reference follow the source design; the
// two-flop structure is this implementation's choice.
//
// Interface: asynchronous; pulse and sign are valid from the rising edge
// of pulse. sign holds until the next pulse starts.
module tdc_phase_detector (
  input  logic rst_n,
  input  logic ref_clk,
  input  logic fb_clk,
  output logic pulse,
  output logic sign
);
  logic up, dn, clr;

  assign clr   = (up & dn) | ~rst_n;
  assign pulse = up ^ dn;

  always_ff @(posedge ref_clk or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge fb_clk or posedge clr)
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;

  always_ff @(posedge pulse or negedge rst_n)
    if (!rst_n) sign <= 1'b0;
    else        sign <= up;
endmodule
