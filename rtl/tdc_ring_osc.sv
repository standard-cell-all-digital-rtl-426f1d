`timescale 1ps/1fs
// tdc_ring_osc: behavioural model of one TDC ring oscillator (not
// synthesizable; the real block is gate-level standard cells).
//
// The real ring is seven NAND stages, one of them taking the enable, with
// dangling inverters that give each channel its own stage delay and
// tri-state buffers across the stages that, when switched on, make the ring
// faster ("second gear", used for the re-conversion). The ring runs only
// while en is high and holds its state while stopped. That behaviour and
// the seven stages follow the source design.
//
// Model: while en is high, one stage output toggles every stage delay, in
// ring order, so every node rises once per 14 stage delays and the seven
// nodes together give one rising edge per two stage delays. The channel
// resolution is therefore 2*T1_PS (gear 0) or 2*T2_PS (gear 1). The delay
// values are parameters set per channel by the instantiating block.
//
// Synthesis note: the delays make this a simulation model; a synthesis tool
// turns the initial state into latches and cannot reproduce the oscillation.
module tdc_ring_osc #(
  parameter real T1_PS = 9.9,    // stage delay, gear 0
  parameter real T2_PS = 8.9     // stage delay, gear 1 (tri-states on)
) (
  input  logic       en,
  input  logic       gear,
  output logic [6:0] node
);
  int p;
  initial begin
    node = 7'b0101010;
    p    = 0;
  end
  always begin
    if (!en) @(posedge en);
    #(gear ? T2_PS : T1_PS);
    if (en) begin
      node[p] = ~node[p];
      p = (p == 6) ? 0 : p + 1;
    end
  end
endmodule
