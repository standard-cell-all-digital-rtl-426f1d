`timescale 1ps/1fs
// tdc_delay_line: behavioural model of the delay line that makes the
// delayed clone of the TDC time input (not synthesizable; the real block
// is a chain of standard delay cells).
//
// The clone is a copy of the time-input pulse delayed by DELAY_PS. The
// source design needs the delay to fall between 4 ns and 8 ns in every PVT
// corner so that the clone arrives in the idle window of the phase detector
// for a reference clock of at most 100 MHz; the exact value and matching
// between channels do not matter. The 6 ns default is this model's choice.
//
// Interface: both edges of din appear on dout DELAY_PS later.
//
// Synthesis note: a synthesis tool drops the delays and sees no useful
// logic; the real block is a chain of delay cells placed by hand.
module tdc_delay_line #(
  parameter real DELAY_PS = 6000.0
) (
  input  logic din,
  output logic dout
);
  initial dout = 1'b0;
  // One process per edge, so a pulse shorter than the delay is still copied
  // whole; edges of the same polarity must be further apart than DELAY_PS,
  // which holds for any reference period above 8 ns.
  always @(posedge din) begin
    #(DELAY_PS);
    dout <= 1'b1;
  end
  always @(negedge din) begin
    #(DELAY_PS);
    dout <= 1'b0;
  end
endmodule
