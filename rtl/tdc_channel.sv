`timescale 1ps/1fs
// tdc_channel: counting and latching logic of one 2x1 TDC channel.
//
// Every one of the seven ring-oscillator nodes clocks its own 8-bit
// counter. At the start of each conversion (rising edge of the ring enable)
// the counter values are copied; at its end the seven differences (modulo
// 256) are summed, which is the number of ring edges seen during the pulse.
// The first conversion (time input 1) is latched on its falling edge into
// n1, the re-conversion of the delayed clone (time input 2) into n2. The
// ring runs in its faster gear during the clone. Results are 11-bit two's
// complement, negative when the feedback clock led, saturated at +-1023.
// The eight-bit node counters, their sum, the latching on the falling edge
// and the 11-bit format follow the source design; snapshotting instead of
// clearing the counters is this implementation's choice.
//
// Interface: tin1 and tin2 must not overlap (tin2 stays low in SIMO mode).
// sign must be stable from the start of tin1 to the end of tin2.
//
// Synthesis note: gear is a plain copy of tin2 (the ring switches gear for
// the clone), so that output is driven straight from an input.
module tdc_channel (
  input  logic              rst_n,
  input  logic [6:0]        node,
  input  logic              tin1,
  input  logic              tin2,
  input  logic              sign,
  output logic              ring_en,
  output logic              gear,
  output logic signed [10:0] n1,
  output logic signed [10:0] n2
);
  logic [7:0] cnt   [7];
  logic [7:0] start [7];
  logic [10:0] total;
  logic signed [10:0] result;

  assign ring_en = tin1 | tin2;
  assign gear    = tin2;

  for (genvar m = 0; m < 7; m++) begin : g_node
    logic [7:0] c;
    always_ff @(posedge node[m] or negedge rst_n)
      if (!rst_n) c <= '0;
      else        c <= c + 1'b1;
    assign cnt[m] = c;
  end

  always_ff @(posedge ring_en or negedge rst_n)
    if (!rst_n) start <= '{default: '0};
    else        start <= cnt;

  always_comb begin
    total = '0;
    for (int m = 0; m < 7; m++) total += 11'(8'(cnt[m] - start[m]));
    if (total > 11'd1023) result = 11'sd1023;
    else                  result = signed'(total);
    if (!sign) result = -result;
  end

  always_ff @(negedge tin1 or negedge rst_n)
    if (!rst_n) n1 <= '0;
    else        n1 <= result;

  always_ff @(negedge tin2 or negedge rst_n)
    if (!rst_n) n2 <= '0;
    else        n2 <= result;
endmodule
