`timescale 1ps/1fs
// tdc_dsp: digital post-processing of the parallel TDC channels.
//
// Each channel result N_ij (channel i, conversion j) is multiplied by its
// estimated resolution T_ij in ps (5 bits) and the products are summed. In
// MIMO mode all eight products are used; in SIMO mode only the first
// conversions, and their sum is doubled so both modes share one scale. The
// output is eight times the resolution-weighted average, i.e. the time
// error in units of 1/8 ps, as a 20-bit signed word. Weighting by the
// estimated resolutions, averaging, the SIMO/MIMO switch and the widths
// (11-bit inputs, 5-bit weights, 20-bit output) follow the source design;
// keeping the average as an 8x sum is this implementation's choice.
//
// Interface: registered output, one result per rising clk edge.
module tdc_dsp #(
  parameter int unsigned NCH   = 4,
  parameter int unsigned N_W   = 11,
  parameter int unsigned W_W   = 5,
  parameter int unsigned OUT_W = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   mimo_en,
  input  logic signed [N_W-1:0]  n1 [NCH],
  input  logic signed [N_W-1:0]  n2 [NCH],
  input  logic [W_W-1:0]         w1 [NCH],
  input  logic [W_W-1:0]         w2 [NCH],
  output logic signed [OUT_W-1:0] err
);
  logic signed [OUT_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < NCH; i++) begin
      if (mimo_en)
        acc += OUT_W'(n1[i]) * OUT_W'(signed'({1'b0, w1[i]})) + OUT_W'(n2[i]) * OUT_W'(signed'({1'b0, w2[i]}));
      else
        acc += (OUT_W'(n1[i]) * OUT_W'(signed'({1'b0, w1[i]}))) <<< 1;
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) err <= '0;
    else        err <= acc;
endmodule
