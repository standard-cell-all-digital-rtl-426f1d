`timescale 1ps/1fs
// mimo_tdc: 2x4 multiple-input multiple-output time-to-digital converter.
//
// The phase detector turns the REF-to-FB edge distance into a pulse (time
// input 1) and a sign. A delay line makes a delayed clone of that pulse
// (time input 2), which reaches the channels during the idle part of the
// reference period. Four parallel channels, each with a ring oscillator of
// its own resolution, convert time input 1 and, in MIMO mode, re-convert
// the clone with the ring switched to its faster gear, so each of the eight
// conversions sees the same time through a different quantizer. tdc_dsp
// weights the eight results by their resolutions and averages them, which
// lowers the quantization noise by about sqrt(8) against one channel; in
// SIMO mode (clone blocked) only the four first conversions are used.
// Structure, channel count and resolution targets T_i = T_eff*sqrt(2N) -
// 2(i-1) ps follow the source design; T_eff = 7 ps is its TDC example.
// The second-gear ratio (0.9) is this implementation's choice.
//
// Interface: err is registered on clk_dsp, which must rise after both
// conversions of a reference cycle have finished (the ADPLL uses the
// falling edge of the reference clock). w1/w2 are the channel weights.
//
// Synthesis note: the rings and the delay line are behavioural models, so a
// synthesis tool sees no ring activity and reduces the channel counts to
// constants and latches; only the counters, DSP and control are real logic
// here. In silicon the rings and delay line are built from standard cells.
module mimo_tdc #(
  parameter int unsigned NCH         = 4,
  parameter real         TRES_EFF_PS = 7.0,
  parameter real         GEAR2_RATIO = 0.9,
  parameter real         DELAY_PS    = 6000.0
) (
  input  logic                rst_n,
  input  logic                ref_clk,
  input  logic                fb_clk,
  input  logic                clk_dsp,
  input  logic                mimo_en,
  input  logic [4:0]          w1 [NCH],
  input  logic [4:0]          w2 [NCH],
  output logic signed [19:0]  err,
  output logic signed [10:0]  n1 [NCH],
  output logic signed [10:0]  n2 [NCH]
);
  logic pulse, sign, clone, tin2;

  tdc_phase_detector u_pd (.rst_n, .ref_clk, .fb_clk, .pulse, .sign);
  tdc_delay_line #(.DELAY_PS(DELAY_PS)) u_dl (.din(pulse), .dout(clone));
  assign tin2 = clone & mimo_en;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    localparam real TRES_I = TRES_EFF_PS * 2.8284271 * $sqrt(real'(NCH) / 4.0) - 2.0 * i;
    logic [6:0] node;
    logic       ring_en, gear;
    tdc_ring_osc #(.T1_PS(TRES_I / 2.0), .T2_PS(GEAR2_RATIO * TRES_I / 2.0)) u_ring (
      .en(ring_en), .gear, .node);
    tdc_channel u_ch (.rst_n, .node, .tin1(pulse), .tin2, .sign, .ring_en, .gear,
                      .n1(n1[i]), .n2(n2[i]));
  end

  tdc_dsp #(.NCH(NCH)) u_dsp (.clk(clk_dsp), .rst_n, .mimo_en, .n1, .n2, .w1, .w2, .err);
endmodule
