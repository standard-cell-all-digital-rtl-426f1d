`timescale 1ps/1fs
// loop_filter: type-2 digital loop filter of the ADPLL.
//
// Implements H[z] = K1 * (1-a)/(1 - a z^-1) * (1/(1-z^-1) + K2), i.e. an
// input gain K1, a first-order IIR low-pass with pole a, then an integral
// path (accumulator) and a proportional path (gain K2) that are summed.
// The sum is scaled down by 2^OUT_SHIFT to DCO control-word units. Before
// the final truncation OSR_BITS extra fractional bits are kept and a
// first-difference-shaped pseudo-random dither (RNG * (1-z^-1)) is added,
// so the truncation error is pushed to high frequencies.
//
// The structure (K1, IIR, accumulator + K2, scaling, RNG with (1-z^-1),
// truncation) and the 20-bit input / 12-bit output follow the source
// design. The coefficient values are derived from its loop design: the IIR
// pole a = 0.990478 (Q16: 64912) and the zero b = 0.999372, which gives
// K2 = b/(1-b) ~ 1591. K1 and OUT_SHIFT set the overall gain for the TDC
// scale of tdc_dsp (1 LSB = 1/8 ps) and a DCO step near 1 MHz; they are
// this implementation's choice, as are the 16-bit LFSR and the saturation.
//
// Interface: one update per rising clk edge when en=1; when en=0 all state
// is held at zero and y=0. y is registered (latency 1 cycle from x).
// y_fx is the same value before dithering and rounding, with OSR_BITS
// fraction bits, for a sigma-delta modulator at the DCO input
// (dco_sd_dither); the ADPLL top uses that path and turns DITHER off.
module loop_filter #(
  parameter int unsigned IN_W      = 20,
  parameter int unsigned OUT_W     = 12,
  parameter int unsigned K1        = 26,
  parameter int unsigned ALPHA_Q16 = 64912,
  parameter int unsigned K2        = 1591,
  parameter int unsigned OUT_SHIFT = 32,
  parameter int unsigned OSR_BITS  = 4,
  parameter bit          DITHER    = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic signed [OUT_W+OSR_BITS-1:0] y_fx   // undithered, OSR_BITS fraction bits
);
  localparam int W = 72;                       // internal width
  localparam int F = 16;                       // fractional bits of the IIR state

  logic signed [W-1:0] s1, iir_q, iir_d, acc_q, acc_d, sum, t;
  logic [15:0] lfsr_q;
  logic [OSR_BITS-1:0] lfsr_prev_q;
  logic signed [W-1:0] dith;
  logic signed [W-1:0] y_full;
  localparam logic signed [W-1:0] YMAX = W'((2**(OUT_W-1)) - 1);
  localparam logic signed [W-1:0] YMIN = -W'(2**(OUT_W-1));
  localparam logic signed [W-1:0] FMAX = W'((2**(OUT_W+OSR_BITS-1)) - 1);
  localparam logic signed [W-1:0] FMIN = -W'(2**(OUT_W+OSR_BITS-1));

  always_comb begin
    s1    = (W'(x) * signed'(W'(K1))) <<< F;
    // iir += (1-a) * (s1 - iir)
    iir_d = iir_q + (((s1 - iir_q) * signed'(W'(65536 - ALPHA_Q16))) >>> 16);
    acc_d = acc_q + iir_d;
    sum   = acc_d + iir_d * signed'(W'(K2));
    t     = sum >>> (F + OUT_SHIFT - OSR_BITS);
    dith  = DITHER ? (signed'(W'(lfsr_q[OSR_BITS-1:0])) - signed'(W'(lfsr_prev_q))) : '0;
    y_full = (t + dith) >>> OSR_BITS;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      iir_q       <= '0;
      acc_q       <= '0;
      y           <= '0;
      y_fx        <= '0;
      lfsr_q      <= 16'hACE1;
      lfsr_prev_q <= '0;
    end else if (!en) begin
      iir_q <= '0;
      acc_q <= '0;
      y     <= '0;
      y_fx  <= '0;
    end else begin
      iir_q       <= iir_d;
      acc_q       <= acc_d;
      lfsr_prev_q <= lfsr_q[OSR_BITS-1:0];
      lfsr_q      <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      if (y_full > YMAX)      y <= YMAX[OUT_W-1:0];
      else if (y_full < YMIN) y <= YMIN[OUT_W-1:0];
      else                    y <= y_full[OUT_W-1:0];
      if (t > FMAX)           y_fx <= FMAX[OUT_W+OSR_BITS-1:0];
      else if (t < FMIN)      y_fx <= FMIN[OUT_W+OSR_BITS-1:0];
      else                    y_fx <= t[OUT_W+OSR_BITS-1:0];
    end
endmodule
