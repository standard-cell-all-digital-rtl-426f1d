`timescale 1ps/1fs
// dco_sd_dither: first-order sigma-delta modulator on the DCO fine word.
//
// The loop filter delivers the fine word with FRAC_W fractional bits once
// per reference cycle. This block runs from the DCO clock divided by DIV
// (a clock enable every DIV DCO cycles, about 108 MHz for an 862.5 MHz DCO
// and DIV = 8), so it oversamples the reference rate. At each enabled edge
// it adds the fraction into an accumulator and outputs the integer part
// plus the carry. The DCO word therefore toggles between neighbouring fine
// codes with an average equal to the fractional word, and the truncation
// error is pushed to high frequencies, where the DCO averages it out.
//
// Clock crossing: the word is written on the falling reference edge and is
// stable while clk_ref is high. clk_ref is brought into the DCO domain
// through two flip-flops, and the word is captured one DCO cycle after the
// synchronised rising edge, well inside that stable half period.
//
// A first-order modulator at the DCO input, clocked by a divided output
// clock, dithering the 12-bit-wide DCO word, follows the source design.
// The divide ratio, the fraction width, the capture scheme and the
// clamping to 0..word_max are this implementation's choice.
//
// Interface: word_in = {integer, fraction}, unsigned; fine_out is
// registered in the DCO domain and changes at most once per DIV DCO cycles.
module dco_sd_dither #(
  parameter int unsigned INT_W  = 7,
  parameter int unsigned FRAC_W = 4,
  parameter int unsigned DIV    = 8
) (
  input  logic                    clk_dco,
  input  logic                    rst_n,
  input  logic                    clk_ref,
  input  logic [INT_W+FRAC_W-1:0] word_in,
  input  logic [INT_W-1:0]        word_max,
  output logic [INT_W-1:0]        fine_out
);
  localparam int DW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [2:0]              ref_s;          // synchroniser + edge history
  logic [INT_W+FRAC_W-1:0] word_q;
  logic [DW-1:0]           div_cnt;
  logic                    ce;
  logic [FRAC_W-1:0]       acc;
  logic [FRAC_W:0]         acc_sum;
  logic [INT_W:0]          out_sum;

  assign ce      = (div_cnt == DW'(DIV - 1));
  assign acc_sum = {1'b0, acc} + {1'b0, word_q[FRAC_W-1:0]};
  assign out_sum = {1'b0, word_q[INT_W+FRAC_W-1:FRAC_W]} + (INT_W+1)'(acc_sum[FRAC_W]);

  always_ff @(posedge clk_dco or negedge rst_n)
    if (!rst_n) begin
      ref_s    <= '0;
      word_q   <= '0;
      div_cnt  <= '0;
      acc      <= '0;
      fine_out <= '0;
    end else begin
      ref_s   <= {ref_s[1:0], clk_ref};
      if (ref_s[1] && !ref_s[2]) word_q <= word_in;
      div_cnt <= ce ? '0 : div_cnt + 1'b1;
      if (ce) begin
        acc <= acc_sum[FRAC_W-1:0];
        if (out_sum > {1'b0, word_max}) fine_out <= word_max;
        else                            fine_out <= out_sum[INT_W-1:0];
      end
    end
endmodule
