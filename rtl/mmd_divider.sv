`timescale 1ps/1fs
// mmd_divider: multi-modulus feedback divider of the fractional-N loop.
//
// Counts DCO cycles and produces one feedback clock period every N[k]
// DCO cycles, where N[k] = n_int + sd_off is loaded at the end of each
// division cycle (sd_off comes from the MASH modulator, which is clocked by
// the divider's own output). The feedback clock is high for the first
// N[k]/2 DCO cycles of each division period, so its rising edge marks the
// start of a period. Dividing by N+F through sigma-delta modulation of the
// modulus follows the source design; the counter structure, the duty
// cycle and the clamp of N[k] to 2..2^DIV_W-1 are this implementation's.
//
// Interface: all logic runs on clk_dco; n_int and sd_off must be stable
// around the last DCO cycle of a period (they change on fb_clk's rising
// edge, half a period earlier).
module mmd_divider #(
  parameter int unsigned DIV_W = 6,
  parameter int unsigned SD_W  = 4
) (
  input  logic                   clk_dco,
  input  logic                   rst_n,
  input  logic [DIV_W-1:0]       n_int,
  input  logic signed [SD_W-1:0] sd_off,
  output logic                   fb_clk
);
  logic [DIV_W-1:0] cnt, div_q;
  logic signed [DIV_W+1:0] n_next_s;
  logic [DIV_W-1:0] n_next;

  always_comb begin
    n_next_s = signed'({2'b00, n_int}) + (DIV_W+2)'(sd_off);
    if (n_next_s < 2)                          n_next = DIV_W'(2);
    else if (n_next_s > (2**DIV_W - 1))        n_next = '1;
    else                                       n_next = n_next_s[DIV_W-1:0];
  end

  always_ff @(posedge clk_dco or negedge rst_n)
    if (!rst_n) begin
      cnt    <= DIV_W'(15);          // first edge after reset is a load
      div_q  <= DIV_W'(16);
      fb_clk <= 1'b0;
    end else begin
      if (cnt >= div_q - 1'b1) begin
        cnt    <= '0;
        div_q  <= n_next;
        fb_clk <= 1'b1;
      end else begin
        cnt    <= cnt + 1'b1;
        fb_clk <= ((cnt + 1'b1) < (div_q >> 1));
      end
    end
endmodule
