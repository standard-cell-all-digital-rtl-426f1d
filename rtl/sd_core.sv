`timescale 1ps/1fs
// sd_core: first-order digital sigma-delta modulator (error-feedback form).
//
// Each clock the input x is added to the stored error f; the quantizer
// outputs y=1 when the sum reaches 2^IN_W (a compare against zero of
// sum - 2^IN_W) and 2^IN_W*y is removed from the sum before it is stored
// as the next error. The long-run density of ones on y is x/2^IN_W.
// The structure (delay, compare, add) and the 8-bit input follow the
// source design; the unsigned input and the 0/1 output coding are this
// implementation's choice.
//
// Interface: y and e_out are combinational from x and the stored error
// (y is this cycle's quantizer output, e_out this cycle's quantization
// error); e_out is stored on every rising clk edge. Reset clears the error.
module sd_core #(
  parameter int unsigned IN_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IN_W-1:0] x,
  output logic            y,
  output logic [IN_W-1:0] e_out   // quantization error of this cycle, feeds the next MASH stage
);
  logic [IN_W-1:0] f_q;           // delayed error f[n]
  logic [IN_W:0]   e;             // e[n] = x[n] + f[n]

  always_comb begin
    e     = {1'b0, x} + {1'b0, f_q};
    y     = e[IN_W];              // e - 2^IN_W >= 0
    e_out = e[IN_W-1:0];          // e - 2^IN_W * y
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) f_q <= '0;
    else        f_q <= e_out;
endmodule
