`timescale 1ps/1fs
// mash11: second-order MASH 1-1 sigma-delta modulator for the fractional
// feedback divider.
//
// Two sd_core stages are cascaded: stage 1 takes the fraction F, stage 2
// takes the quantization error of stage 1. The outputs are combined as
// y = y1[n-1] + (y2[n] - y2[n-1]), which cancels the first-stage error and
// leaves second-order shaped noise. The combination, the 8-bit input and
// the 4-bit signed output follow the source design. With 0/1 stage outputs
// y lies in -1..+2 and its mean equals F/2^IN_W.
//
// Interface: clk is the feedback clock (one update per divider cycle);
// y is registered and changes one cycle after x is sampled.
module mash11 #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_W-1:0]         x,
  output logic signed [OUT_W-1:0] y
);
  logic            y1, y2;
  logic [IN_W-1:0] e1, e2;
  logic            y1_d, y2_d;

  sd_core #(.IN_W(IN_W)) u_s1 (.clk, .rst_n, .x(x),  .y(y1), .e_out(e1));
  sd_core #(.IN_W(IN_W)) u_s2 (.clk, .rst_n, .x(e1), .y(y2), .e_out(e2));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      y1_d <= 1'b0;
      y2_d <= 1'b0;
      y    <= '0;
    end else begin
      y1_d <= y1;
      y2_d <= y2;
      y    <= OUT_W'(signed'({1'b0, y1_d})) + OUT_W'(signed'({1'b0, y2}))
            - OUT_W'(signed'({1'b0, y2_d}));
    end

  // e2 is the residual error of the last stage; nothing further uses it.
  logic unused_e2;
  assign unused_e2 = ^e2;
endmodule
