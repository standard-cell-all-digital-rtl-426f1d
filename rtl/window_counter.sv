`timescale 1ps/1fs
// window_counter: counts rising edges of a clock while a gate from another
// clock domain is high.
//
// The gate is brought into the counted clock's domain through two
// flip-flops. The count is cleared when the synchronised gate rises and
// frozen when it falls, so a reader in the gate's domain can take the
// value a few of its own cycles after dropping the gate (the count is then
// stable). Used by DCO calibration to count DCO and reference cycles over a
// crystal-clock window; the synchroniser and clear-on-start scheme are this
// implementation's choice.
module window_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,      // clock whose edges are counted
  input  logic             rst_n,
  input  logic             gate,     // asynchronous window
  output logic [CNT_W-1:0] count
);
  logic g1, g2, g3;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      g1 <= 1'b0; g2 <= 1'b0; g3 <= 1'b0;
      count <= '0;
    end else begin
      g1 <= gate;
      g2 <= g1;
      g3 <= g2;
      if (g2 && !g3)  count <= CNT_W'(1);
      else if (g2)    count <= count + 1'b1;
    end
endmodule
