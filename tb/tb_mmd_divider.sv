`timescale 1ps/1fs
// tb_mmd_divider: drives a random modulus offset, changed once per output
// period, and checks that every feedback period lasts n_int + offset DCO
// cycles, where the offset is the one present at the start of the period.
module tb_mmd_divider;
  logic clk = 0, rst_n = 0;
  logic [5:0] n_int;
  logic signed [3:0] sd_off;
  logic fb_clk;
  int checks = 0, failures = 0;
  int cyc, last_edge, expected, nedges;

  mmd_divider #(.DIV_W(6)) dut (.clk_dco(clk), .rst_n, .n_int, .sd_off, .fb_clk);
  always #500 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  initial begin
    cyc = 0; n_int = 6'd17; sd_off = 0; nedges = 0; expected = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(posedge fb_clk);
      if (expected > 0) begin
        checks++;
        if (cyc - last_edge != expected) begin
          failures++;
          $display("period %0d expected %0d", cyc - last_edge, expected);
        end
      end
      // the value just loaded sets this new period
      expected = int'(n_int) + int'(sd_off);
      last_edge = cyc;
      @(negedge fb_clk);
      sd_off = 4'($urandom_range(0, 3) - 1);
      if (k % 100 == 99) n_int = 6'($urandom_range(16, 30));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
