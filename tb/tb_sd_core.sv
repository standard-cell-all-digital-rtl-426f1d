`timescale 1ps/1fs
// tb_sd_core: checks the first-order sigma-delta core. For random inputs
// it compares y and the error output with an accumulator model every
// cycle, and checks that 256 cycles from reset give exactly x ones.
module tb_sd_core;
  logic clk = 0, rst_n = 0;
  logic [7:0] x;
  logic y;
  logic [7:0] e_out;
  int checks = 0, failures = 0;
  int acc, ones;

  sd_core #(.IN_W(8)) dut (.clk, .rst_n, .x, .y, .e_out);
  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    repeat (20) begin
      rst_n = 0;
      x = 8'($urandom_range(0, 255));
      @(negedge clk); rst_n = 1;
      acc = 0; ones = 0;
      for (int n = 0; n < 256; n++) begin
        checks++;
        if (y !== ((acc + x) >= 256) || e_out !== 8'((acc + x) % 256)) begin
          failures++;
          $display("mismatch x=%0d n=%0d y=%0d", x, n, y);
        end
        ones += y;
        acc = (acc + x) % 256;
        @(negedge clk);
      end
      checks++;
      if (ones != x) begin failures++; $display("density x=%0d ones=%0d", x, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
