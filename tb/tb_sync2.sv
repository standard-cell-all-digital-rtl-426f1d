`timescale 1ps/1fs
// tb_sync2: random input changes; the output must equal the input as it
// was two clock edges earlier, and reset must clear it.
module tb_sync2;
  logic clk = 0, rst_n = 0, d = 0, q;
  logic h1 = 0, h2 = 0;
  int checks = 0, failures = 0;

  sync2 dut (.clk, .rst_n, .d, .q);
  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk) d = $urandom_range(0, 1);
      @(posedge clk) begin h2 = h1; h1 = d; end
      #1;
      checks++;
      if (q != h2) begin failures++; $display("k=%0d q=%0d exp=%0d", k, q, h2); end
    end
    rst_n = 0; #1;
    checks++;
    if (q) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
