`timescale 1ps/1fs
// tb_window_counter: counts a 862.5 MHz clock through gate windows of
// random length taken from a 13 MHz clock. The frozen count must equal the
// number of counted-clock edges in the window within one edge at each end
// (synchroniser uncertainty) and must hold while the gate is low.
module tb_window_counter;
  logic clk = 0, clk_g = 0, rst_n = 0, gate = 0;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int n;
  real exp_n;

  window_counter dut (.clk, .rst_n, .gate, .count);
  always #579.71 clk = ~clk;       // 862.5 MHz
  always #38462 clk_g = ~clk_g;    // 13 MHz

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000 rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      n = $urandom_range(1, 40);
      @(posedge clk_g) gate = 1;
      repeat (n) @(posedge clk_g);
      gate = 0;
      repeat (2) @(posedge clk_g);
      exp_n = real'(n) * 76924.0 / 1159.42;
      checks++;
      if (real'(count) < exp_n - 2.5 || real'(count) > exp_n + 2.5) begin
        failures++; $display("n=%0d count=%0d exp=%f", n, count, exp_n);
      end
      checks++;
      @(posedge clk_g);
      if (real'(count) < exp_n - 2.5 || real'(count) > exp_n + 2.5) begin
        failures++; $display("count moved while gate low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
