`timescale 1ps/1fs
// tb_tdc_dsp: random channel results and weights; checks the registered
// output equals the sum of all eight products in MIMO mode and twice the
// sum of the four first-conversion products in SIMO mode.
module tb_tdc_dsp;
  logic clk = 0, rst_n = 0, mimo_en;
  logic signed [10:0] n1 [4], n2 [4];
  logic [4:0] w1 [4], w2 [4];
  logic signed [19:0] err;
  int checks = 0, failures = 0;
  int expv;

  tdc_dsp dut (.clk, .rst_n, .mimo_en, .n1, .n2, .w1, .w2, .err);
  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mimo_en = 0;
    foreach (n1[i]) begin n1[i] = 0; n2[i] = 0; w1[i] = 0; w2[i] = 0; end
    #12000 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      mimo_en = k[0];
      expv = 0;
      for (int i = 0; i < 4; i++) begin
        n1[i] = 11'($urandom_range(0, 2047));
        n2[i] = 11'($urandom_range(0, 2047));
        w1[i] = 5'($urandom_range(0, 31));
        w2[i] = 5'($urandom_range(0, 31));
        expv += mimo_en ? int'(n1[i]) * int'(w1[i]) + int'(n2[i]) * int'(w2[i])
                        : 2 * int'(n1[i]) * int'(w1[i]);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(err) != expv) begin
        failures++; if (failures < 10) $display("err=%0d exp=%0d", err, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
