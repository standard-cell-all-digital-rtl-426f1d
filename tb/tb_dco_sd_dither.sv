`timescale 1ps/1fs
// tb_dco_sd_dither: 862.5 MHz DCO clock, 50 MHz reference. Applies random
// fractional words and checks that (a) the output only takes the two
// neighbouring integer values, (b) its average over 4096 updates equals
// the fractional word within 1/64 of a code, (c) the output changes at
// most once every 8 DCO cycles, and (d) a word above word_max is clamped.
module tb_dco_sd_dither;
  logic clk_dco = 0, clk_ref = 0, rst_n = 0;
  logic [10:0] word_in = '0;
  logic [6:0]  word_max = 7'd70;
  logic [6:0]  fine_out, prev;
  int checks = 0, failures = 0;
  int since = 0, n_upd;
  real sum, expv;

  dco_sd_dither dut (.clk_dco, .rst_n, .clk_ref, .word_in, .word_max, .fine_out);
  always #579.71 clk_dco = ~clk_dco;
  always #10000  clk_ref = ~clk_ref;

  // (c) output changes no more often than the divided clock
  always @(posedge clk_dco) begin
    since++;
    if (fine_out != prev) begin
      checks++;
      if (since < 8 && rst_n) begin failures++; $display("output changed after %0d cycles", since); end
      since = 0;
    end
    prev = fine_out;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 0;
    #30000 rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk_ref) word_in = 11'($urandom_range(0, 69 * 16 + 15));
      expv = real'(word_in) / 16.0;
      repeat (2) @(posedge clk_ref);
      sum = 0.0; n_upd = 0;
      repeat (4096) begin
        repeat (8) @(posedge clk_dco);
        #1;
        sum += real'(fine_out);
        n_upd++;
        checks++;
        if (int'(fine_out) != int'(word_in >> 4) && int'(fine_out) != int'(word_in >> 4) + 1) begin
          failures++;
          if (failures < 10) $display("word %0d: out %0d", word_in, fine_out);
        end
      end
      checks++;
      if (sum / n_upd < expv - 1.0 / 64.0 || sum / n_upd > expv + 1.0 / 64.0) begin
        failures++; $display("word %0d: mean %f exp %f", word_in, sum / n_upd, expv);
      end
    end
    @(negedge clk_ref) word_in = 11'(75 * 16);
    repeat (3) @(posedge clk_ref);
    checks++;
    if (fine_out != word_max) begin failures++; $display("clamp: %0d", fine_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
