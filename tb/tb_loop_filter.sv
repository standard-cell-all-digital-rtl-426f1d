`timescale 1ps/1fs
// tb_loop_filter: compares the loop filter, with dither off and a small
// output scaling, against a real-valued model of
//   H[z] = K1 (1-a)/(1-a z^-1) * (1/(1-z^-1) + K2)
// for random inputs, then checks saturation, the hold/clear of en=0, and
// that with dither on the output still follows the model on average. The
// undithered fractional output y_fx must follow the model to a fraction of
// an LSB, with or without dither.
module tb_loop_filter;
  localparam int K1 = 3, K2 = 20, SH = 14;
  localparam int ALPHA = 64912;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [19:0] x;
  logic signed [11:0] y, yd;
  logic signed [15:0] yf, yfd;
  int checks = 0, failures = 0;
  real a, iir, acc, ym, sumd, summ;

  loop_filter #(.K1(K1), .K2(K2), .OUT_SHIFT(SH), .DITHER(1'b0)) dut (
    .clk, .rst_n, .en, .x, .y, .y_fx(yf));
  loop_filter #(.K1(K1), .K2(K2), .OUT_SHIFT(SH), .DITHER(1'b1)) dut_d (
    .clk, .rst_n, .en, .x, .y(yd), .y_fx(yfd));
  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = real'(ALPHA) / 65536.0;
    x = 0; iir = 0; acc = 0; sumd = 0; summ = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    for (int n = 0; n < 400; n++) begin
      x = 20'($signed($urandom_range(0, 4000)) - 2000);
      @(posedge clk);
      iir = a * iir + (1.0 - a) * real'(x) * K1;
      acc = acc + iir;
      ym  = (acc + K2 * iir) / real'(2.0 ** SH);
      #1;
      checks++;
      if ((real'(y) - ym) > 2.0 || (ym - real'(y)) > 2.0) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d model=%f", n, y, ym);
      end
      // the fractional output is the model with 4 fraction bits, floored
      checks++;
      if ((real'(yf) / 16.0 - ym) > 1.0 || (ym - real'(yf) / 16.0) > 1.0 || yf != yfd) begin
        failures++;
        if (failures < 10) $display("n=%0d y_fx=%0d model=%f", n, yf, ym);
      end
      sumd += real'(yd); summ += ym;
      @(negedge clk);
    end
    checks++;
    if ((sumd - summ) / 400.0 > 1.0 || (summ - sumd) / 400.0 > 1.0) begin
      failures++; $display("dither mean off: %f vs %f", sumd / 400.0, summ / 400.0);
    end
    // saturation
    x = 20'sd400000;
    repeat (300) @(negedge clk);
    checks++;
    if (y != 12'sd2047) begin failures++; $display("no positive saturation y=%0d", y); end
    x = -20'sd400000;
    repeat (2000) @(negedge clk);
    checks++;
    if (y != -12'sd2048) begin failures++; $display("no negative saturation y=%0d", y); end
    // disable clears
    en = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (y != 0) begin failures++; $display("en=0 did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
