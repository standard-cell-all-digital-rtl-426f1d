`timescale 1ps/1fs
// tb_mimo_tdc: 50 MHz reference, feedback edges offset by a random time
// (either sign, up to 3 ns). With weights set to the rounded channel
// resolutions, the 20-bit output must equal 8x the offset in ps (within
// 5 % plus two resolutions) in SIMO and in MIMO mode, and in MIMO mode the
// second conversions must be non-zero.
module tb_mimo_tdc;
  logic rst_n = 0, ref_clk = 0, fb_clk = 0, mimo_en = 0;
  logic [4:0] w1 [4] = '{5'd20, 5'd18, 5'd16, 5'd14};
  logic [4:0] w2 [4] = '{5'd18, 5'd16, 5'd14, 5'd12};
  logic signed [19:0] err;
  logic signed [10:0] n1 [4], n2 [4];
  int checks = 0, failures = 0;
  int off;
  real e;

  mimo_tdc dut (.rst_n, .ref_clk, .fb_clk, .clk_dsp(~ref_clk), .mimo_en, .w1, .w2, .err, .n1, .n2);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      mimo_en = (k >= 200);
      off = $urandom_range(20, 3000);
      if (k % 2) off = -off;
      #(20000 - 3000);
      if (off > 0) begin ref_clk = 1; #(off); fb_clk = 1; #(3000 - off); end
      else         begin fb_clk = 1; #(-off); ref_clk = 1; #(3000 + off); end
      #7000 ref_clk = 0; fb_clk = 0;
      #3000;                            // err registered on the falling reference edge
      e = 8.0 * real'(off);
      checks++;
      if (real'(err) < e - 0.05 * (e < 0.0 ? -e : e) - 320.0 || real'(err) > e + 0.05 * (e < 0.0 ? -e : e) + 320.0) begin
        failures++;
        if (failures < 10) $display("mimo=%0d off=%0d err=%0d", mimo_en, off, err);
      end
      if (mimo_en) begin
        checks++;
        if (n2[0] == 0 && (off < 0 ? -off : off) > 100) begin failures++; $display("no second conversion"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
