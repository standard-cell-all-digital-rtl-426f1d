`timescale 1ps/1fs
// tb_mash11: checks the MASH 1-1 modulator against a behavioural model of
// two cascaded accumulators with the y1[n-1] + y2[n] - y2[n-1] combination,
// checks the output range -1..2, and checks that the mean over 1024 cycles
// equals F/256 to within 2/1024.
module tb_mash11;
  logic clk = 0, rst_n = 0;
  logic [7:0] x;
  logic signed [3:0] y;
  int checks = 0, failures = 0;
  int a1, a2, y1, y2, y1d, y2d, ym, sum;

  mash11 #(.IN_W(8), .OUT_W(4)) dut (.clk, .rst_n, .x, .y);
  always #5000 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    for (int t = 0; t < 12; t++) begin
      rst_n = 0;
      x = (t == 0) ? 8'd64 : (t == 1) ? 8'd0 : (t == 2) ? 8'd255 : 8'($urandom_range(1, 254));
      @(negedge clk); rst_n = 1;
      a1 = 0; a2 = 0; y1d = 0; y2d = 0; ym = 0; sum = 0;
      for (int n = 0; n < 1024; n++) begin
        @(posedge clk);
        // model of this edge
        y1 = (a1 + x) >= 256;
        y2 = (a2 + ((a1 + x) % 256)) >= 256;
        ym = y1d + y2 - y2d;
        a2 = (a2 + ((a1 + x) % 256)) % 256;
        a1 = (a1 + x) % 256;
        y1d = y1; y2d = y2;
        @(negedge clk);
        checks++;
        if (int'(y) != ym || y < -1 || y > 2) begin
          failures++;
          if (failures < 10) $display("x=%0d n=%0d y=%0d model=%0d", x, n, y, ym);
        end
        sum += int'(y);
      end
      checks++;
      if (sum < int'(x) * 4 - 2 || sum > int'(x) * 4 + 2) begin
        failures++; $display("mean x=%0d sum=%0d", x, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
