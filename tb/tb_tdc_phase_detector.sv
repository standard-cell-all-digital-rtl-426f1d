`timescale 1ps/1fs
// tb_tdc_phase_detector: applies reference and feedback edges with known
// random offsets (either clock first) and checks the pulse width equals the
// offset and the sign is 1 exactly when the reference leads.
module tb_tdc_phase_detector;
  logic rst_n = 0, ref_clk = 0, fb_clk = 0;
  logic pulse, sign;
  int checks = 0, failures = 0;
  int off;
  realtime tr, tf;

  tdc_phase_detector dut (.rst_n, .ref_clk, .fb_clk, .pulse, .sign);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse) tr = $realtime;
  always @(negedge pulse) tf = $realtime;

  initial begin
    #1000 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      off = $urandom_range(1, 8000);
      if (k % 2) off = -off;
      #5000;
      if (off > 0) begin ref_clk = 1; #(off); fb_clk = 1; end
      else         begin fb_clk = 1; #(-off); ref_clk = 1; end
      #10;
      checks++;
      if (pulse || (tf - tr) != real'((off > 0) ? off : -off) || sign != (off > 0)) begin
        failures++;
        if (failures < 10) $display("off=%0d width=%f sign=%0d", off, tf - tr, sign);
      end
      #3000 ref_clk = 0; fb_clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
