`timescale 1ps/1fs
// tb_tdc_channel: drives one channel with a ring model (20 ps / 18 ps
// resolution) and pulses of known width and sign. Checks that n1 is the
// width divided by the gear-0 resolution, n2 (the clone, faster gear) the
// width divided by the gear-1 resolution, both within one count, with the
// given sign, and that long pulses saturate at +-1023.
module tb_tdc_channel;
  logic rst_n = 0, tin1 = 0, tin2 = 0, sign = 0;
  logic [6:0] node;
  logic ring_en, gear;
  logic signed [10:0] n1, n2;
  int checks = 0, failures = 0;
  int w;
  real e1, e2;

  tdc_ring_osc #(.T1_PS(10.0), .T2_PS(9.0)) u_ring (.en(ring_en), .gear, .node);
  tdc_channel dut (.rst_n, .node, .tin1, .tin2, .sign, .ring_en, .gear, .n1, .n2);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      w = (k == 199) ? 30000 : $urandom_range(50, 8000);
      sign = $urandom_range(0, 1);
      #2000 tin1 = 1; #(w) tin1 = 0;
      #3000 tin2 = 1; #(w) tin2 = 0;
      #100;
      e1 = real'(w) / 20.0; e2 = real'(w) / 18.0;
      if (e1 > 1023.0) e1 = 1023.0;
      if (e2 > 1023.0) e2 = 1023.0;
      if (!sign) begin e1 = -e1; e2 = -e2; end
      checks += 2;
      if (real'(n1) < e1 - 1.5 || real'(n1) > e1 + 1.5) begin
        failures++; $display("w=%0d sign=%0d n1=%0d exp=%f", w, sign, n1, e1);
      end
      if (real'(n2) < e2 - 1.5 || real'(n2) > e2 + 1.5) begin
        failures++; $display("w=%0d sign=%0d n2=%0d exp=%f", w, sign, n2, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
