`timescale 1ps/1fs
// tb_tdc_ring_osc: enables the ring for random times in both gears and
// checks that the rising edges over all seven nodes number time/(2*T)
// (within one), that each node toggles in turn, and that it stops while
// disabled.
module tb_tdc_ring_osc;
  logic en = 0, gear = 0;
  logic [6:0] node;
  int checks = 0, failures = 0;
  int edges, w;
  real t;
  tdc_ring_osc #(.T1_PS(10.0), .T2_PS(9.0)) dut (.en, .gear, .node);

  for (genvar m = 0; m < 7; m++) begin : g
    always @(posedge node[m]) edges++;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      gear = k[0];
      t = gear ? 9.0 : 10.0;
      w = $urandom_range(100, 5000);
      #1000;
      edges = 0;
      en = 1; #(w); en = 0;
      checks++;
      if (real'(edges) < real'(w) / (2.0 * t) - 1.5 || real'(edges) > real'(w) / (2.0 * t) + 1.5) begin
        failures++; $display("w=%0d gear=%0d edges=%0d", w, gear, edges);
      end
      edges = 0;
      #2000;
      checks++;
      if (edges != 0) begin failures++; $display("ring ran while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
