`timescale 1ps/1fs
// tb_tdc_delay_line: sends pulses of random width and checks both edges of
// the clone arrive 6 ns later, inside the 4-8 ns window the TDC needs,
// and that every pulse comes out once.
module tb_tdc_delay_line;
  logic din = 0, dout;
  int checks = 0, failures = 0;
  int n_out = 0;
  realtime ti, to;
  tdc_delay_line dut (.din, .dout);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge din) ti = $realtime;
  always @(posedge dout) begin
    to = $realtime;
    n_out++;
    checks++;
    if (to - ti != 6000.0 || to - ti < 4000.0 || to - ti > 8000.0) begin
      failures++; $display("delay %f", to - ti);
    end
  end

  initial begin
    for (int k = 0; k < 50; k++) begin
      #20000 din = 1;
      #($urandom_range(10, 3000)) din = 0;
    end
    #20000;
    checks++;
    if (dout) failures++;
    checks++;
    if (n_out != 50) begin failures++; $display("%0d clone pulses for 50", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
