`timescale 1ps/1fs
// tb_dco_model: measures the DCO model's period for several ring counts,
// ring lengths and fine codes, compares it with 2 * sum of the cell delays,
// checks that more rings and faster codes raise the frequency, that one
// fine step moves it by roughly 1 MHz, and that a zero code stops it.
module tb_dco_model;
  import adpll_pkg::*;
  logic [255:0] drive;
  logic s1, s2;
  logic [3:0] fcw [MAX_CELLS];
  logic clk_out;
  int checks = 0, failures = 0;
  realtime t0, t1;
  real per, exp_per, prev_f, f;

  dco_model #(.NRINGS(256)) dut (.drive, .skip_sel1(s1), .skip_sel2(s2), .fcw, .clk_out);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(output real p);
    @(posedge clk_out); @(posedge clk_out);
    t0 = $realtime;
    repeat (100) @(posedge clk_out);
    t1 = $realtime;
    p = (t1 - t0) / 100.0;
  endtask

  function automatic real cell_ps(int n, int rank);
    return (60.0 + 56.0 * 128.0 / real'(n)) - 0.5 * real'(rank);
  endfunction

  initial begin
    foreach (fcw[k]) fcw[k] = 4'd8;        // slowest code
    s1 = 1; s2 = 0;                          // five cells
    prev_f = 0;
    for (int n = 32; n <= 256; n += 32) begin
      drive = '0;
      for (int r = 0; r < n; r++) drive[r] = 1'b1;
      measure(per);
      exp_per = 2.0 * 5.0 * cell_ps(n, 0);
      f = 1.0e6 / per;                       // MHz
      checks++;
      if (per > exp_per + 0.5 || per < exp_per - 0.5) begin
        failures++; $display("n=%0d per=%f exp=%f", n, per, exp_per);
      end
      checks++;
      if (f <= prev_f) begin failures++; $display("not monotonic in rings"); end
      prev_f = f;
    end
    // fine step near 860 MHz: half the rings, first cell one step faster
    drive = '0; for (int r = 0; r < 128; r++) drive[r] = 1'b1;
    measure(per); prev_f = 1.0e6 / per;
    fcw[0] = 4'd2;
    measure(per); f = 1.0e6 / per;
    checks++;
    if (f - prev_f < 0.3 || f - prev_f > 2.0) begin
      failures++; $display("fine step %f MHz", f - prev_f);
    end
    // three and seven cells
    fcw[0] = 4'd8;
    s2 = 1; measure(per);
    checks++;
    if (per > 6.0 * cell_ps(128, 0) + 0.5 || per < 6.0 * cell_ps(128, 0) - 0.5) begin failures++; $display("3 cells"); end
    s1 = 0; s2 = 0; measure(per);
    checks++;
    if (per > 14.0 * cell_ps(128, 0) + 0.5 || per < 14.0 * cell_ps(128, 0) - 0.5) begin failures++; $display("7 cells"); end
    // zero code stops the ring
    fcw[2] = 4'd0;
    #5000;
    t0 = $realtime;
    fork
      begin @(posedge clk_out); t1 = $realtime; end
      begin #20000; t1 = -1; end
    join_any
    disable fork;
    checks++;
    if (t1 >= 0) begin failures++; $display("zero code did not stop the DCO"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
