`timescale 1ps/1fs
// tb_lock_detector: 50 MHz reference against a feedback clock that is
// equal in frequency (must lock), 0.05 % fast (inside the 4/4096 window,
// must lock) and 1 % fast (must not lock). Also checks that en=0 clears
// lock and that a window count is kept.
module tb_lock_detector;
  logic ref_clk = 0, fb_clk = 0, rst_n = 0, en = 0;
  logic lock;
  logic [15:0] windows;
  int checks = 0, failures = 0;
  real half_fb = 10000.0;

  lock_detector dut (.ref_clk, .fb_clk, .rst_n, .en, .lock, .windows);
  always #10000 ref_clk = ~ref_clk;
  always #(half_fb) fb_clk = ~fb_clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real hf, input bit exp_lock);
    en = 0; half_fb = hf;
    repeat (10) @(posedge ref_clk);
    en = 1;
    repeat (3 * 4096 + 10) @(posedge ref_clk);
    checks++;
    if (lock != exp_lock) begin failures++; $display("half=%f lock=%0d", hf, lock); end
  endtask

  initial begin
    #3333 rst_n = 1;
    run(10000.0, 1);
    run(10000.0 / 1.0005, 1);
    run(10000.0 / 1.01, 0);
    run(10000.0 * 1.01, 0);
    run(10000.0 * 1.0003, 1);
    en = 0;
    repeat (3) @(posedge ref_clk);
    checks++;
    if (lock) begin failures++; $display("lock not cleared"); end
    checks++;
    if (windows < 15) begin failures++; $display("windows=%0d", windows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
