`timescale 1ps/1fs
// tb_adpll_ctrl: walks the sequencer through calibration, locking, lock,
// loss of lock and re-lock, checking the outputs in every state.
module tb_adpll_ctrl;
  logic clk = 0, rst_n = 0, cal_done = 0, lock = 0;
  logic cal_start, loop_en, mimo_en, est_en;
  logic [1:0] state_o;
  int checks = 0, failures = 0;

  adpll_ctrl dut (.clk, .rst_n, .cal_done, .lock, .cal_start, .loop_en, .mimo_en, .est_en, .state_o);
  always #10000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_o(input logic [1:0] st, input logic cs, le, me, ee);
    checks++;
    if (state_o != st || cal_start != cs || loop_en != le || mimo_en != me || est_en != ee) begin
      failures++;
      $display("state=%0d cs=%0d le=%0d me=%0d ee=%0d, expected state %0d", state_o, cal_start,
               loop_en, mimo_en, est_en, st);
    end
  endtask

  initial begin
    #15000 rst_n = 1;
    repeat (5) @(posedge clk);
    expect_o(0, 1, 0, 0, 0);
    lock = 1;                              // lock ignored while calibrating
    repeat (3) @(posedge clk);
    expect_o(0, 1, 0, 0, 0);
    lock = 0;
    @(negedge clk) cal_done = 1;
    @(posedge clk); #1;
    expect_o(1, 0, 1, 0, 0);
    repeat (5) @(posedge clk); #1;
    expect_o(1, 0, 1, 0, 0);
    @(negedge clk) lock = 1;
    @(posedge clk); #1;
    expect_o(2, 0, 1, 1, 1);
    @(negedge clk) lock = 0;
    @(posedge clk); #1;
    expect_o(1, 0, 1, 0, 0);
    @(negedge clk) lock = 1;
    @(posedge clk); #1;
    expect_o(2, 0, 1, 1, 1);
    rst_n = 0; #1;
    expect_o(0, 1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
