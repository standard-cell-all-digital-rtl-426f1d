`timescale 1ps/1fs
// tb_adpll_top: end-to-end test of the whole ADPLL at its default
// parameters, in the example configuration of the source design:
// 50 MHz reference, N.F = 17.25 (DCO 862.5 MHz), 13 MHz calibration
// crystal, nominal-corner DCO.
//
// It lets the PLL calibrate, lock in SIMO mode, switch to MIMO mode and run
// the resolution estimation, and counts how often each mechanism was seen:
//   calibration finished, five-cell rings chosen, loop closed, every
//   modulator/divider value -1..2 used, TDC errors of both signs, loop
//   filter moving, fine-word sigma-delta toggling, lock, MIMO mode entered,
//   second conversions non-zero,
//   resolution estimates updated by the estimator.
// Any mechanism that never happened counts as a failure. After lock it
// also checks that the feedback clock matches the reference edge for edge
// over a long window and that the DCO runs at 17.25 x 50 MHz within 0.1 %.
module tb_adpll_top;
  import adpll_pkg::*;
  logic clk_ref = 0, clk_xtal = 0, rst_n = 0;
  logic clk_dco, fb_clk, lock, cal_done, mimo_en, cal_busy;
  stages_e stages;
  logic [8:0] rings;
  logic [6:0] fine;
  logic signed [19:0] tdc_err;
  logic signed [11:0] lf_out;
  logic [4:0] w1 [4], w2 [4];
  logic [1:0] ctrl_state;
  logic [15:0] lock_windows;

  int checks = 0, failures = 0;
  int n_cal, n_stage5, n_loop, n_lock, n_mimo, n_err_pos, n_err_neg, n_lf_move,
      n_w_upd, n_n2, n_fine_tog;
  logic [6:0] fine_prev;
  int n_div [4];
  int n_ref, n_fb, n_dco;
  logic [12:0] est_prev [8];
  logic signed [11:0] lf_prev;

  always #10000 clk_ref = ~clk_ref;          // 50 MHz
  always #38462 clk_xtal = ~clk_xtal;        // 13 MHz

  adpll_top dut (.clk_ref, .clk_xtal, .rst_n, .n_int(6'd17), .n_frac(8'd64),
                 .t_dco_ps(12'd1159), .clk_dco, .fb_clk, .lock, .cal_done, .mimo_en,
                 .stages, .rings, .fine, .tdc_err, .lf_out, .w1, .w2, .ctrl_state,
                 .cal_busy, .lock_windows);

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  always @(posedge cal_done) begin
    n_cal++;
    if (stages == STAGES_5) n_stage5++;
    $display("%t calibrated: %s, %0d rings", $realtime, stages.name(), rings);
  end
  always @(posedge lock)    begin n_lock++; $display("%t lock", $realtime); end
  always @(posedge mimo_en) n_mimo++;
  always @(negedge lock)    if (rst_n) $display("%t lock lost", $realtime);
  always @(posedge clk_ref) begin
    if (ctrl_state == 2'd1) n_loop++;
    if (ctrl_state != 2'd0) begin
      if (tdc_err > 0) n_err_pos++;
      if (tdc_err < 0) n_err_neg++;
      if (lf_out != lf_prev) n_lf_move++;
    end
    if (mimo_en && dut.n2[0] != 0) n_n2++;
    lf_prev <= lf_out;
    for (int c = 0; c < 8; c++) begin
      if (rst_n && dut.u_est.est[c] != est_prev[c]) n_w_upd++;
      est_prev[c] <= dut.u_est.est[c];
    end
  end
  always @(posedge fb_clk) if (dut.sd_y >= -1 && dut.sd_y <= 2) n_div[int'(dut.sd_y) + 1]++;
  always @(posedge clk_dco) begin
    if (lock && fine != fine_prev) n_fine_tog++;
    fine_prev <= fine;
  end
  always @(posedge clk_ref) n_ref++;
  always @(posedge fb_clk)  n_fb++;
  always @(posedge clk_dco) n_dco++;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: never seen: %s", what); end
    else $display("seen %0d x %s", n, what);
  endtask

  initial begin
    real f_dco;
    int d_ref, d_fb;
    for (int c = 0; c < 8; c++) est_prev[c] = dut.u_est.est[c];
    lf_prev = 0;
    #100000 rst_n = 1;
    // calibration, then up to 0.4 ms to lock (about 0.11 ms expected)
    fork
      wait (lock && mimo_en);
      #400_000_000;
    join_any
    disable fork;
    checks++;
    if (!lock) begin
      failures++;
      $display("FAIL: no lock");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    // settle in MIMO mode with estimation running
    #400_000_000;
    n_ref = 0; n_fb = 0; n_dco = 0;
    #200_000_000;
    d_ref = n_ref; d_fb = n_fb;
    f_dco = real'(n_dco) / 200.0;
    $display("ref %0d fb %0d edges, DCO %f MHz, fine %0d, lf %0d, w1 %0d %0d %0d %0d w2 %0d %0d %0d %0d",
             d_ref, d_fb, f_dco, fine, lf_out, w1[0], w1[1], w1[2], w1[3], w2[0], w2[1], w2[2], w2[3]);
    checks++;
    if (d_fb < d_ref - 1 || d_fb > d_ref + 1) begin failures++; $display("FAIL: edge count"); end
    checks++;
    if (f_dco < 862.5 * 0.999 || f_dco > 862.5 * 1.001) begin failures++; $display("FAIL: DCO frequency"); end
    checks++;
    if (!lock || !mimo_en) begin failures++; $display("FAIL: lost lock"); end
    need("calibration done", n_cal);
    need("five-cell rings chosen at the nominal corner", n_stage5);
    need("loop closed in SIMO mode", n_loop);
    need("divide N-1", n_div[0]);
    need("divide N", n_div[1]);
    need("divide N+1", n_div[2]);
    need("divide N+2", n_div[3]);
    need("positive TDC error", n_err_pos);
    need("negative TDC error", n_err_neg);
    need("loop filter output change", n_lf_move);
    need("fine-word sigma-delta toggling while locked", n_fine_tog);
    need("lock", n_lock);
    need("MIMO mode", n_mimo);
    need("second TDC conversion", n_n2);
    need("resolution estimate update", n_w_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
