`timescale 1ps/1fs
// tb_adpll_nf_range: runs two copies of the whole ADPLL at default
// parameters at the ends of the 16-30 multiplication range with a 50 MHz
// reference: N.F = 16.25 (812.5 MHz) and N.F = 29.75 (1487.5 MHz).
// Each must calibrate, lock, enter MIMO mode and settle at N.F x 50 MHz
// within 0.1 %, with feedback and reference counts within 0.1 % (the lock
// criterion). Slipped feedback cycles are reported.
module tb_adpll_nf_range;
  logic clk_ref = 0, clk_xtal = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #10000 clk_ref = ~clk_ref;          // 50 MHz
  always #38462 clk_xtal = ~clk_xtal;        // 13 MHz

  logic [5:0]  n_int  [2] = '{6'd16, 6'd29};
  logic [7:0]  n_frac [2] = '{8'd64, 8'd192};
  logic [11:0] t_dco  [2] = '{12'd1231, 12'd672};
  real         nf     [2] = '{16.25, 29.75};
  logic clk_dco [2], fb_clk [2], lock [2], mimo_en [2];
  int   n_dco [2], n_fb [2];

  for (genvar u = 0; u < 2; u++) begin : g_pll
    logic cal_done, cal_busy;
    adpll_pkg::stages_e stages;
    logic [8:0] rings;
    logic [6:0] fine;
    logic signed [19:0] tdc_err;
    logic signed [11:0] lf_out;
    logic [4:0] w1 [4], w2 [4];
    logic [1:0] ctrl_state;
    logic [15:0] lock_windows;
    adpll_top dut (.clk_ref, .clk_xtal, .rst_n, .n_int(n_int[u]), .n_frac(n_frac[u]),
                   .t_dco_ps(t_dco[u]), .clk_dco(clk_dco[u]), .fb_clk(fb_clk[u]),
                   .lock(lock[u]), .cal_done, .mimo_en(mimo_en[u]), .stages, .rings, .fine,
                   .tdc_err, .lf_out, .w1, .w2, .ctrl_state, .cal_busy, .lock_windows);
    always @(posedge clk_dco[u]) n_dco[u]++;
    always @(posedge fb_clk[u])  n_fb[u]++;
    always @(posedge cal_done) $display("%t NF=%f calibrated: %s, %0d rings", $realtime, nf[u],
                                        stages.name(), rings);
    always @(posedge lock[u]) $display("%t NF=%f lock", $realtime, nf[u]);
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f;
    #100000 rst_n = 1;
    fork
      wait (lock[0] && lock[1] && mimo_en[0] && mimo_en[1]);
      #400_000_000;
    join_any
    disable fork;
    #200_000_000;
    for (int u = 0; u < 2; u++) begin n_dco[u] = 0; n_fb[u] = 0; end
    repeat (5000) @(posedge clk_ref);
    for (int u = 0; u < 2; u++) begin
      f = real'(n_dco[u]) / 100.0;
      $display("NF=%f: DCO %f MHz, fb edges %0d for 5000 reference edges, lock %0d mimo %0d",
               nf[u], f, n_fb[u], lock[u], mimo_en[u]);
      checks += 3;
      if (!lock[u] || !mimo_en[u]) begin failures++; $display("FAIL: not locked in MIMO mode"); end
      // lock criterion: counts within 0.1 % (5 of 5000); a difference of
      // one or two is a phase slip, reported but inside the criterion
      if (n_fb[u] < 4995 || n_fb[u] > 5005) begin failures++; $display("FAIL: edge count"); end
      if (n_fb[u] != 5000) $display("note: %0d feedback cycles slipped", 5000 - n_fb[u]);
      if (f < 50.0 * nf[u] * 0.999 || f > 50.0 * nf[u] * 1.001) begin
        failures++; $display("FAIL: frequency");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
