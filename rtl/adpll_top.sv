`timescale 1ps/1fs
// adpll_top: fractional-N all-digital PLL built from standard-cell logic.
//
// Loop: the 2x4 MIMO TDC measures the time between the reference edge and
// the feedback edge; the type-2 digital loop filter turns that error into a
// fine-tuning offset for the DCO; the DCO output is divided by N[k] = N +
// MASH output, whose average is N.F, to make the feedback clock. Before the
// loop is closed the DCO is calibrated against a 13 MHz crystal clock: the
// number of delay cells per ring (3/5/7) and of active rings are chosen so
// that the centre of the fine range is close to N.F times the reference.
// A lock detector compares reference and feedback counts; once locked, the
// controller switches the TDC from SIMO to MIMO and starts the online
// estimation of the TDC channel resolutions, which weight the TDC results.
// The loop filter output keeps 4 fraction bits; a first-order sigma-delta
// modulator clocked by the DCO divided by 8 dithers the 7-bit fine word so
// that its average carries those fractions. This arrangement follows the
// source design; starting the fine word at mid-range is this design's
// choice. The DCO, the TDC ring
// oscillators and the TDC delay line are behavioural models, so this top
// simulates but does not synthesize as a whole; all other blocks are RTL.
//
// Clock domains: clk_xtal (calibration), clk_ref (control, lock detection),
// the falling edge of clk_ref (TDC post-processing, loop filter, resolution
// estimation), the DCO clock (divider, fine-word modulator) and the
// feedback clock (MASH).
//
// Interface: n_int / n_frac give N.F (F in 1/256); t_dco_ps is the nominal
// DCO period in ps used by the resolution estimation. All are static.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned NRINGS      = 256,
  parameter real         DCO_PVT     = 1.0,
  parameter int unsigned CAL_WIN     = 32,
  parameter int unsigned LOCK_WIN    = 4096,
  parameter int unsigned LOCK_TOL    = 4,
  parameter int unsigned LF_K1       = 26,
  parameter real         TRES_EFF_PS = 7.0
) (
  input  logic               clk_ref,
  input  logic               clk_xtal,
  input  logic               rst_n,
  input  logic [5:0]         n_int,
  input  logic [7:0]         n_frac,
  input  logic [11:0]        t_dco_ps,
  output logic               clk_dco,
  output logic               fb_clk,
  output logic               lock,
  output logic               cal_done,
  output logic               mimo_en,
  output stages_e            stages,
  output logic [8:0]         rings,
  output logic [6:0]         fine,
  output logic signed [19:0] tdc_err,
  output logic signed [11:0] lf_out,
  output logic [4:0]         w1 [4],
  output logic [4:0]         w2 [4],
  output logic [1:0]         ctrl_state,
  output logic               cal_busy,
  output logic [15:0]        lock_windows
);
  // ---------------- control ----------------
  logic cal_start, cal_start_x, cal_done_x, cal_done_r, loop_en, est_en;

  adpll_ctrl u_ctrl (.clk(clk_ref), .rst_n, .cal_done(cal_done_r), .lock,
                     .cal_start, .loop_en, .mimo_en, .est_en, .state_o(ctrl_state));
  sync2 u_sync_start (.clk(clk_xtal), .rst_n, .d(cal_start),  .q(cal_start_x));
  sync2 u_sync_done  (.clk(clk_ref),  .rst_n, .d(cal_done_x), .q(cal_done_r));
  assign cal_done = cal_done_r;

  // ---------------- calibration ----------------
  logic gate;
  logic [15:0] dco_cnt, ref_cnt;

  dco_cal_ctrl #(.NRINGS(NRINGS), .CAL_WIN(CAL_WIN)) u_cal (
    .clk_xtal, .rst_n, .start(cal_start_x), .n_int, .n_frac, .dco_cnt, .ref_cnt,
    .gate, .rings, .stages, .busy(cal_busy), .done(cal_done_x));
  window_counter u_wc_dco (.clk(clk_dco), .rst_n, .gate, .count(dco_cnt));
  window_counter u_wc_ref (.clk(clk_ref), .rst_n, .gate, .count(ref_cnt));

  // ---------------- DCO ----------------
  logic [NRINGS-1:0] drive;
  logic [3:0]        fcw [MAX_CELLS];
  logic [6:0]        fine_max;
  int                fine_i;

  logic signed [15:0] lf_fx;          // loop filter output, 4 fraction bits
  logic [10:0]        fine_fx;        // fine word, 4 fraction bits

  always_comb begin
    for (int r = 0; r < NRINGS; r++) drive[r] = (r < int'(rings));
    fine_i = (int'(fine_max) / 2) * 16 + (loop_en ? int'(lf_fx) : 0);
    if (fine_i < 0)                  fine_i = 0;
    if (fine_i > int'(fine_max) * 16) fine_i = int'(fine_max) * 16;
    fine_fx = 11'(fine_i);
  end

  // first-order sigma-delta on the fine word, clocked by the DCO / 8
  dco_sd_dither #(.INT_W(7), .FRAC_W(4), .DIV(8)) u_sdd (
    .clk_dco, .rst_n, .clk_ref, .word_in(fine_fx), .word_max(fine_max), .fine_out(fine));

  dco_fine_map #(.FINE_W(7)) u_map (.fine, .stages, .fcw, .fine_max);
  dco_model #(.NRINGS(NRINGS), .PVT(DCO_PVT)) u_dco (
    .drive, .skip_sel1(stages[0]), .skip_sel2(stages[1]), .fcw, .clk_out(clk_dco));

  // ---------------- feedback divider + MASH ----------------
  logic signed [3:0] sd_y, sd_y_d1, sd_y_d2;
  mash11 #(.IN_W(8), .OUT_W(4)) u_mash (.clk(fb_clk), .rst_n, .x(n_frac), .y(sd_y));
  mmd_divider #(.DIV_W(6)) u_div (.clk_dco, .rst_n, .n_int, .sd_off(sd_y), .fb_clk);

  // The divide value used for the feedback period that ends at edge k was
  // set by the modulator output of edge k-2: keep that history for the
  // resolution estimation.
  always_ff @(posedge fb_clk or negedge rst_n)
    if (!rst_n) {sd_y_d2, sd_y_d1} <= '0;
    else        {sd_y_d2, sd_y_d1} <= {sd_y_d1, sd_y};

  // ---------------- TDC, loop filter, estimation ----------------
  logic clk_dsp;
  logic signed [10:0] n1 [4], n2 [4];
  assign clk_dsp = ~clk_ref;

  mimo_tdc #(.NCH(4), .TRES_EFF_PS(TRES_EFF_PS)) u_tdc (
    .rst_n, .ref_clk(clk_ref), .fb_clk, .clk_dsp, .mimo_en, .w1, .w2,
    .err(tdc_err), .n1, .n2);

  loop_filter #(.K1(LF_K1), .DITHER(1'b0)) u_lf (.clk(clk_dsp), .rst_n, .en(loop_en), .x(tdc_err),
                                               .y(lf_out), .y_fx(lf_fx));

  tdc_res_est #(.NCH(4)) u_est (
    .clk(clk_dsp), .rst_n, .valid(1'b1), .en1(est_en), .en2(est_en & mimo_en),
    .sd_y(sd_y_d2), .sd_frac(n_frac), .t_dco_ps, .n1, .n2, .w1, .w2);

  lock_detector #(.LOCK_WIN(LOCK_WIN), .TOL(LOCK_TOL)) u_lock (
    .ref_clk(clk_ref), .fb_clk, .rst_n, .en(loop_en), .lock, .windows(lock_windows));
endmodule
