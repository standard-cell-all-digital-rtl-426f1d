`timescale 1ps/1fs
// tdc_res_est: online estimation of the resolution of every TDC
// conversion path, used as the weights of tdc_dsp.
//
// In a sigma-delta fractional-N loop the feedback edge moves, from one
// reference cycle to the next, by the known amount
//   dt[k] = (N[k] - N.F) * T_dco
// where N[k]-N.F is the modulator output minus the fraction. Comparing it
// with the change of each TDC result, dN = N_ij[k] - N_ij[k-1], gives a
// sample of the resolution dt/dN. Instead of dividing, each estimate is
// filtered by a sign-sign LMS update in Q5.FRAC fixed point:
//   T += MU * sign(dt - T*dN) * sign(dN)       (only when |dN| >= MIN_DN)
// which converges to the resolution with no divider. Estimates start at
// typical values (INIT1/INIT2), are limited to 1..31 ps and are rounded to
// the 5-bit weights. Using the modulator's known sequence (no extra
// stimulus), starting from typical values and filtering the samples follow
// the source design; the LMS form, the step size and the thresholds are
// this implementation's choice.
//
// Interface: one update per rising clk edge with valid=1; en1 / en2
// enable the updates of the first / second conversions (the second only
// makes sense in MIMO mode). sd_y, sd_frac and the channel results must
// refer to the same reference cycle.
module tdc_res_est #(
  parameter int unsigned NCH    = 4,
  parameter int unsigned N_W    = 11,
  parameter int unsigned W_W    = 5,
  parameter int unsigned FRAC   = 8,
  parameter int unsigned MU     = 4,
  parameter int unsigned MIN_DN = 8,
  parameter logic [NCH*W_W-1:0] INIT1 = {5'd14, 5'd16, 5'd18, 5'd20},
  parameter logic [NCH*W_W-1:0] INIT2 = {5'd12, 5'd14, 5'd16, 5'd18}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid,
  input  logic                  en1,
  input  logic                  en2,
  input  logic signed [3:0]     sd_y,      // modulator output N[k]-N
  input  logic [7:0]            sd_frac,   // fraction F in 1/256
  input  logic [11:0]           t_dco_ps,  // DCO period in ps
  input  logic signed [N_W-1:0] n1 [NCH],
  input  logic signed [N_W-1:0] n2 [NCH],
  output logic [W_W-1:0]        w1 [NCH],
  output logic [W_W-1:0]        w2 [NCH]
);
  localparam int EW = W_W + FRAC;            // estimate width
  localparam int SW = 32;

  logic [EW-1:0]         est [2*NCH];
  logic signed [N_W-1:0] prev [2*NCH];
  logic signed [N_W-1:0] cur  [2*NCH];
  logic signed [SW-1:0]  frac_s, tdco_s;     // signed copies of the inputs
  logic signed [SW-1:0]  dt_q;               // expected step, ps * 2^FRAC
  logic signed [SW-1:0]  dn   [2*NCH];
  logic signed [SW-1:0]  pred [2*NCH];
  logic [EW-1:0]         nxt  [2*NCH];

  localparam logic [EW-1:0] EMIN = EW'(1) << FRAC;
  localparam logic [EW-1:0] EMAX = EW'(31) << FRAC;

  always_comb begin
    // (N[k]-N.F) * T_dco in ps with FRAC fraction bits: d is in 1/256 units
    frac_s = SW'({1'b0, sd_frac});
    tdco_s = SW'({1'b0, t_dco_ps});
    dt_q   = ((SW'(sd_y) * 256 - frac_s) * tdco_s) <<< FRAC >>> 8;
    for (int c = 0; c < 2*NCH; c++) begin
      cur[c]  = (c < NCH) ? n1[c] : n2[c-NCH];
      dn[c]   = SW'(cur[c]) - SW'(prev[c]);
      pred[c] = SW'({1'b0, est[c]}) * dn[c];
      nxt[c]  = est[c];
      if ((dn[c] >= SW'(MIN_DN)) || (dn[c] <= -SW'(MIN_DN))) begin
        if ((dt_q > pred[c]) == (dn[c] > 0)) nxt[c] = est[c] + EW'(MU);
        else if (dt_q != pred[c])            nxt[c] = est[c] - EW'(MU);
      end
      if (nxt[c] < EMIN) nxt[c] = EMIN;
      if (nxt[c] > EMAX) nxt[c] = EMAX;
    end
    for (int i = 0; i < NCH; i++) begin
      w1[i] = W_W'((est[i]     + (EW'(1) << (FRAC-1))) >> FRAC);
      w2[i] = W_W'((est[i+NCH] + (EW'(1) << (FRAC-1))) >> FRAC);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        est[i]     <= EW'(INIT1[i*W_W +: W_W]) << FRAC;
        est[i+NCH] <= EW'(INIT2[i*W_W +: W_W]) << FRAC;
      end
      prev <= '{default: '0};
    end else if (valid) begin
      for (int c = 0; c < 2*NCH; c++) begin
        prev[c] <= cur[c];
        if ((c < NCH) ? en1 : en2) est[c] <= nxt[c];
      end
    end
endmodule
