`timescale 1ps/1fs
// adpll_ctrl: top-level sequencer of the ADPLL.
//
// After reset it requests the DCO calibration and waits for it to finish
// (CAL). It then closes the loop with the TDC in SIMO mode (LOCKING), where
// the delayed clone would overlap the next conversion. Once the lock
// detector reports lock it switches the TDC to MIMO mode and enables the
// online resolution estimation (LOCKED); losing lock returns to LOCKING.
// Calibration first, then locking, and MIMO only after lock follow the
// source design; the state encoding and the fall-back on lost lock are
// this implementation's choice.
//
// Interface: runs on the reference clock; cal_done must already be
// synchronized to it. Outputs are registered.
module adpll_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic cal_done,
  input  logic lock,
  output logic cal_start,
  output logic loop_en,
  output logic mimo_en,
  output logic est_en,
  output logic [1:0] state_o
);
  typedef enum logic [1:0] {CAL = 2'd0, LOCKING = 2'd1, LOCKED = 2'd2} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= CAL;
    else case (state)
      CAL:     if (cal_done) state <= LOCKING;
      LOCKING: if (lock)     state <= LOCKED;
      LOCKED:  if (!lock)    state <= LOCKING;
      default:               state <= CAL;
    endcase

  always_comb begin
    cal_start = (state == CAL);
    loop_en   = (state != CAL);
    mimo_en   = (state == LOCKED);
    est_en    = (state == LOCKED);
    state_o   = state;
  end
endmodule
