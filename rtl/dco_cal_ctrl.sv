`timescale 1ps/1fs
// dco_cal_ctrl: offline PVT calibration and coarse tuning of the DCO.
//
// Runs once after reset, in the 13 MHz crystal-clock domain, before the
// loop is closed. Each measurement opens a window of CAL_WIN crystal cycles
// during which two window_counter instances count DCO cycles and reference
// cycles. The target DCO count for the window is (N.F) * ref_count, i.e.
// what a DCO at exactly N.F times the reference would give.
//   1. PVT step: half of the rings on, five cells per ring, centre fine
//      word. From the DCO count c5 and the target t the ring length s in
//      {3,5,7} that minimises |5*c5 - s*t| is chosen: a slow corner or a
//      high reference frequency gives three cells, a fast corner or a low
//      one gives seven. Both the initial frequency and the desired one
//      decide (a two-dimensional choice).
//   2. Coarse step: with that ring length, a successive-approximation
//      search over the number of active rings (1..NRINGS, one measurement
//      per bit) keeps the largest count that does not exceed the target.
// The two steps, the crystal time base, the 5-cell / half-rings start and
// the use of the reference count follow the source design. The window
// length, the selection rule and the binary search are this
// implementation's choice (the source gives the function, not the logic).
//
// Interface: pulse start (or hold it) to begin; gate is the measurement
// window for the counters; rings, stages and done are registered. The
// counters must be read-stable SETTLE cycles after gate falls.
//
// The low FRAC_W bits of the target product are fractions of a count and
// are dropped on purpose.
module dco_cal_ctrl
  import adpll_pkg::*;
#(
  parameter int unsigned NRINGS  = 256,
  parameter int unsigned RING_W  = 9,      // holds 1..NRINGS
  parameter int unsigned CNT_W   = 16,
  parameter int unsigned NINT_W  = 6,
  parameter int unsigned FRAC_W  = 8,
  parameter int unsigned CAL_WIN = 32,     // crystal cycles per window
  parameter int unsigned SETTLE  = 4       // crystal cycles after a window
) (
  input  logic                clk_xtal,
  input  logic                rst_n,
  input  logic                start,
  input  logic [NINT_W-1:0]   n_int,
  input  logic [FRAC_W-1:0]   n_frac,
  input  logic [CNT_W-1:0]    dco_cnt,
  input  logic [CNT_W-1:0]    ref_cnt,
  output logic                gate,
  output logic [RING_W-1:0]   rings,
  output stages_e             stages,
  output logic                busy,
  output logic                done
);
  localparam int unsigned SAR_W = $clog2(NRINGS);

  typedef enum logic [2:0] {IDLE, PVT_MEAS, PVT_WAIT, CT_MEAS, CT_WAIT, DONE} state_e;
  state_e state;

  logic [15:0]       tcnt;
  logic [SAR_W-1:0]  code;          // rings = code + 1
  logic [SAR_W-1:0]  bitsel;        // one-hot bit under test
  logic [CNT_W+NINT_W+FRAC_W-1:0] target_full;
  logic [CNT_W+NINT_W-1:0]        target;
  logic [CNT_W+4:0]  c5x5, tx3, tx5, tx7, d3, d5, d7;

  always_comb begin
    target_full = ref_cnt * {n_int, n_frac};
    target      = target_full[CNT_W+NINT_W+FRAC_W-1:FRAC_W];   // fraction bits dropped
    c5x5 = (CNT_W+5)'(dco_cnt) * 5;
    tx3  = (CNT_W+5)'(target) * 3;
    tx5  = (CNT_W+5)'(target) * 5;
    tx7  = (CNT_W+5)'(target) * 7;
    d3   = (c5x5 > tx3) ? c5x5 - tx3 : tx3 - c5x5;
    d5   = (c5x5 > tx5) ? c5x5 - tx5 : tx5 - c5x5;
    d7   = (c5x5 > tx7) ? c5x5 - tx7 : tx7 - c5x5;
    busy = (state != IDLE) && (state != DONE);
    done = (state == DONE);
  end

  always_ff @(posedge clk_xtal or negedge rst_n)
    if (!rst_n) begin
      state  <= IDLE;
      tcnt   <= '0;
      gate   <= 1'b0;
      code   <= '0;
      bitsel <= '0;
      rings  <= RING_W'(NRINGS / 2);
      stages <= STAGES_5;
    end else begin
      case (state)
        IDLE: if (start) begin
          rings  <= RING_W'(NRINGS / 2);
          stages <= STAGES_5;
          gate   <= 1'b1;
          tcnt   <= '0;
          state  <= PVT_MEAS;
        end
        PVT_MEAS: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(CAL_WIN - 1)) begin
            gate  <= 1'b0;
            tcnt  <= '0;
            state <= PVT_WAIT;
          end
        end
        PVT_WAIT: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(SETTLE - 1)) begin
            if (d3 <= d5 && d3 <= d7) stages <= STAGES_3;
            else if (d7 < d5)         stages <= STAGES_7;
            else                      stages <= STAGES_5;
            bitsel <= SAR_W'(1) << (SAR_W - 1);
            code   <= SAR_W'(1) << (SAR_W - 1);
            rings  <= RING_W'((1 << (SAR_W - 1)) + 1);
            gate   <= 1'b1;
            tcnt   <= '0;
            state  <= CT_MEAS;
          end
        end
        CT_MEAS: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(CAL_WIN - 1)) begin
            gate  <= 1'b0;
            tcnt  <= '0;
            state <= CT_WAIT;
          end
        end
        CT_WAIT: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(SETTLE - 1)) begin
            automatic logic [SAR_W-1:0] c = code;
            if ((CNT_W+NINT_W)'(dco_cnt) > target) c = c & ~bitsel;   // too fast
            tcnt <= '0;
            if (bitsel[0]) begin
              code  <= c;
              rings <= RING_W'(c) + 1'b1;
              state <= DONE;
            end else begin
              code   <= c | (bitsel >> 1);
              rings  <= RING_W'(SAR_W'(c | (bitsel >> 1))) + 1'b1;
              bitsel <= bitsel >> 1;
              gate   <= 1'b1;
              state  <= CT_MEAS;
            end
          end
        end
        DONE: ;
        default: state <= IDLE;
      endcase
    end
endmodule
