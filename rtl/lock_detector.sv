`timescale 1ps/1fs
// lock_detector: frequency lock indicator of the ADPLL.
//
// Over every observation window of LOCK_WIN reference cycles the number of
// feedback clock cycles is counted as well. When the two counts differ by
// at most TOL (0.1 % of the window with the defaults) lock is asserted,
// otherwise it is cleared; the decision is renewed after every window. The
// feedback count is kept in Gray code in the feedback domain and read
// through a two-flop synchronizer, so it is safe across the clock domains.
// Comparing the two counts within 0.1 % after each long window follows the
// source design; the window length and the Gray-code crossing are this
// implementation's choice.
//
// Interface: en=0 clears lock and restarts the window. lock is registered
// in the reference domain; windows counts completed windows.
module lock_detector #(
  parameter int unsigned LOCK_WIN = 4096,
  parameter int unsigned TOL      = 4,
  parameter int unsigned CW       = 16
) (
  input  logic          ref_clk,
  input  logic          fb_clk,
  input  logic          rst_n,
  input  logic          en,
  output logic          lock,
  output logic [15:0]   windows
);
  // feedback domain: binary counter and its Gray code
  logic [CW-1:0] fb_bin, fb_gray;
  always_ff @(posedge fb_clk or negedge rst_n)
    if (!rst_n) begin
      fb_bin  <= '0;
      fb_gray <= '0;
    end else begin
      fb_bin  <= fb_bin + 1'b1;
      fb_gray <= (fb_bin + 1'b1) ^ ((fb_bin + 1'b1) >> 1);
    end

  // reference domain
  logic [CW-1:0] g_m, g_s, fb_now, fb_start, ref_cnt, delta;
  always_comb begin
    fb_now = '0;
    for (int b = CW-1; b >= 0; b--)
      fb_now[b] = (b == CW-1) ? g_s[b] : (fb_now[b+1] ^ g_s[b]);
    delta = fb_now - fb_start;
  end

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      g_m <= '0; g_s <= '0;
      fb_start <= '0;
      ref_cnt  <= '0;
      lock     <= 1'b0;
      windows  <= '0;
    end else begin
      g_m <= fb_gray;
      g_s <= g_m;
      if (!en) begin
        ref_cnt  <= '0;
        fb_start <= fb_now;
        lock     <= 1'b0;
      end else if (ref_cnt == CW'(LOCK_WIN - 1)) begin
        ref_cnt  <= '0;
        fb_start <= fb_now;
        windows  <= windows + 1'b1;
        lock     <= (delta >= CW'(LOCK_WIN - TOL)) && (delta <= CW'(LOCK_WIN + TOL));
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end
    end
endmodule
