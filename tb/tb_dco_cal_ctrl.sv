`timescale 1ps/1fs
// tb_dco_cal_ctrl: runs the calibration against the DCO model at a slow,
// typical and fast corner with a 13 MHz crystal and a 50 MHz reference.
// Checks that the ring length follows the corner (3 cells slow, 5 typical,
// 7 fast), that exactly nine measurement windows are used, and that the
// DCO ends within 30 MHz of N.F * f_ref (N.F = 17.25 -> 862.5 MHz).
module tb_dco_cal_ctrl;
  import adpll_pkg::*;
  logic clk_xtal = 0, clk_ref = 0, rst_n = 0, start = 0;
  logic gate, busy, done;
  logic [8:0] rings;
  stages_e stages;
  logic [15:0] dco_cnt, ref_cnt;
  int checks = 0, failures = 0;
  int corner, windows, n_dco;
  real f_mhz;

  logic clk_s, clk_t, clk_f, clk_dco;
  logic [255:0] drive;
  logic [3:0] fcw [MAX_CELLS];
  logic [6:0] fine_max;

  always #38462 clk_xtal = ~clk_xtal;       // 13 MHz
  always #10000 clk_ref  = ~clk_ref;        // 50 MHz

  dco_cal_ctrl dut (.clk_xtal, .rst_n, .start, .n_int(6'd17), .n_frac(8'd64),
                    .dco_cnt, .ref_cnt, .gate, .rings, .stages, .busy, .done);

  always_comb for (int r = 0; r < 256; r++) drive[r] = (r < int'(rings));
  dco_fine_map u_map (.fine(7'(int'(fine_max) / 2)), .stages, .fcw, .fine_max);
  dco_model #(.PVT(1.5)) u_slow (.drive, .skip_sel1(stages[0]), .skip_sel2(stages[1]), .fcw, .clk_out(clk_s));
  dco_model #(.PVT(1.0)) u_typ  (.drive, .skip_sel1(stages[0]), .skip_sel2(stages[1]), .fcw, .clk_out(clk_t));
  dco_model #(.PVT(0.6)) u_fast (.drive, .skip_sel1(stages[0]), .skip_sel2(stages[1]), .fcw, .clk_out(clk_f));
  assign clk_dco = (corner == 0) ? clk_s : (corner == 1) ? clk_t : clk_f;

  window_counter u_wd (.clk(clk_dco), .rst_n, .gate, .count(dco_cnt));
  window_counter u_wr (.clk(clk_ref), .rst_n, .gate, .count(ref_cnt));

  always @(posedge gate) windows++;
  always @(posedge clk_dco) n_dco++;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (corner = 0; corner < 3; corner++) begin
      rst_n = 0; start = 0; windows = 0;
      #100000;
      rst_n = 1;
      @(posedge clk_xtal); start = 1;
      @(posedge done);
      start = 0;
      checks++;
      if (windows != 9) begin failures++; $display("corner %0d: %0d windows", corner, windows); end
      checks++;
      if ((corner == 0 && stages != STAGES_3) || (corner == 1 && stages != STAGES_5) ||
          (corner == 2 && stages != STAGES_7)) begin
        failures++; $display("corner %0d: stages %s", corner, stages.name());
      end
      #100000;
      n_dco = 0;
      #2_000_000;
      f_mhz = real'(n_dco) / 2.0;
      $display("corner %0d: %s, %0d rings, %f MHz", corner, stages.name(), rings, f_mhz);
      checks++;
      if (f_mhz < 862.5 - 30.0 || f_mhz > 862.5 + 30.0) begin failures++; $display("frequency off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
