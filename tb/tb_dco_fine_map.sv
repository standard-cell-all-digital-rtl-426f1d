`timescale 1ps/1fs
// tb_dco_fine_map: exhaustive check of the fine-word to delay-cell code
// mapping for 3, 5 and 7 cells: cell k must sit at step clamp(w-14k,0,14)
// of the slowest-to-fastest code order 8,2,10,4,14,12,6,9,11,15,13,1,7,5,3,
// unused cells at the slowest code, and the word saturating at 14*cells.
module tb_dco_fine_map;
  import adpll_pkg::*;
  logic [6:0] fine, fine_max;
  stages_e stages;
  logic [3:0] fcw [MAX_CELLS];
  int checks = 0, failures = 0;
  int order [15] = '{8, 2, 10, 4, 14, 12, 6, 9, 11, 15, 13, 1, 7, 5, 3};
  int cells, w, st;
  stages_e sl [3] = '{STAGES_3, STAGES_5, STAGES_7};

  dco_fine_map #(.FINE_W(7)) dut (.fine, .stages, .fcw, .fine_max);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      stages = sl[s];
      cells = 3 + 2 * s;
      for (int f = 0; f < 128; f++) begin
        fine = 7'(f);
        #10;
        checks++;
        if (int'(fine_max) != 14 * cells) failures++;
        w = (f > 14 * cells) ? 14 * cells : f;
        for (int k = 0; k < 7; k++) begin
          st = w - 14 * k;
          if (st < 0 || k >= cells) st = 0;
          if (st > 14) st = 14;
          checks++;
          if (int'(fcw[k]) != order[st]) begin
            failures++;
            if (failures < 10) $display("cells=%0d f=%0d k=%0d code=%0d exp=%0d", cells, f, k, fcw[k], order[st]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
