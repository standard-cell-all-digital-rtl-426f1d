`timescale 1ps/1fs
// tb_tdc_res_est: feeds the estimator the output of a MASH 1-1 modulator
// (F = 0.25, T_dco = 1159 ps) together with TDC results computed from the
// phase error that modulator produces, using known resolutions
// 23.3/17.0/12.4/9.1 ps (away from the start values; first conversion) and 0.9x those (second).
// Checks that every weight settles within 1 ps of the true resolution,
// that disabled paths keep their start values, and that the weights stay
// in 1..31.
module tb_tdc_res_est;
  logic clk = 0, rst_n = 0, valid = 0, en1 = 0, en2 = 0;
  logic signed [3:0] sd_y;
  logic signed [10:0] n1 [4], n2 [4];
  logic [4:0] w1 [4], w2 [4];
  int checks = 0, failures = 0;
  real tres [4] = '{23.3, 17.0, 12.4, 9.1};
  real phi;

  mash11 u_sd (.clk, .rst_n, .x(8'd64), .y(sd_y));
  tdc_res_est dut (.clk, .rst_n, .valid, .en1, .en2, .sd_y, .sd_frac(8'd64),
                   .t_dco_ps(12'd1159), .n1, .n2, .w1, .w2);
  always #10000 clk = ~clk;

  // phase error of the cycle the modulator output belongs to
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      n1[i] = 11'($rtoi(phi / tres[i] + 0.5));
      n2[i] = 11'($rtoi(phi / (0.9 * tres[i]) + 0.5));
    end
  end
  always @(negedge clk) if (rst_n) phi = phi + (real'(sd_y) - 0.25) * 1159.0;

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_w(input bit do1, input bit do2);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (do1 ? (real'(w1[i]) < tres[i] - 1.0 || real'(w1[i]) > tres[i] + 1.0)
              : (w1[i] != 5'(20 - 2*i))) begin
        failures++; $display("w1[%0d]=%0d", i, w1[i]);
      end
      if (do2 ? (real'(w2[i]) < 0.9*tres[i] - 1.0 || real'(w2[i]) > 0.9*tres[i] + 1.0)
              : (w2[i] != 5'(18 - 2*i))) begin
        failures++; $display("w2[%0d]=%0d", i, w2[i]);
      end
    end
  endtask

  initial begin
    phi = 3000.0;
    #25000 rst_n = 1;
    @(negedge clk) valid = 1;
    repeat (3000) @(posedge clk);
    check_w(0, 0);                 // nothing enabled: start values kept
    en1 = 1;
    repeat (3000) @(posedge clk);
    check_w(1, 0);
    en2 = 1;
    repeat (3000) @(posedge clk);
    check_w(1, 1);
    $display("w1 %0d %0d %0d %0d  w2 %0d %0d %0d %0d", w1[0], w1[1], w1[2], w1[3],
             w2[0], w2[1], w2[2], w2[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
