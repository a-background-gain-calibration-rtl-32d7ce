// Test of the dual-mode stage-1 encoder: every 7-bit comparator pattern in
// both modes is compared with the level the thresholds define (the number of
// thresholds below the input, counted from the comparators in use), and the
// mode-1 levels must be even and the mode-2 levels odd.
module tb_stage1_encoder;
  import adc_cal_pkg::*;

  logic [6:0] comp;
  mode_e      mode;
  d1_t        d1;
  int         checks = 0, failures = 0;

  stage1_encoder dut (.comp, .mode, .d1);

  initial begin
    int n, exp;
    for (int m = 0; m < 2; m++) begin
      for (int p = 0; p < 128; p++) begin
        comp = 7'(p);
        mode = mode_e'(m);
        #1;
        n = 0;
        for (int i = 0; i < (m ? 7 : 6); i++) n += comp[i];
        // Mode 1: levels -3..3 steps of Vref/8; mode 2: levels (2k-1)/16, k = -3..4.
        exp = m ? (2 * (n - 4) + 1) : 2 * (n - 3);
        checks++;
        if (int'(d1) != exp) begin
          failures++;
          $display("FAIL: mode %0d comp %b: d1 %0d expected %0d", m + 1, comp, d1, exp);
        end
      end
    end
    // A voltage sweep through the real thermometer codes.
    for (int v = -8; v <= 8; v++) begin
      for (int m = 0; m < 2; m++) begin
        mode = mode_e'(m);
        for (int i = 0; i < 7; i++)
          comp[i] = m ? (v * 2 > -6 * 2 + 4 * i) : (i < 6 && v * 2 > -5 * 2 + 4 * i);
        #1;
        // v is the input in units of Vref/16: the chosen level must lie within
        // one unit of it (the residue stays within +-Vref/16) inside +-6/16.
        checks++;
        if ((v - int'(d1)) > 1 || (int'(d1) - v) > 1) begin
          if (!(v >= 7 || v <= -7)) begin
            failures++;
            $display("FAIL: sweep v=%0d/16 mode %0d d1=%0d", v, m + 1, d1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
