// Test of the stage-1 sub-DAC switch decoder. For every stage-1 level of both
// modes, the switch controls are put through the MDAC transfer worked out
// here in real arithmetic (capacitor weights 1.5, 1 and 0.5 Vref, plus
// Vref/4 from C5 in mode 2), and for a set of inputs across the level's
// decision interval the ideal residue must equal 4*(Vin - level) and stay
// within +-Vref/4 (+-Vref/2 at the two outermost levels). No capacitor may
// be switched to both sides.
module tb_stage1_dac_decoder;
  import adc_cal_pkg::*;

  d1_t        d1;
  mode_e      mode;
  logic [2:0] x, z;
  int         checks = 0, failures = 0;

  stage1_dac_decoder dut (.d1, .mode, .x, .z);

  initial begin
    real w [3] = '{1.5, 1.0, 0.5};
    real lvl, dac, vin, r, want, lim;
    int  lo, hi;
    for (int m = 0; m < 2; m++) begin
      lo = m ? -7 : -6;
      hi = m ? 7 : 6;
      for (int d = lo; d <= hi; d += 2) begin
        d1   = d1_t'(d);
        mode = mode_e'(m);
        #1;
        checks++;
        if ((x & z) != 3'b000) begin
          failures++;
          $display("FAIL: d1 %0d mode %0d: a capacitor switched to both sides", d, m + 1);
        end
        dac = (m ? 0.25 : 0.0);
        for (int i = 0; i < 3; i++) dac += w[i] * (real'(z[i]) - real'(x[i]));
        lvl = real'(d) / 16.0;
        // Sweep the input across +-1/16 around the level.
        for (int s = -4; s <= 4; s++) begin
          vin  = lvl + real'(s) / 64.0;
          r    = 4.0 * vin + dac;
          want = 4.0 * (vin - lvl);
          lim  = (d == lo || d == hi) ? 0.5 : 0.25;
          checks++;
          if (r - want > 1e-9 || want - r > 1e-9 || r > lim + 1e-9 || r < -lim - 1e-9) begin
            failures++;
            $display("FAIL: d1 %0d mode %0d vin %f: residue %f expected %f (x=%b z=%b)",
                     d, m + 1, vin, r, want, x, z);
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
