// Test of the backend stage encoders: a 2.8-bit encoder (6 comparators) and a
// 3-bit flash encoder (7 comparators) get every comparator pattern; the code
// must be twice the number of thresholds passed minus the comparator count,
// i.e. the level in half steps of the stage.
module tb_stage_encoder;
  import adc_cal_pkg::*;

  logic [5:0] c6;
  logic [6:0] c7;
  hcode_t     h6, h7;
  int         checks = 0, failures = 0;

  stage_encoder #(.N_COMP(6)) dut_mid   (.comp(c6), .code(h6));
  stage_encoder #(.N_COMP(7)) dut_flash (.comp(c7), .code(h7));

  initial begin
    int n;
    for (int p = 0; p < 128; p++) begin
      c7 = 7'(p);
      c6 = 6'(p);
      #1;
      n = 0;
      for (int i = 0; i < 6; i++) n += c6[i];
      checks++;
      if (int'(h6) != 2 * n - 6) begin
        failures++;
        $display("FAIL: 2.8-bit comp %b code %0d expected %0d", c6, h6, 2 * n - 6);
      end
      n = 0;
      for (int i = 0; i < 7; i++) n += c7[i];
      checks++;
      if (int'(h7) != 2 * n - 7) begin
        failures++;
        $display("FAIL: flash comp %b code %0d expected %0d", c7, h7, 2 * n - 7);
      end
    end
    // Thermometer extremes.
    c6 = '0; c7 = '0; #1;
    checks++; if (h6 != -6 || h7 != -7) begin failures++; $display("FAIL: all-zero codes"); end
    c6 = '1; c7 = '1; #1;
    checks++; if (h6 != 6 || h7 != 7) begin failures++; $display("FAIL: all-one codes"); end
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
