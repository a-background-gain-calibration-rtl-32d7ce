// Test of the stage-code alignment: random codes are fed in as a pipeline
// would deliver them (stage j's code for sample s at clock s+j-1); every
// output clock must carry the six codes of one and the same sample.
module tb_code_align;
  import adc_cal_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  d1_t    d1;
  mode_e  mode1;
  hcode_t mid [N_MID];
  hcode_t last;
  d1_t    d1_o;
  mode_e  mode_o;
  hcode_t mid_o [N_MID];
  hcode_t last_o;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  code_align dut (.clk, .rst_n, .d1, .mode1, .mid, .last,
                  .d1_o, .mode_o, .mid_o, .last_o);

  // Per-sample codes, indexed by sample number.
  int s_d1 [1024], s_m [1024], s_h [1024][6];

  initial begin
    int t;
    for (int s = 0; s < 1024; s++) begin
      s_m[s]  = $urandom_range(1);
      s_d1[s] = s_m[s] ? 2 * $urandom_range(7) - 7 : 2 * $urandom_range(6) - 6;
      for (int j = 2; j <= 6; j++) s_h[s][j-1] = 2 * $urandom_range(6) - 6;
    end
    d1 = '0; mode1 = MODE1; last = '0;
    for (int k = 0; k < 4; k++) mid[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (t = 0; t < 1000; t++) begin
      // Inputs during clock t: stage j holds sample t-(j-1).
      d1    = d1_t'(s_d1[t]);
      mode1 = mode_e'(s_m[t]);
      for (int k = 0; k < 4; k++) mid[k] = (t - k - 1 >= 0) ? hcode_t'(s_h[t-k-1][k+1]) : '0;
      last  = (t - 5 >= 0) ? hcode_t'(s_h[t-5][5]) : '0;
      #1;
      // Outputs during clock t: all codes of sample t-5.
      if (t >= 5) begin
        checks++;
        if (int'(d1_o) != s_d1[t-5] || int'(mode_o) != s_m[t-5] || int'(last_o) != s_h[t-5][5] ||
            int'(mid_o[0]) != s_h[t-5][1] || int'(mid_o[1]) != s_h[t-5][2] ||
            int'(mid_o[2]) != s_h[t-5][3] || int'(mid_o[3]) != s_h[t-5][4]) begin
          failures++;
          $display("FAIL: clock %0d: codes of sample %0d not aligned", t, t - 5);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
