// Test of the code combiner: random stage codes are combined and the backend
// value D_BK is compared, one clock later, with the sum worked out in real
// arithmetic: each stage's level (in Vref of its own input) divided by 4 per
// stage, referred to the stage-2 input and expressed in Vref/2^12.
module tb_backend_combiner;
  import adc_cal_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  d1_t     d1;
  mode_e   mode;
  hcode_t  mid [N_MID];
  hcode_t  last;
  sample_t out;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  backend_combiner dut (.clk, .rst_n, .d1, .mode, .mid, .last, .out);

  initial begin
    real v, w;
    int  exp_dbk, exp_d1, exp_m;
    d1 = '0; mode = MODE1; last = '0;
    for (int k = 0; k < 4; k++) mid[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      d1   = d1_t'(2 * $urandom_range(6) - 6);
      mode = mode_e'($urandom_range(1));
      for (int k = 0; k < 4; k++) mid[k] = hcode_t'(2 * $urandom_range(6) - 6);
      last = hcode_t'(2 * $urandom_range(7) - 7);
      if (t == 0) for (int k = 0; k < 4; k++) mid[k] = 6;
      if (t == 1) for (int k = 0; k < 4; k++) mid[k] = -6;
      // Level of a stage = code/16 of its input span; gain 4 between stages.
      v = 0.0; w = 1.0;
      for (int k = 0; k < 4; k++) begin v += w * real'(mid[k]) / 16.0; w /= 4.0; end
      v += w * real'(last) / 16.0;
      exp_dbk = int'(v * 4096.0);
      exp_d1  = int'(d1);
      exp_m   = int'(mode);
      @(negedge clk);
      checks++;
      if (int'(out.dbk) != exp_dbk || int'(out.d1) != exp_d1 || int'(out.mode) != exp_m) begin
        failures++;
        $display("FAIL: dbk %0d expected %0d (d1 %0d/%0d)", out.dbk, exp_dbk, out.d1, exp_d1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
