// Test of the LMS estimator. Random errors and gradients are applied and the
// new beta is compared with beta + e*D_BK*2^-MU_SHIFT computed in real
// arithmetic on a model accumulator (2^-32 units, rounded to nearest),
// including the clamp at zero. beta must start at 1/4, move only on
// err_valid with cal_en high, and pulse `updated` once per accepted error.
module tb_lms_engine;
  import adc_cal_pkg::*;

  localparam int unsigned MU_SHIFT = 6;

  logic  clk = 1'b0, rst_n = 1'b0, cal_en = 1'b0, err_valid = 1'b0;
  logic signed [DCAL_W:0] err;
  dbk_t  grad;
  beta_t beta;
  logic  updated;
  int    checks = 0, failures = 0;
  int    n_clamp = 0;

  always #5 clk = ~clk;

  lms_engine #(.MU_SHIFT(MU_SHIFT)) dut (.clk, .rst_n, .cal_en, .err_valid, .err, .grad, .beta, .updated);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real acc, step;      // model accumulator in units of 2^-32
    err = '0; grad = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(real'(beta) / 16777216.0 == 0.25, "beta starts at 1/4");
    acc = 0.25 * 4294967296.0;
    // Calibration off: no change.
    err = 1000; grad = 1000; err_valid = 1'b1;
    @(negedge clk);
    err_valid = 1'b0;
    check(!updated && real'(beta) / 16777216.0 == 0.25, "no update with cal_en low");
    cal_en = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      err  = (t < 1500) ? ($urandom_range(60000) - 30000) : ($urandom_range(2000) - 1000);
      grad = dbk_t'($urandom_range(4000) - 2000);
      // Push beta towards zero for a while to reach the clamp.
      if (t >= 1000 && t < 1200) begin err = 300000; grad = -2000; end
      err_valid = (t % 3 != 2);
      step = real'(err) * real'(grad) / real'(1 << MU_SHIFT);
      @(negedge clk);
      if (err_valid) begin
        acc = acc + $floor(step + 0.5);
        if (acc < 0.0) begin acc = 0.0; n_clamp++; end
        check(updated, "updated pulses on a valid error");
        check(real'(beta) == $floor(acc / 256.0), "beta follows the LMS update");
      end else begin
        check(!updated, "no update without a valid error");
      end
      err_valid = 1'b0;
    end
    check(n_clamp > 0, "clamp at zero exercised");
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
