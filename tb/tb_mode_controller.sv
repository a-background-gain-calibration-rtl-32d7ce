// Test of the stage-1 mode sequencer: with calibration enabled sel must show
// exactly N_MODE1 mode-1 samples between consecutive mode-2 samples, and with
// calibration disabled it must stay in mode 1.
module tb_mode_controller;
  import adc_cal_pkg::*;

  localparam int unsigned N_MODE1 = 20;

  logic  clk = 1'b0, rst_n = 1'b0, cal_en = 1'b0;
  mode_e sel;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  mode_controller #(.N_MODE1(N_MODE1)) dut (.clk, .rst_n, .cal_en, .sel);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int run, n2, first;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (50) begin
      @(negedge clk);
      check(sel == MODE1, "mode 1 while calibration is off");
    end
    cal_en = 1'b1;
    run = 0; n2 = 0; first = 1;
    repeat (1000) begin
      @(negedge clk);
      if (sel == MODE2) begin
        n2++;
        if (first) check(run == N_MODE1, "first mode-2 after N_MODE1 mode-1 samples");
        else       check(run == N_MODE1, "N_MODE1 mode-1 samples between mode-2 samples");
        first = 0;
        run = 0;
      end else run++;
    end
    check(n2 >= 1000 / (N_MODE1 + 1) - 1 && n2 <= 1000 / (N_MODE1 + 1) + 1, "mode-2 rate 1/(N_MODE1+1)");
    cal_en = 1'b0;
    @(negedge clk);
    repeat (100) begin
      @(negedge clk);
      check(sel == MODE1, "mode 1 after calibration is switched off");
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
