// Test of the gain corrector: for random D1, D_BK and beta the output must
// equal D1*Vref/16 + beta*D_BK*Vref/2^12 computed in real arithmetic, both
// at full precision (within one unit of Vref/2^18) and as the rounded,
// saturated 13-bit code, one clock after the input.
module tb_gain_corrector;
  import adc_cal_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  sample_t  in;
  beta_t    beta;
  dcal_t    dcal;
  logic [12:0] dout;
  mode_e    mode_o;
  dbk_t     dbk_o;
  int       checks = 0, failures = 0;
  int       n_sat = 0;

  always #5 clk = ~clk;

  gain_corrector dut (.clk, .rst_n, .in, .beta, .dcal, .dout, .mode_o, .dbk_o);

  initial begin
    real b, v, e;
    int  code;
    in = '{mode: MODE1, d1: '0, dbk: '0};
    beta = BETA_NOMINAL;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      in.mode = mode_e'($urandom_range(1));
      in.d1   = d1_t'($urandom_range(14) - 7);
      in.dbk  = dbk_t'($urandom_range(4095) - 2048);
      b       = 0.2 + 0.1 * real'($urandom_range(100000)) / 100000.0;
      if (t % 500 == 0) b = 0.25;
      beta    = beta_t'(int'(b * 16777216.0));
      b       = real'(beta) / 16777216.0;
      v       = real'(in.d1) / 16.0 + b * real'(in.dbk) / 4096.0;   // in Vref
      code    = int'($floor(v * 8192.0 + 0.5));
      if (code > 4095) begin code = 4095; n_sat++; end
      if (code < -4096) begin code = -4096; n_sat++; end
      @(negedge clk);
      e = real'(dcal) - v * 262144.0;
      checks++;
      if (e > 1.0 || e < -1.0) begin
        failures++;
        $display("FAIL: dcal %0d expected %f", dcal, v * 262144.0);
      end
      checks++;
      if (int'($signed(dout)) != code) begin
        // dout is rounded from dcal, itself rounded to Vref/2^18: values within
        // 1/32 LSB of a tie may round either way; allow only those.
        if (!((v * 8192.0 - $floor(v * 8192.0)) > 0.5 - 1.0/32 && (v * 8192.0 - $floor(v * 8192.0)) < 0.5 + 1.0/32)) begin
          failures++;
          $display("FAIL: dout %0d expected %0d", $signed(dout), code);
        end
      end
      checks++;
      if (mode_o != in.mode || dbk_o != in.dbk) begin failures++; $display("FAIL: side band"); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
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
