// Input-bandwidth sweep: how well the background calibration works as the
// input occupies more of the Nyquist band. For each bandwidth B (0.1 .. 0.8 of
// Nyquist) the back end is reset and calibrated on four random tones below B,
// with the LMS step raised (MU_SHIFT = 4) so that each point converges in
// 400k samples; beta is then frozen and the SNDR of a near-full-scale
// sinusoid is measured against the exact input. The stage-1 gain is about 3.854
// (41 dB opamp).
// Checks: up to B = 0.5 the SNDR must reach the quantization limit (above
// 74 dB) and beta must be within 5e-4 of 1/G, and up to B = 0.6 the
// calibrated SNDR must beat the uncalibrated one. The 40-tap interpolator
// loses accuracy above about 0.55 of Nyquist, so beyond that point the result
// is reported, not required (at 0.7 and 0.8 the estimate is biased).
module tb_bandwidth_sweep;
  import adc_cal_pkg::*;

  localparam real A_DC = 112.2;  // 41 dB
  // Real stage-1 gain: 4 / (1 + 1/(A_DC*f)), f = C4/(C1+..+C5) = 2/8.5.
  localparam real G1   = 4.0 / (1.0 + 8.5 / (2.0 * A_DC));
  localparam int  LAT  = 7;
  localparam int  NCAL = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cal_en = 1'b0;
  real  vin = 0.0;
  logic [6:0] comp1;
  logic [5:0] comp_mid [4];
  logic [6:0] comp6;
  mode_e sel;
  logic [2:0] s1_x, s1_z;
  logic [12:0] dout;
  mode_e dout_mode;
  beta_t beta;
  logic lms_update;

  always #5 clk = ~clk;

  adc_analog_model #(.A_DC(A_DC)) u_model (
    .clk, .vin, .sel(sel == MODE2), .s1_x, .s1_z, .comp1, .comp_mid, .comp6
  );

  calibration_top #(.MU_SHIFT(4)) dut (
    .clk, .rst_n, .cal_en, .comp1, .comp_mid, .comp6,
    .sel, .s1_dac_x(s1_x), .s1_dac_z(s1_z), .dout, .dout_mode, .beta, .lms_update
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_updates = 0;
  real vhist [64];
  real f [4], ph [4];
  bit  sine = 1'b1;
  localparam real FSIN = 0.0123456;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real sig(longint n);
    real s = 0.0;
    if (sine) return 0.45 * $sin(2.0 * 3.14159265358979 * FSIN * real'(n));
    for (int i = 0; i < 4; i++) s += 0.11 * $sin(2.0 * 3.14159265358979 * f[i] * real'(n) + ph[i]);
    return s;
  endfunction

  always @(posedge clk) begin
    vhist[cyc % 64] = vin;
    cyc++;
    if (rst_n && lms_update) n_updates++;
  end
  always @(negedge clk) vin = sig(cyc);

  task automatic sndr(int n, output real db);
    real ps = 0.0, pe = 0.0, v, e;
    repeat (n) begin
      @(negedge clk);
      v  = vhist[(cyc - 1 - LAT) % 64];
      e  = real'($signed(dout)) / 8192.0 - v;
      ps += v * v;
      pe += e * e;
    end
    db = 10.0 * $log10(ps / pe);
  endtask

  initial begin
    real db0, db1, b, rel, bw;
    for (int p = 1; p <= 8; p++) begin
      bw = 0.1 * p;                       // fraction of Nyquist
      rst_n = 1'b0; cal_en = 1'b0; sine = 1'b1;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      repeat (20) @(negedge clk);
      sndr(16384, db0);
      // Tones at random frequencies in the band, the last one at its edge.
      for (int i = 0; i < 4; i++) begin
        f[i]  = 0.5 * bw * ((i == 3) ? 0.999 : 0.1 + 0.9 * real'($urandom_range(10000)) / 10000.0);
        ph[i] = 6.283 * real'($urandom_range(1000)) / 1000.0;
      end
      sine = 1'b0;
      cal_en = 1'b1;
      repeat (NCAL) @(negedge clk);
      cal_en = 1'b0;
      sine = 1'b1;
      repeat (50) @(negedge clk);
      sndr(16384, db1);
      b   = real'(beta) / 16777216.0;
      rel = (b - 1.0 / G1) * G1;
      $display("bandwidth %.1f x Nyquist: SNDR %.1f dB -> %.1f dB, beta relative error %.2e",
               bw, db0, db1, rel);
      if (bw < 0.65) check(db1 > db0, "calibration improves SNDR");
      if (bw < 0.55) begin
        check(db1 > 74.0, "SNDR at the quantization limit");
        check(rel < 5e-4 && rel > -5e-4, "beta within 5e-4 of 1/G");
      end
    end
    check(n_updates > 8 * (NCAL / 21 - 100), "LMS updates at every point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * (NCAL + 40000)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
