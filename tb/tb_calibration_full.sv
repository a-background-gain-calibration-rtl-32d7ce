// Full-size run of the calibrated ADC back end at its default parameters
// (N_MODE1 = 20, 40 interpolation taps, MU_SHIFT = 8), one complete
// calibration: the behavioural analog pipeline has a stage-1 gain of about 3.854 (41 dB opamp).
//   1  calibration off, sinusoid near full scale: SNDR is measured against
//      the exact input (it is limited by the gain error);
//   2  calibration on for 2^23 samples of a band-limited input (four tones
//      below 54 % of Nyquist); beta must end within 5e-4 of 1/G. Every 2^20
//      samples the loop is frozen, the input switched to the sinusoid and
//      its SNDR and SFDR measured, then the loop resumes: this traces their
//      convergence over the iterations. The input is only switched while
//      the loop is frozen, at least 100 samples (more than the 41-sample
//      interpolation window) away from any update;
//   3  calibration frozen, the same sinusoid: SNDR must now reach the
//      quantization limit and improve by over 10 dB. That limit is about
//      76 dB here: the backend resolves steps of 1.04 LSB (its step of
//      Vref/2^13 is scaled by 4/G) and the output is rounded to 13 bits
//      once more, so two uniform errors add up; it must exceed 74 dB.
//      SFDR is the sinusoid against the largest of harmonics 2..10 of the
//      output error, found by Hann-windowed projections (aliasing is implied
//      by evaluating each harmonic at the sample instants); it must exceed
//      85 dB and improve by over 20 dB.
module tb_calibration_full;
  import adc_cal_pkg::*;

  localparam real A_DC = 112.2;  // 41 dB
  // Real stage-1 gain: 4 / (1 + 1/(A_DC*f)), f = C4/(C1+..+C5) = 2/8.5.
  localparam real G1   = 4.0 / (1.0 + 8.5 / (2.0 * A_DC));
  localparam int  LAT  = 7;
  localparam int  NCAL = 1 << 23;

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

  calibration_top dut (
    .clk, .rst_n, .cal_en, .comp1, .comp_mid, .comp6,
    .sel, .s1_dac_x(s1_x), .s1_dac_z(s1_z), .dout, .dout_mode, .beta, .lms_update
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_updates = 0, n_mode2 = 0;
  real vhist [64];
  real f [4], ph [4];
  bit  sine = 1'b1;
  localparam real FSIN = 0.0123456;  // cycles per sample

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
    if (rst_n && sel == MODE2) n_mode2++;
  end
  always @(negedge clk) vin = sig(cyc);

  // SNDR of dout against the exact sampled input over n samples, and SFDR
  // of the sinusoid against the largest harmonic of the output error.
  localparam int NH = 10;
  task automatic measure(int n, output real db, output real sfdr);
    real ps = 0.0, pe = 0.0, v, e, w, sw = 0.0, amax = 0.0, a, ph0;
    real hc [2:NH], hs [2:NH];
    longint n0 = -1, idx;
    for (int k = 2; k <= NH; k++) begin hc[k] = 0.0; hs[k] = 0.0; end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      idx = cyc - 1 - LAT;
      if (n0 < 0) n0 = idx;
      v  = vhist[idx % 64];
      e  = real'($signed(dout)) / 8192.0 - v;
      ps += v * v;
      pe += e * e;
      w   = 0.5 - 0.5 * $cos(2.0 * 3.14159265358979 * real'(i) / real'(n));
      sw += w;
      ph0 = 2.0 * 3.14159265358979 * FSIN * real'(idx);
      for (int k = 2; k <= NH; k++) begin
        hc[k] += w * e * $cos(real'(k) * ph0);
        hs[k] += w * e * $sin(real'(k) * ph0);
      end
    end
    for (int k = 2; k <= NH; k++) begin
      a = 2.0 * $sqrt(hc[k] * hc[k] + hs[k] * hs[k]) / sw;
      if (a > amax) amax = a;
    end
    db   = 10.0 * $log10(ps / pe);
    sfdr = 20.0 * $log10(0.45 / amax);
  endtask

  initial begin
    real db0, db1, sf0, sf1, dbk, sfk, b, rel;
    for (int i = 0; i < 4; i++) begin
      f[i]  = 0.01 + 0.26 * real'($urandom_range(1000)) / 1000.0;
      ph[i] = 6.283 * real'($urandom_range(1000)) / 1000.0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);

    measure(65536, db0, sf0);
    $display("before calibration: SNDR %.1f dB, SFDR %.1f dB", db0, sf0);

    sine = 1'b0;
    cal_en = 1'b1;
    for (int blk = 1; blk <= NCAL / (1 << 20); blk++) begin
      repeat (1 << 20) @(negedge clk);
      b = real'(beta) / 16777216.0;
      cal_en = 1'b0;
      repeat (100) @(negedge clk);
      sine = 1'b1;
      repeat (100) @(negedge clk);
      measure(16384, dbk, sfk);
      $display("after %0d x 2^20 samples: beta %.7f (1/G = %.7f), SNDR %.1f dB, SFDR %.1f dB",
               blk, b, 1.0 / G1, dbk, sfk);
      sine = 1'b0;
      repeat (100) @(negedge clk);
      cal_en = 1'b1;
    end
    b   = real'(beta) / 16777216.0;
    rel = (b - 1.0 / G1) * G1;
    check(rel < 5e-4 && rel > -5e-4, "beta converged within 2^23 samples");
    $display("mode-2 samples %0d, LMS updates %0d", n_mode2, n_updates);
    // A mode-2 sample whose error is not ready when the loop freezes (41
    // clocks of window plus 8 of pipeline: up to 3 samples) loses its update.
    check(n_updates >= n_mode2 - 3 - 3 * (NCAL >> 20) && n_updates <= n_mode2,
          "one LMS update per mode-2 sample");
    check(n_mode2 >= NCAL / 21 - 10 && n_mode2 <= NCAL / 21 + 10, "mode-2 rate 1/21");

    cal_en = 1'b0;
    sine = 1'b1;
    repeat (100) @(negedge clk);
    measure(65536, db1, sf1);
    $display("after calibration: SNDR %.1f dB, SFDR %.1f dB (beta relative error %.2e)",
             db1, sf1, rel);
    check(db1 > 74.0, "calibrated SNDR at the quantization limit");
    check(db1 > db0 + 10.0, "calibration improves SNDR");
    check(sf1 > 85.0, "calibrated SFDR");
    check(sf1 > sf0 + 20.0, "calibration improves SFDR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCAL + 600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
