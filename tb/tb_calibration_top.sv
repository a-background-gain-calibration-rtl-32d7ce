// End-to-end test of the calibrated ADC back end with a behavioural model of
// the analog pipeline whose stage-1 gain is about 3.854 instead of 4 (the
// closed-loop loss of a 41 dB opamp). The input is a sum of four sinusoids below 54 % of the
// Nyquist frequency, the band where the 40-tap interpolator is 13-bit exact.
// Phases:
//   A  calibration off: only mode 1, beta stays 1/4, the output shows the
//      gain error as code errors of several LSB;
//   B  calibration on: one mode-2 sample every N_MODE1+1, beta converges to
//      1/G (step size raised with MU_SHIFT = 2 to keep the run short);
//   C  after convergence both mode-1 and mode-2 outputs are within 1.5 LSB of
//      the ideal 13-bit code of the input, 7 clocks after it was sampled;
//   D  calibration off again: beta is frozen, mode 2 stops, the output stays
//      corrected;
//   E  an over-range input saturates the output code.
// Each mechanism (mode switch, LMS update, interpolation, saturation, freeze)
// is counted and must occur.
module tb_calibration_top;
  import adc_cal_pkg::*;

  localparam int unsigned N_MODE1  = 20;
  localparam int unsigned MU_SHIFT = 2;
  localparam real         A_DC     = 112.2;  // 41 dB
  // Real stage-1 gain: 4 / (1 + 1/(A_DC*f)), f = C4/(C1+..+C5) = 2/8.5.
  localparam real         G1       = 4.0 / (1.0 + 8.5 / (2.0 * A_DC));
  localparam int          LAT      = 7;
  localparam int          CYCLES_B = 150000;

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

  calibration_top #(.N_MODE1(N_MODE1), .MU_SHIFT(MU_SHIFT)) dut (
    .clk, .rst_n, .cal_en, .comp1, .comp_mid, .comp6,
    .sel, .s1_dac_x(s1_x), .s1_dac_z(s1_z), .dout, .dout_mode, .beta, .lms_update
  );

  int checks = 0, failures = 0;
  int n_mode2 = 0, n_updates = 0, n_sat = 0;
  longint cyc = 0;
  real vhist [64];
  real f [4], ph [4];
  real over = 0.0;      // extra input for the over-range phase
  real maxerr;
  int  n_meas_m1, n_meas_m2;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real sig(longint n);
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += 0.11 * $sin(2.0 * 3.14159265358979 * f[i] * real'(n) + ph[i]);
    return s + over;
  endfunction

  // History of the sampled input, and the next input after every edge.
  always @(posedge clk) begin
    vhist[cyc % 64] = vin;
    cyc++;
  end
  always @(negedge clk) vin = sig(cyc);

  always @(posedge clk) begin
    if (rst_n) begin
      if (lms_update)     n_updates++;
    end
  end

  // Ideal 13-bit code of the input sampled LAT edges before the last edge.
  function automatic int ideal_code();
    real v = vhist[(cyc - 1 - LAT) % 64];
    int  c = int'($floor(v * 8192.0 + 0.5));
    if (c > 4095)  c = 4095;
    if (c < -4096) c = -4096;
    return c;
  endfunction

  task automatic measure(int n, output real mx, output int m1, output int m2);
    real e;
    mx = 0.0; m1 = 0; m2 = 0;
    repeat (n) begin
      @(negedge clk);
      e = real'($signed(dout)) - real'(ideal_code());
      if (e < 0) e = -e;
      if (e > mx) mx = e;
      if (dout_mode == MODE2) m2++; else m1++;
    end
  endtask

  initial begin
    real b_true, b_now, b_rel;
    beta_t b_frozen;
    int m1, m2;
    for (int i = 0; i < 4; i++) begin
      f[i]  = 0.01 + 0.26 * real'($urandom_range(1000)) / 1000.0;  // below 0.27 fs
      ph[i] = 6.283 * real'($urandom_range(1000)) / 1000.0;
    end
    b_true = 1.0 / G1;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);

    // A: calibration off.
    measure(5000, maxerr, m1, m2);
    $display("A: max error %.2f LSB without calibration, mode-2 outputs %0d", maxerr, m2);
    check(m2 == 0, "no mode-2 samples with calibration off");
    check(maxerr > 4.0, "gain error visible without calibration");
    check(beta == BETA_NOMINAL, "beta at nominal 1/4");
    check(n_updates == 0, "no LMS update with calibration off");

    // B: calibration on.
    cal_en = 1'b1;
    measure(CYCLES_B, maxerr, m1, m2);
    n_mode2 = m2;
    b_now = real'(beta) / real'(1 << BETA_FRAC);
    b_rel = (b_now - b_true) / b_true;
    $display("B: beta %.6f (target %.6f, rel %.2e), mode-2 outputs %0d, updates %0d",
             b_now, b_true, b_rel, m2, n_updates);
    check(m2 >= CYCLES_B / (N_MODE1 + 1) - 1 && m2 <= CYCLES_B / (N_MODE1 + 1) + 1,
          "one mode-2 sample every N_MODE1+1");
    check(n_updates >= m2 - 2 && n_updates <= m2, "one LMS update per mode-2 sample");
    check(b_rel < 5e-4 && b_rel > -5e-4, "beta converged to 1/G");

    // C: calibrated output.
    measure(20000, maxerr, m1, m2);
    $display("C: max error %.2f LSB after calibration (%0d mode-1, %0d mode-2 outputs)", maxerr, m1, m2);
    check(maxerr <= 1.5, "calibrated output within 1.5 LSB");
    check(m2 > 0, "mode-2 outputs measured");

    // D: freeze.
    cal_en = 1'b0;
    repeat (100) @(negedge clk);
    b_frozen = beta;
    measure(2000, maxerr, m1, m2);
    $display("D: max error %.2f LSB, beta %.6f frozen", maxerr, real'(beta) / real'(1 << BETA_FRAC));
    check(beta == b_frozen, "beta frozen with calibration off");
    check(m2 == 0, "mode 2 stops with calibration off");
    check(maxerr <= 1.5, "frozen beta still corrects");

    // E: over-range input saturates (calibration frozen).
    over = 0.3;
    repeat (200) begin
      @(negedge clk);
      if (dout == 13'h0fff) n_sat++;
    end
    over = 0.0;
    repeat (20) @(negedge clk);
    check(n_sat > 0, "output saturates on over-range input");

    $display("mechanisms: mode2=%0d lms_updates=%0d saturations=%0d", n_mode2, n_updates, n_sat);
    check(n_mode2 > 0 && n_updates > 0 && n_sat > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
