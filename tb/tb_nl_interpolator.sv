// Test of the interpolation filter. A band-limited stream (two sinusoids
// below 0.7 of the Nyquist frequency) is fed in, with every 21st sample
// marked as mode 2 and shifted by a known offset. For each mode-2 sample the
// error must equal sum_k C(k)*(x(-k)+x(k)) - x2(0), with the taps computed
// here in real arithmetic from the factorial formula, within 2 units; it
// must be close to minus the offset (the interpolation is accurate), carry
// the D_BK of the mode-2 sample, and arrive 2n+1 clocks after that sample
// entered. Mode-2 samples spaced closer than n+1 must yield no error.
module tb_nl_interpolator;
  import adc_cal_pkg::*;

  localparam int unsigned N   = 20;
  localparam int          OFS = 3000;
  localparam int          LEN = 3000;
  localparam real         F2  = 0.2;

  logic  clk = 1'b0, rst_n = 1'b0;
  dcal_t dcal;
  mode_e mode;
  dbk_t  dbk;
  logic  err_valid;
  logic signed [DCAL_W:0] err;
  dbk_t  grad;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  nl_interpolator #(.TAPS_HALF(N)) dut (.clk, .rst_n, .dcal, .mode, .dbk, .err_valid, .err, .grad);

  int  xs [LEN];     // stream as fed (mode-2 samples include the offset)
  int  ms [LEN];
  int  ds [LEN];
  real c  [N+1];
  int  edge_no = 0;
  int  n_err = 0;
  int  spacing = 21;

  // Taps from n!n!/((n+k)!(n-k)!) (-1)^(k+1), as a product to stay in range.
  function automatic real tap(int k);
    real r = 1.0;
    for (int i = 1; i <= k; i++) r = r * real'(N - i + 1) / real'(N + i);
    return (k % 2) ? r : -r;
  endfunction

  always @(posedge clk) if (rst_n) edge_no <= edge_no + 1;

  // Check each error against the reference of the sample that caused it.
  always @(negedge clk) begin
    if (rst_n && err_valid) begin
      int  s;
      real ref_e, diff;
      n_err++;
      s = edge_no - 1 - (2 * N + 1);        // sample that entered 2n+1 edges earlier
      checks++;
      if (s < N || s >= LEN - N || ms[s] != 1) begin
        failures++;
        $display("FAIL: error at edge %0d does not line up with a mode-2 sample", edge_no);
      end else begin
        ref_e = -real'(xs[s]);
        for (int k = 1; k <= N; k++) ref_e += c[k] * real'(xs[s-k] + xs[s+k]);
        diff = real'(err) - ref_e;
        checks++;
        if (diff > 2.0 || diff < -2.0) begin
          failures++;
          $display("FAIL: sample %0d err %0d reference %f", s, err, ref_e);
        end
        checks++;
        if (real'(err) + OFS > 50.0 || real'(err) + OFS < -50.0) begin
          failures++;
          $display("FAIL: sample %0d interpolation off: err %0d, offset %0d", s, err, OFS);
        end
        checks++;
        if (int'(grad) != ds[s]) begin failures++; $display("FAIL: grad %0d expected %0d", grad, ds[s]); end
      end
    end
  end

  initial begin
    real f1 = 0.123, f2 = F2;
    for (int k = 1; k <= N; k++) c[k] = tap(k);
    for (int t = 0; t < LEN; t++) begin
      ms[t] = (t % spacing == spacing - 1) && t >= N && t < LEN - N;
      xs[t] = int'(150000.0 * $sin(6.2831853 * f1 * t) + 90000.0 * $sin(6.2831853 * f2 * t + 1.0));
      if (ms[t] == 1) xs[t] += OFS;
      ds[t] = $urandom_range(4000) - 2000;
    end
    dcal = '0; mode = MODE1; dbk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < LEN; t++) begin
      dcal = dcal_t'(xs[t]);
      mode = mode_e'(ms[t]);
      dbk  = dbk_t'(ds[t]);
      @(negedge clk);
    end
    mode = MODE1;
    repeat (3 * N) @(negedge clk);
    checks++;
    if (n_err < (LEN - 2 * N) / spacing - 1) begin
      failures++;
      $display("FAIL: only %0d errors produced", n_err);
    end
    // Mode-2 samples 11 apart: no clean window, no error.
    n_err = 0;
    for (int t = 0; t < 500; t++) begin
      mode = mode_e'(t % 11 == 10);
      @(negedge clk);
    end
    checks++;
    if (n_err != 0) begin failures++; $display("FAIL: error from an unclean window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
