// Nonlinear interpolation filter and calibration error.
//
// A mode-2 sample has no mode-1 counterpart. This block estimates the mode-1
// output at that instant from the TAPS_HALF mode-1 outputs on each side,
//   x1_est(0) = sum_{k=1..n} C(k) * (x(-k) + x(+k)),
//   C(k) = n! n! / ((n+k)! (n-k)!) * (-1)^(k+1),  n = TAPS_HALF,
// and outputs the error e = x1_est(0) - x2(0) that drives the LMS update,
// together with the backend code D_BK of the mode-2 sample (the gradient).
// The tap formula and the 40 taps (n = 20) follow the text. The coefficients
// are computed at elaboration with C(k) = C(k-1)*(n-k+1)/(n+k) and rounded to
// COEF_FRAC fraction bits.
//
// How it works: the calibrated outputs enter a (2n+1)-deep window. When the
// mode-2 sample sits in the middle and every other window entry is a mode-1
// sample, the n symmetric pair sums and the centre are captured, and one
// multiply-accumulate per clock sums the taps (the coefficients are symmetric,
// so n products suffice). A clean window needs the mode-2 samples at least
// n+1 clocks apart, and the sum takes n clocks, so a new window never arrives
// while the previous sum is running. The serial MAC is this design's choice.
//
// Timing: err_valid pulses n+1 clocks after the capture, i.e. 2n+1 clocks
// after the mode-2 sample entered. One sample per clock on the input.
module nl_interpolator
  import adc_cal_pkg::*;
#(
  parameter int unsigned TAPS_HALF = 20,
  parameter int unsigned COEF_FRAC = 24,
  parameter int unsigned ERR_W     = DCAL_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dcal_t                   dcal,
  input  mode_e                   mode,
  input  dbk_t                    dbk,
  output logic                    err_valid,
  output logic signed [ERR_W-1:0] err,
  output dbk_t                    grad
);

  localparam int unsigned N      = TAPS_HALF;
  localparam int unsigned WIN    = 2 * N + 1;
  localparam int unsigned COEF_W = COEF_FRAC + 1;
  localparam int unsigned PAIR_W = DCAL_W + 1;
  localparam int unsigned ACC_W  = PAIR_W + COEF_W + $clog2(N + 1) + 1;
  localparam int unsigned IW     = $clog2(N + 1);
  localparam int unsigned SCALE  = 40;   // internal precision of the recursion

  // C(k), k >= 1, rounded to COEF_FRAC fraction bits.
  function automatic longint coef_fn(int k);
    longint c;
    c = longint'(1) <<< SCALE;
    for (int i = 1; i <= k; i++) c = (c * (longint'(N) - longint'(i) + 1)) / (longint'(N) + longint'(i));
    c = (c + (longint'(1) <<< (SCALE - COEF_FRAC - 1))) >>> (SCALE - COEF_FRAC);
    return (k % 2 == 1) ? c : -c;
  endfunction

  logic signed [COEF_W-1:0] coef [N];
  for (genvar k = 0; k < int'(N); k++) begin : g_coef
    localparam longint CK = coef_fn(k + 1);
    assign coef[k] = COEF_W'(CK);
  end

  typedef struct packed {
    mode_e mode;
    dcal_t x;
  } entry_t;

  entry_t win [WIN];      // win[0] newest
  dbk_t   dbk_line [N+1]; // D_BK delayed to the window centre

  logic signed [PAIR_W-1:0] pair [N];
  dcal_t                    centre;
  dbk_t                     centre_dbk;
  logic signed [ACC_W-1:0]  acc;
  logic [IW-1:0]            idx;
  logic                     busy;

  logic window_ok;
  always_comb begin
    window_ok = (win[N].mode == MODE2);
    for (int i = 0; i < int'(WIN); i++) begin
      if (i != int'(N) && win[i].mode != MODE1) window_ok = 1'b0;
    end
  end

  logic signed [ACC_W-1:0] prod;
  logic signed [ACC_W-1:0] est;
  always_comb begin
    prod = ACC_W'(pair[idx]) * ACC_W'(coef[idx]);
    est  = (acc + prod + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WIN); i++) win[i] <= '{mode: MODE1, x: '0};
      for (int i = 0; i <= int'(N); i++) dbk_line[i] <= '0;
      for (int i = 0; i < int'(N); i++) pair[i] <= '0;
      centre     <= '0;
      centre_dbk <= '0;
      acc        <= '0;
      idx        <= '0;
      busy       <= 1'b0;
      err_valid  <= 1'b0;
      err        <= '0;
      grad       <= '0;
    end else begin
      win[0] <= '{mode: mode, x: dcal};
      for (int i = 1; i < int'(WIN); i++) win[i] <= win[i-1];
      dbk_line[0] <= dbk;
      for (int i = 1; i <= int'(N); i++) dbk_line[i] <= dbk_line[i-1];

      err_valid <= 1'b0;

      if (busy) begin
        if (idx == IW'(N - 1)) begin
          busy      <= 1'b0;
          err_valid <= 1'b1;
          err       <= ERR_W'(est) - ERR_W'(centre);
          grad      <= centre_dbk;
        end else begin
          acc <= acc + prod;
          idx <= idx + 1'b1;
        end
      end

      if (window_ok) begin
        for (int k = 1; k <= int'(N); k++)
          pair[k-1] <= PAIR_W'(win[N-k].x) + PAIR_W'(win[N+k].x);
        centre     <= win[N].x;
        centre_dbk <= dbk_line[N];
        acc        <= '0;
        idx        <= '0;
        busy       <= 1'b1;
      end
    end
  end

endmodule
