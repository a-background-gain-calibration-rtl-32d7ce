// LMS estimator of the reciprocal interstage gain beta = 1/G.
//
// On every valid error it applies
//   beta(n+1) = beta(n) + mu_g * e(n) * D_BK,
// with mu_g = 2^-MU_SHIFT in the units below, rounding to nearest. The
// accumulator keeps ACC_FRAC fraction bits so that very small steps are not
// lost; the top BETA_FRAC are used by the gain corrector. beta is held in
// [0, 2) by saturation. When cal_en is low the estimate is frozen.
// The update law follows the text; the step size, the accumulator precision,
// the reset value 1/4 (the nominal 1/G) and the saturation are this design's.
//
// Units: e in Vref/2^(14+DCAL_XF), D_BK in Vref/2^12, accumulator in 2^-ACC_FRAC.
// Timing: beta changes on the clock after err_valid; `updated` pulses then.
module lms_engine
  import adc_cal_pkg::*;
#(
  parameter int unsigned MU_SHIFT = 8,
  parameter int unsigned ERR_W    = DCAL_W + 1,
  parameter int unsigned ACC_FRAC = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cal_en,
  input  logic                    err_valid,
  input  logic signed [ERR_W-1:0] err,
  input  dbk_t                    grad,
  output beta_t                   beta,
  output logic                    updated
);

  localparam int unsigned ACC_W  = ACC_FRAC + 2;
  localparam int unsigned PROD_W = ERR_W + DBK_W;
  localparam int unsigned SUM_W  = (PROD_W > ACC_W ? PROD_W : ACC_W) + 2;

  logic signed [ACC_W-1:0]  acc;
  logic signed [PROD_W-1:0] prod;
  logic signed [SUM_W-1:0]  step;
  logic signed [SUM_W-1:0]  next;

  localparam logic signed [SUM_W-1:0] ACC_MAX = (SUM_W'(1) <<< (ACC_W - 1)) - 1;

  always_comb begin
    prod = PROD_W'(err) * PROD_W'(grad);
    if (MU_SHIFT == 0) step = SUM_W'(prod);
    else               step = (SUM_W'(prod) + (SUM_W'(1) <<< (MU_SHIFT - 1))) >>> MU_SHIFT;
    next = SUM_W'(acc) + step;
    if (next < 0)            next = '0;
    else if (next > ACC_MAX) next = ACC_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= ACC_W'(BETA_NOMINAL) <<< (ACC_FRAC - BETA_FRAC);
      updated <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (cal_en && err_valid) begin
        acc     <= next[ACC_W-1:0];
        updated <= 1'b1;
      end
    end
  end

  assign beta = beta_t'(acc >>> (ACC_FRAC - BETA_FRAC));

endmodule
