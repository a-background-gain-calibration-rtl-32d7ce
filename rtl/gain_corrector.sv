// Interstage gain correction.
//
// Forms the calibrated output Dout = D1 + beta * D_BK, where beta is the
// current estimate of 1/G, the reciprocal of the real stage-1 gain. With
// beta = 1/4 this is the plain combination of an ideal pipeline. The same
// beta serves both conversion modes, as both use the same amplifier.
//   dcal  full-precision result in units of Vref/2^(14+DCAL_XF), used by the
//         calibration loop;
//   dout  the OUT_BITS-bit output code (units of Vref/2^13), rounded and
//         saturated to -2^12 .. 2^12-1.
// The equation follows the text; formats, rounding and saturation are this
// design's choice.
//
// Timing: one register stage. mode and dbk are passed on, aligned with dcal.
module gain_corrector
  import adc_cal_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  sample_t               in,
  input  beta_t                 beta,
  output dcal_t                 dcal,
  output logic [OUT_BITS-1:0]   dout,
  output mode_e                 mode_o,
  output dbk_t                  dbk_o
);

  localparam int unsigned PROD_W = BETA_W + DBK_W;
  localparam int unsigned PSH    = BETA_FRAC - 2 - DCAL_XF; // product to dcal units
  localparam int unsigned OSH    = 1 + DCAL_XF;             // dcal to output LSB

  logic signed [PROD_W-1:0] prod;
  dcal_t                    sum;
  dcal_t                    rnd;
  logic signed [DCAL_W-OSH-1:0] q;
  logic [OUT_BITS-1:0]      sat;

  always_comb begin
    prod = PROD_W'(beta) * PROD_W'(in.dbk);
    sum  = (dcal_t'(in.d1) <<< (10 + DCAL_XF))
         + dcal_t'((prod + (PROD_W'(1) <<< (PSH - 1))) >>> PSH);
    rnd  = sum + (dcal_t'(1) <<< (OSH - 1));
    q    = rnd[DCAL_W-1:OSH];
    if (q > (DCAL_W-OSH)'((1 <<< (OUT_BITS - 1)) - 1))
      sat = {1'b0, {(OUT_BITS-1){1'b1}}};
    else if (q < -((DCAL_W-OSH)'(1 <<< (OUT_BITS - 1))))
      sat = {1'b1, {(OUT_BITS-1){1'b0}}};
    else
      sat = q[OUT_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcal   <= '0;
      dout   <= '0;
      mode_o <= MODE1;
      dbk_o  <= '0;
    end else begin
      dcal   <= sum;
      dout   <= sat;
      mode_o <= in.mode;
      dbk_o  <= in.dbk;
    end
  end

endmodule
