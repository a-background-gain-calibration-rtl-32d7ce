// Behavioural model (not synthesizable) of the dual-mode stage-1 MDAC, for
// simulation only.
//
// Real-valued model of the switched-capacitor multiplying DAC of stage 1,
// in units of Vref:
//   Vout = [Vin*(C1+C2+C3+C4)/C4 + sum_i (Z_i - X_i)*C_i/C4 + SEL*C5/C4]
//          / (1 + 1/(A_DC * f)),     f = C4 / (C1+C2+C3+C4+C5)
// with C1:C2:C3:C4:C5 = 3:2:1:2:1/2. The bracket is the ideal transfer of
// the text's MDAC equation (gain 4, DAC steps of Vref/2, SEL adding Vref/4
// for mode 2). The divisor is the usual closed-loop error of an opamp of
// finite DC gain A_DC; with the 41 dB of the text it makes the real gain
// about 3.854 instead of 4, the interstage gain error the calibration
// removes. Parasitic capacitance, opamp nonlinearity, settling and output
// swing are not modelled. The input is taken as held by the sampling phase.
module stage1_mdac_model #(
  parameter real A_DC = 112.2,   // 41 dB
  parameter real C1 = 3.0,
  parameter real C2 = 2.0,
  parameter real C3 = 1.0,
  parameter real C4 = 2.0,
  parameter real C5 = 0.5
) (
  input  real        vin,
  input  logic [2:0] x,
  input  logic [2:0] z,
  input  logic       sel,
  output real        vout
);

  real ideal, fb;

  always_comb begin
    ideal = vin * (C1 + C2 + C3 + C4) / C4
          + (real'(z[0]) - real'(x[0])) * C1 / C4
          + (real'(z[1]) - real'(x[1])) * C2 / C4
          + (real'(z[2]) - real'(x[2])) * C3 / C4
          + real'(sel) * C5 / C4;
    fb    = C4 / (C1 + C2 + C3 + C4 + C5);
    vout  = ideal / (1.0 + 1.0 / (A_DC * fb));
  end

endmodule
