// Stage-1 sub-DAC switch decoder.
//
// Turns the stage-1 level d1 (units of Vref/16) and the mode into the switch
// controls of the three DAC capacitors C1, C2, C3 of the stage-1 MDAC. In the
// MDAC each capacitor contributes (Z_i - X_i) * Vref * C_i/C4 to the residue,
// with C1:C2:C3:C4 = 3:2:1:2, i.e. 1.5, 1 and 0.5 Vref; a capacitor with
// neither X nor Z set sits at Vcm (Y). The residue must be 4*(Vin - d1/16);
// in mode 2 the extra capacitor C5 already adds Vref/4, so the three DAC
// capacitors must supply
//   T = -(d1 + mode) / 4 Vref,   i.e. v = -(d1 + mode)/2 in steps of Vref/2.
// v ranges over -4..+3 and is built as:
//   +3: Z1   +2: Z2   +1: Z3   0: all Y   -1: X3   -2: X2   -3: X1   -4: X1,X3
// The MDAC equation and the capacitor ratios follow the text; this choice
// of switch pattern for each level is this design's.
// Purely combinational; in the converter it acts during the amplification
// phase, while the stage-1 decisions of the sample are held.
module stage1_dac_decoder
  import adc_cal_pkg::*;
(
  input  d1_t        d1,
  input  mode_e      mode,
  output logic [2:0] x,   // x[i-1]: capacitor C_i to the -Vref side
  output logic [2:0] z    // z[i-1]: capacitor C_i to the +Vref side
);

  logic signed [D1_W:0] sum;
  logic signed [D1_W:0] v;

  always_comb begin
    sum = (D1_W+1)'(d1) + (D1_W+1)'({1'b0, mode == MODE2});
    v   = -(sum >>> 1);
    x   = 3'b000;
    z   = 3'b000;
    case (v)
      3:       z = 3'b001;
      2:       z = 3'b010;
      1:       z = 3'b100;
      -1:      x = 3'b100;
      -2:      x = 3'b010;
      -3:      x = 3'b001;
      -4:      x = 3'b101;
      default: ;
    endcase
  end

endmodule
