// Stage-1 sub-ADC encoder, dual mode.
//
// Converts the thermometer outputs of the stage-1 comparators into the
// stage-1 code d1 in units of Vref/16. comp[i] is 1 when the input is above
// the threshold of comparator i.
//   Mode 1: comparators 0..5 at -5,-3,-1,+1,+3,+5 (x Vref/16) give 7 levels;
//           d1 = 2*ones - 6, the even values -6..+6.
//   Mode 2: comparators 0..6 at -6,-4,-2,0,+2,+4,+6 give 8 levels;
//           d1 = 2*ones - 7, the odd values -7..+7.
// The odd mode-2 levels carry the half step that the extra capacitor C5
// subtracts from the residue in mode 2. Thresholds and level counts follow
// the text; which comparator is idle in mode 1 (number 6) and the use of a
// ones count, which tolerates bubbles in the thermometer code, are this
// design's choice. Purely combinational.
module stage1_encoder
  import adc_cal_pkg::*;
(
  input  logic [S1_COMPS-1:0] comp,
  input  mode_e               mode,
  output d1_t                 d1
);

  logic [2:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(S1_COMPS); i++) begin
      if (comp[i] && (mode == MODE2 || i < int'(S1_COMPS) - 1)) ones = ones + 3'd1;
    end
    if (mode == MODE2) d1 = d1_t'({2'b00, ones} <<< 1) - d1_t'(7);
    else               d1 = d1_t'({2'b00, ones} <<< 1) - d1_t'(6);
  end

endmodule
