// Backend stage encoder.
//
// Converts the thermometer outputs of one backend stage into its code in half
// steps of that stage: code = 2*ones - N_COMP. With N_COMP = 6 (a 2.8-bit
// stage, stages 2..5) this is -6..+6, i.e. the 7 levels -3..+3; with
// N_COMP = 7 (the 3-bit flash of stage 6) it is -7..+7, the 8 flash levels
// centred on zero. The comparator counts follow the text; the ones count,
// which tolerates thermometer bubbles, is this design's choice.
// Purely combinational.
module stage_encoder
  import adc_cal_pkg::*;
#(
  parameter int unsigned N_COMP = 6
) (
  input  logic [N_COMP-1:0] comp,
  output hcode_t            code
);

  logic [HC_W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(N_COMP); i++) ones = ones + HC_W'(comp[i]);
    code = hcode_t'(ones <<< 1) - hcode_t'(N_COMP);
  end

endmodule
