// Digital code combination (the divide-by-4 and add chain).
//
// Adds the aligned codes of one sample with the nominal interstage gain of 4:
// each stage's code weighs a quarter of the one before it. The backend part,
// stages 2..6, is kept as its own number D_BK (units of Vref/2^12 referred to
// the stage-2 input), because the calibration needs it separately:
//   D_BK = 2^8*h2 + 2^6*h3 + 2^4*h4 + 2^2*h5 + h6      (h in half steps)
// The stage-1 code d1 and mode pass through unchanged; the final sum
// D1 + D_BK/G is formed by the gain corrector with the calibrated 1/G.
// Structure and gain follow the text; the number formats are this design's.
//
// Timing: one register stage; out is valid one clock after the inputs.
module backend_combiner
  import adc_cal_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  d1_t     d1,
  input  mode_e   mode,
  input  hcode_t  mid [N_MID],
  input  hcode_t  last,
  output sample_t out
);

  dbk_t sum;

  always_comb begin
    sum = dbk_t'(last);
    // Weight of stage k+2 is 4^(N_MID-k) = 2^(2*(N_MID-k)).
    for (int k = 0; k < int'(N_MID); k++) begin
      sum = sum + (dbk_t'(mid[k]) <<< (2 * (int'(N_MID) - k)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '{mode: MODE1, d1: '0, dbk: '0};
    else        out <= '{mode: mode, d1: d1, dbk: sum};
  end

endmodule
