// Shared types and constants of the pipelined-ADC gain-calibration back end.
//
// Number formats (Vref is the full input span, -Vref/2 .. +Vref/2):
//   hcode_t code of one backend stage in half steps of that stage: a 2.8-bit
//           stage gives -6..+6 (even), the 3-bit flash -7..+7 (odd).
//   d1_t    stage-1 code in units of Vref/16. Mode 1 gives the even values
//           -6..+6 (7 levels), mode 2 the odd values -7..+7 (8 levels).
//   dbk_t   backend (stages 2..6) output in units of Vref/2^12 referred to the
//           stage-2 input, so its nominal weight in the final output is 1/4.
//   dcal_t  calibrated output with DCAL_XF fraction bits below the 14-bit grid,
//           i.e. in units of Vref/2^(14+DCAL_XF).
//   beta    estimate of 1/G with BETA_FRAC fraction bits (nominal 1/4).
// The stage counts and the gain of 4 follow the converter in the text; the
// widths and fraction-bit counts are this design's choice.
package adc_cal_pkg;

  localparam int unsigned N_STAGES   = 6;  // pipeline stages
  localparam int unsigned N_MID      = 4;  // 2.8-bit stages 2..5
  localparam int unsigned MID_COMPS  = 6;  // comparators of a 2.8-bit stage
  localparam int unsigned FLASH_COMPS = 7; // comparators of the 3-bit flash (stage 6)
  localparam int unsigned S1_COMPS   = 7;  // stage-1 comparators (6 used in mode 1)
  localparam int unsigned OUT_BITS   = 13; // ADC resolution

  localparam int unsigned D1_W    = 5;
  localparam int unsigned HC_W    = 4;     // stage code in half steps, -7..+7
  localparam int unsigned DBK_W   = 13;
  localparam int unsigned DCAL_XF = 4;
  localparam int unsigned DCAL_W  = 20;
  localparam int unsigned BETA_FRAC = 24;
  localparam int unsigned BETA_W    = 26;

  typedef logic signed [D1_W-1:0]   d1_t;
  typedef logic signed [HC_W-1:0]   hcode_t;
  typedef logic signed [DBK_W-1:0]  dbk_t;
  typedef logic signed [DCAL_W-1:0] dcal_t;
  typedef logic signed [BETA_W-1:0] beta_t;

  // Conversion mode of stage 1 (SEL in the MDAC equation).
  typedef enum logic {MODE1 = 1'b0, MODE2 = 1'b1} mode_e;

  // One converted sample as it leaves the code combiner.
  typedef struct packed {
    mode_e mode;
    d1_t   d1;
    dbk_t  dbk;
  } sample_t;

  // beta = 1/4, the nominal reciprocal gain, used at reset.
  localparam beta_t BETA_NOMINAL = beta_t'(1) <<< (BETA_FRAC - 2);

endpackage
