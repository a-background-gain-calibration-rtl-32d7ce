// Digital back end of a 13-bit, 6-stage pipelined ADC with background
// calibration of the first interstage gain.
//
// The analog pipeline (stage 1 with its dual-mode MDAC, 2.8-bit stages 2..5,
// 3-bit flash stage 6) delivers comparator decisions; this block turns them
// into the output code and, in the background, learns beta = 1/G of the
// stage-1 amplifier:
//   mode_controller  -> sel: N_MODE1 mode-1 samples, one mode-2 sample, ...
//   stage1_encoder / stage_encoder -> stage codes
//   stage1_dac_decoder -> switch controls of the stage-1 MDAC capacitors
//   code_align       -> the six codes of one sample together
//   backend_combiner -> D1 and D_BK (stages 2..6 with the nominal gain 4)
//   gain_corrector   -> Dout = D1 + beta*D_BK
//   nl_interpolator  -> e = interpolated mode-1 output - mode-2 output
//   lms_engine       -> beta += mu * e * D_BK
// Mode 1 is the conventional ADC and mode 2 a second, "virtual" ADC with
// shifted residue transitions; both are corrected with the same beta, so a
// wrong beta shows up as a difference between the two, which the LMS loop
// drives to zero. The structure follows the text; the interface timing and
// the number formats are this design's choice.
//
// Interface timing: sel is registered. The stage-1 decisions comp1 for the
// sample converted with that sel arrive one clock later; stage j decisions
// arrive j clocks after sel (stage j works on the sample j-1 clocks after
// stage 1). s1_dac_x/s1_dac_z are combinational from comp1 and the delayed
// sel: they set the stage-1 MDAC during the clock after the sample was
// taken, while its residue is amplified for stage 2. dout appears 8 clocks after sel (1 + 5 align + combine + correct).
// Asynchronous active-low reset; beta resets to the nominal 1/4.
module calibration_top
  import adc_cal_pkg::*;
#(
  parameter int unsigned N_MODE1   = 20,
  parameter int unsigned TAPS_HALF = 20,
  parameter int unsigned MU_SHIFT  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cal_en,
  input  logic [S1_COMPS-1:0]   comp1,
  input  logic [MID_COMPS-1:0]  comp_mid [N_MID],
  input  logic [FLASH_COMPS-1:0] comp6,
  output mode_e                 sel,
  output logic [2:0]            s1_dac_x,
  output logic [2:0]            s1_dac_z,
  output logic [OUT_BITS-1:0]   dout,
  output mode_e                 dout_mode,
  output beta_t                 beta,
  output logic                  lms_update
);

  localparam int unsigned ERR_W = DCAL_W + 1;

  // Mode sequencing; sel_q is the mode of the decisions now on comp1.
  mode_e sel_q;
  mode_controller #(.N_MODE1(N_MODE1)) u_mode (
    .clk, .rst_n, .cal_en, .sel
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= MODE1;
    else        sel_q <= sel;
  end

  // Sub-ADC encoders.
  d1_t    d1;
  hcode_t hmid [N_MID];
  hcode_t h6;
  stage1_encoder u_enc1 (.comp(comp1), .mode(sel_q), .d1(d1));

  // Stage-1 sub-DAC switch controls for the amplification phase.
  stage1_dac_decoder u_dac1 (.d1, .mode(sel_q), .x(s1_dac_x), .z(s1_dac_z));
  for (genvar k = 0; k < int'(N_MID); k++) begin : g_enc
    stage_encoder #(.N_COMP(MID_COMPS)) u_enc (.comp(comp_mid[k]), .code(hmid[k]));
  end
  stage_encoder #(.N_COMP(FLASH_COMPS)) u_enc6 (.comp(comp6), .code(h6));

  // Alignment and combination.
  d1_t     d1_a;
  mode_e   mode_a;
  hcode_t  hmid_a [N_MID];
  hcode_t  h6_a;
  sample_t smp;
  code_align u_align (
    .clk, .rst_n, .d1, .mode1(sel_q), .mid(hmid), .last(h6),
    .d1_o(d1_a), .mode_o(mode_a), .mid_o(hmid_a), .last_o(h6_a)
  );
  backend_combiner u_comb (
    .clk, .rst_n, .d1(d1_a), .mode(mode_a), .mid(hmid_a), .last(h6_a), .out(smp)
  );

  // Gain correction.
  dcal_t dcal;
  dbk_t  dbk_c;
  gain_corrector u_corr (
    .clk, .rst_n, .in(smp), .beta, .dcal, .dout, .mode_o(dout_mode), .dbk_o(dbk_c)
  );

  // Background estimation of beta.
  logic                    err_valid;
  logic signed [ERR_W-1:0] err;
  dbk_t                    grad;
  nl_interpolator #(.TAPS_HALF(TAPS_HALF), .ERR_W(ERR_W)) u_interp (
    .clk, .rst_n, .dcal, .mode(dout_mode), .dbk(dbk_c),
    .err_valid, .err, .grad
  );
  lms_engine #(.MU_SHIFT(MU_SHIFT), .ERR_W(ERR_W)) u_lms (
    .clk, .rst_n, .cal_en, .err_valid, .err, .grad, .beta, .updated(lms_update)
  );

  // The interpolator needs TAPS_HALF mode-1 neighbours on each side.
  initial assert (N_MODE1 >= TAPS_HALF)
    else $error("N_MODE1 (%0d) must be at least TAPS_HALF (%0d)", N_MODE1, TAPS_HALF);

endmodule
