// Stage-code alignment delays.
//
// In the pipeline, stage j decides on a sample j-1 clocks after stage 1 did,
// so the six codes of one sample reach the back end at different times. This
// block delays stage j by N_STAGES-j clocks (stage 1 by 5, stage 6 by none)
// so that all codes of one sample leave together. The stage-1 mode travels
// with the stage-1 code. The text shows only the summation; the shift-register
// alignment is the usual way to feed it and is this design's choice.
//
// Interface: d1/mode1 and mid[k] (stage k+2) and last (stage 6) are taken as
// they arrive; the outputs are the aligned codes of one sample. Asynchronous
// active-low reset clears the delay lines to mode 1, code 0.
module code_align
  import adc_cal_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  d1_t    d1,
  input  mode_e  mode1,
  input  hcode_t mid [N_MID],
  input  hcode_t last,
  output d1_t    d1_o,
  output mode_e  mode_o,
  output hcode_t mid_o [N_MID],
  output hcode_t last_o
);

  localparam int unsigned D1_DLY = N_STAGES - 1;

  // Stage 1: code and mode, N_STAGES-1 clocks.
  typedef struct packed {
    mode_e mode;
    d1_t   d1;
  } s1_t;

  s1_t s1_line [D1_DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D1_DLY); i++) s1_line[i] <= '{mode: MODE1, d1: '0};
    end else begin
      s1_line[0] <= '{mode: mode1, d1: d1};
      for (int i = 1; i < int'(D1_DLY); i++) s1_line[i] <= s1_line[i-1];
    end
  end

  assign d1_o   = s1_line[D1_DLY-1].d1;
  assign mode_o = s1_line[D1_DLY-1].mode;

  // Stage k+2 (k = 0..N_MID-1): N_MID-k clocks.
  for (genvar k = 0; k < int'(N_MID); k++) begin : g_mid
    localparam int unsigned DLY = N_MID - k;
    hcode_t line [DLY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DLY); i++) line[i] <= '0;
      end else begin
        line[0] <= mid[k];
        for (int i = 1; i < int'(DLY); i++) line[i] <= line[i-1];
      end
    end
    assign mid_o[k] = line[DLY-1];
  end

  // Stage 6 decides last: no delay.
  assign last_o = last;

endmodule
