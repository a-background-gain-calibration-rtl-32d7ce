// Stage-1 mode sequencer.
//
// While background calibration is enabled, the first stage converts N_MODE1
// samples in mode 1 (the conventional 2.8-bit residue curve), then a single
// sample in mode 2 (the shifted 8-level curve), then N_MODE1 in mode 1 again,
// and so on: one mode-2 sample every N_MODE1+1 clocks. With calibration off
// the stage stays in mode 1. The pattern is the one of the text; N_MODE1 = 20
// is this design's choice: it is the smallest N that gives the 40-tap
// interpolator 20 clean mode-1 neighbours on each side of a mode-2 sample.
//
// Interface: sel is a register, valid for the sample stage 1 takes at the next
// clock edge (1 = mode 2, the SEL input of the stage-1 MDAC and the reference
// select of its comparators). Asynchronous active-low reset to mode 1.
module mode_controller
  import adc_cal_pkg::*;
#(
  parameter int unsigned N_MODE1 = 20
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cal_en,
  output mode_e sel
);

  localparam int unsigned CW = $clog2(N_MODE1 + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sel <= MODE1;
    end else if (!cal_en) begin
      cnt <= '0;
      sel <= MODE1;
    end else begin
      // cnt counts the mode-1 samples already issued in this period.
      if (cnt == CW'(N_MODE1)) begin
        cnt <= '0;
        sel <= MODE2;
      end else begin
        cnt <= cnt + 1'b1;
        sel <= MODE1;
      end
    end
  end

endmodule
