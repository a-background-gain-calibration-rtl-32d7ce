// Behavioural model (not synthesizable) of the analog part of the 6-stage
// pipelined ADC, for simulation only.
//
// Stage 1: its comparators sample vin on a rising edge with the mode set by
// sel: mode 1 uses 6 comparators at +-1/16, +-3/16, +-5/16 Vref, mode 2 uses
// 7 comparators at 0, +-2/16, +-4/16, +-6/16 Vref. During the following clock
// the digital back end decodes those decisions into the capacitor switch
// controls s1_x/s1_z, and the stage-1 MDAC model (gain error from the finite
// opamp gain A_DC) amplifies the held input; its residue is taken by stage 2
// at the next edge. Stages 2..5 are ideal 2.8-bit stages with gain 4; stage 6
// is an ideal 3-bit flash with 7 comparators at -3/8 .. +3/8 of its span.
// Voltages are in units of Vref.
//
// Timing: comparator outputs change right after the edge (nonblocking
// updates), so the stage-1 decisions appear one clock after the sel that set
// the mode, and stage j's decisions j clocks after it.
module adc_analog_model #(
  parameter real A_DC = 112.2
) (
  input  logic       clk,
  input  real        vin,
  input  logic       sel,
  input  logic [2:0] s1_x,
  input  logic [2:0] s1_z,
  output logic [6:0] comp1,
  output logic [5:0] comp_mid [4],
  output logic [6:0] comp6
);

  real  v_held = 0.0;     // stage-1 input held for amplification
  logic sel_held = 1'b0;  // mode of the held sample
  real  r1;               // stage-1 residue (MDAC output)
  real  res [4];          // residues of stages 2..5 from the previous edge

  stage1_mdac_model #(.A_DC(A_DC)) u_mdac (
    .vin(v_held), .x(s1_x), .z(s1_z), .sel(sel_held), .vout(r1)
  );

  initial begin
    comp1 = '0;
    comp6 = '0;
    for (int k = 0; k < 4; k++) comp_mid[k] = '0;
    for (int k = 0; k < 4; k++) res[k] = 0.0;
  end

  function automatic int count_above(real v, real lo, real step, int n);
    int c = 0;
    for (int i = 0; i < n; i++) if (v > lo + step * i) c++;
    return c;
  endfunction

  always @(posedge clk) begin
    real v, lvl;
    int  c;
    real nres [4];
    logic [6:0] c1;
    logic [5:0] cm [4];
    logic [6:0] c6;
    // Stages 2..5: stage 2 takes the stage-1 residue amplified during the
    // clock that just ended, the others the residue of their predecessor.
    for (int k = 0; k < 4; k++) begin
      v = (k == 0) ? r1 : res[k-1];
      c = count_above(v, -5.0/16, 2.0/16, 6);
      for (int i = 0; i < 6; i++) cm[k][i] = (v > -5.0/16 + 2.0/16 * i);
      lvl = (2.0 * c - 6.0) / 16.0;
      nres[k] = 4.0 * (v - lvl);
    end
    // Stage 6: flash.
    v = res[3];
    for (int i = 0; i < 7; i++) c6[i] = (v > -3.0/8 + 1.0/8 * i);
    // Stage 1 comparators on the new sample.
    v = vin;
    for (int i = 0; i < 7; i++) begin
      if (sel) c1[i] = (v > -6.0/16 + 2.0/16 * i);
      else     c1[i] = (i < 6) && (v > -5.0/16 + 2.0/16 * i);
    end
    for (int k = 0; k < 4; k++) res[k] = nres[k];
    v_held   <= vin;
    sel_held <= sel;
    comp1    <= c1;
    comp_mid <= cm;
    comp6    <= c6;
  end

endmodule
