// segment_gating: drives the gate drivers of the three-segment power stage.
//
// Each segment is a PMOS/NMOS pair switched in parallel with the others. A
// segment whose seg_en bit is set follows the high-side and low-side commands
// of the switching-cycle logic; a disabled segment keeps both transistors
// off. The smallest segment (index 0) has its gate swing scaled: its PMOS gate
// is driven through the coupling capacitor C_x with the reduced swing, and an
// auxiliary PMOS Q1 pulls that gate to V_in to turn the PMOS off in the second
// subinterval of the cycle. q1_on is therefore the inverse of that segment's
// PMOS command.
//
// Segment enabling and the Q1 pull-up follow the converter description; the
// active-high command polarity (1 = transistor on) and keeping Q1 on while
// the converter is idle are this design's choices (level shifting and
// inversion belong to the analog drivers).
//
// Interface / timing: purely combinational from registered inputs; seg_en
// changes only at cycle starts, when both switches are off.
module segment_gating
  import dcdc_pkg::*;
(
  input  logic hs_on,
  input  logic ls_on,
  input  seg_t seg_en,
  output seg_t p_on,    // PMOS (high-side) on, per segment
  output seg_t n_on,    // NMOS (low-side) on, per segment
  output logic q1_on    // auxiliary pull-up of segment 0's PMOS gate
);

  always_comb begin
    p_on  = seg_en & {N_SEG{hs_on}};
    n_on  = seg_en & {N_SEG{ls_on}};
    q1_on = ~p_on[0];
  end

endmodule
