// segment_selector: chooses how many of the three power-stage segments
// switch in the coming cycle, from the instantaneous current reference i_c[n].
//
// The converter description sets the segment configuration in every switching
// cycle directly from i_c[n], using current thresholds stored in the
// controller: one segment at light load (its gate swing is then scaled by the
// gate-swing controller), two or three at heavier load. Here the number of
// segments is 1 + (number of thresholds that i_c reaches), with no hysteresis
// and no waiting for a steady state, so a load step is followed within one
// cycle. The threshold values (SEG_TH) and the thermometer coding of seg_en
// are this design's choices. seg_en[0] is therefore a constant 1; it is kept
// so that every segment's gating looks the same downstream.
//
// Interface / timing: i_c is compared combinationally and seg_en is loaded on
// the clock edge where `cycle_start` is high, so the configuration never
// changes inside a switching cycle. Reset selects all segments (the safe
// state for an unknown load current).
module segment_selector
  import dcdc_pkg::*;
#(
  parameter seg_th_t SEG_TH = SEG_TH_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cycle_start,
  input  ic_t  ic,
  output seg_t seg_en
);

  seg_t seg_d;

  always_comb begin
    seg_d    = '0;
    seg_d[0] = 1'b1;                  // the smallest segment always switches
    for (int k = 0; k < N_SEG - 1; k++)
      if (ic >= SEG_TH[k]) seg_d[k+1] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)           seg_en <= '1;
    else if (cycle_start) seg_en <= seg_d;
  end

endmodule
