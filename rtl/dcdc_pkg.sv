// dcdc_pkg: widths, types and default thresholds shared by the digital
// controller of the segmented, gate-swing-scaled buck converter.
//
// Number formats (this design's choices unless stated):
//  * e[n]      : 4-bit two's-complement output-voltage error from the windowed
//                ADC (4 bits, as in the logic-analyser traces of the prototype),
//                positive when the output is below the reference.
//  * i_c[n]    : 8-bit unsigned peak-current reference; one LSB is taken as
//                16 mA of peak inductor current (full scale about 4.1 A).
//  * seg_en    : thermometer code, bit 0 = the smallest segment (always on),
//                bits 1 and 2 = the two further segments (three segments, as
//                in the prototype).
//  * gain_sl   : 3-bit gate-swing level of the smallest segment, 0 = lowest
//                gate voltage; levels 0..5 are used, 5 being the full swing
//                reached at about 1 A of load.
//  * S[17:0]   : the 18 switches of the dual-output switched-capacitor circuit.
package dcdc_pkg;

  localparam int unsigned E_W     = 4;   // ADC error width
  localparam int unsigned IC_W    = 8;   // current reference width
  localparam int unsigned N_SEG   = 3;   // power-stage segments
  localparam int unsigned GAIN_W  = 3;   // gain_sl width
  localparam int unsigned N_GAIN  = 6;   // gate-swing levels in use (0..5)
  localparam int unsigned N_SCSW  = 18;  // switched-capacitor switches

  typedef logic signed [E_W-1:0]  err_t;
  typedef logic [IC_W-1:0]        ic_t;
  typedef logic [N_SEG-1:0]       seg_t;
  typedef logic [GAIN_W-1:0]      gain_t;
  typedef logic [N_SCSW-1:0]      scsw_t;

  // Peak-current thresholds (in i_c LSBs) at which a further segment is
  // switched in: index 0 -> second segment, index 1 -> third segment.
  // About 1.1 A and 2 A of load with the prototype's inductor ripple.
  typedef ic_t seg_th_t [N_SEG-1];
  localparam seg_th_t SEG_TH_DEFAULT = '{8'd85, 8'd140};

  // Peak-current thresholds (in i_c LSBs) for gate-swing levels 1..5:
  // level k is the target when i_c >= GS_TH[k-1]. They span the 100 mA-1 A
  // load range, so that 500 mA of load targets level 3 and 1 A level 5.
  typedef ic_t gs_th_t [N_GAIN-1];
  localparam gs_th_t GS_TH_DEFAULT = '{8'd20, 8'd30, 8'd40, 8'd55, 8'd70};

  // Switched-capacitor configuration table: for every gain_sl code the
  // switches closed in phase 1 and in phase 2. Placeholder pattern (see
  // sc_switch_controller): code g closes switches 3g..3g+2 in phase 1 and
  // the next group of three (mod 18) in phase 2. Replace with the switch
  // configurations of the actual capacitor network.
  typedef scsw_t sc_tab_t [2**GAIN_W];

  function automatic sc_tab_t sc_default_tab(input bit phase2);
    sc_tab_t t;
    for (int g = 0; g < 2**GAIN_W; g++) begin
      int base;
      base = phase2 ? ((3 * g + 3) % N_SCSW) : ((3 * g) % N_SCSW);
      t[g] = scsw_t'(3'b111) << base;     // base <= 15: no wrap needed
    end
    return t;
  endfunction

endpackage
