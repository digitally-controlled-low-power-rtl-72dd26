// dcdc_top: digital controller of a 1 MHz peak-current-mode buck converter
// with instantaneous, cycle-by-cycle efficiency optimisation.
//
// The voltage loop is digital: the windowed ADC (off chip) delivers the
// output-voltage error e[n]; pi_compensator turns it into the peak-current
// reference i_c[n] once per switching cycle; sd_dac_modulator emits i_c[n] as
// a one-bit sigma-delta stream that an external RC filter turns into the
// analog current limit v_c(t); an external comparator ends each on-time in
// cpm_modulator when the inductor current reaches v_c(t).
// The same i_c[n] also drives the optimiser, in the very cycle it is computed:
// segment_selector picks 1..3 power-stage segments and gate_swing_fsm picks
// the gate-voltage level of the smallest segment; sc_switch_controller turns
// that level into the 18 switch controls of the switched-capacitor gate
// supply, and segment_gating applies the switch commands to the enabled
// segments and to the auxiliary pull-up Q1.
//
// This structure follows the converter description. Numeric formats, clock
// rate and thresholds are this design's choices (see dcdc_pkg and the
// sub-modules).
//
// Timing, counted from the clock edge that raises cycle_start (edge 0):
// e_in is sampled at edge 1 and i_c at edge 1; seg_en and gain_sl move at
// edge 2, together with the high-side turn-on, so a configuration change
// always happens while both switches of every segment are off.
module dcdc_top
  import dcdc_pkg::*;
#(
  parameter int unsigned SW_PERIOD  = 100,  // clocks per switching cycle (1 MHz at 100 MHz)
  parameter int unsigned DEAD       = 2,
  parameter int unsigned BLANK      = 4,
  parameter int unsigned D_MAX_CLKS = 85,
  parameter int unsigned KP         = 128,
  parameter int unsigned KI         = 12,
  parameter int unsigned FRAC       = 4,
  parameter int unsigned SC_HALF    = 50,
  parameter int unsigned SC_NOV     = 2,
  parameter seg_th_t     SEG_TH     = SEG_TH_DEFAULT,
  parameter gs_th_t      GS_TH      = GS_TH_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,      // 0 keeps all power switches off
  // windowed ADC
  input  err_t  e_in,        // e[n]
  output logic  adc_sample,  // start of a switching cycle: e[n] is read next clock
  // sigma-delta DAC and peak-current comparator
  output logic  dac_bit,
  input  logic  cmp_trip,    // inductor current >= v_c(t), asynchronous
  // segmented power stage
  output seg_t  p_on,
  output seg_t  n_on,
  output logic  q1_on,
  // switched-capacitor gate supply
  output scsw_t sc_sw,
  // observation
  output ic_t   ic,
  output seg_t  seg_en,
  output gain_t gain_sl,
  output logic  trip_evt,
  output logic  maxd_evt,
  output logic  gs_up,       // gain_sl stepped up this cycle
  output logic  gs_dn,       // gain_sl stepped down this cycle
  output gain_t sc_gain,     // gate-swing code the SC circuit is using
  output logic  sc_ph1,
  output logic  sc_ph2
);

  logic cycle_start, ic_valid, hs_on, ls_on;

  assign adc_sample = cycle_start;

  cpm_modulator #(
    .SW_PERIOD(SW_PERIOD), .DEAD(DEAD), .BLANK(BLANK), .D_MAX_CLKS(D_MAX_CLKS)
  ) u_cpm (
    .clk, .rst_n, .enable, .cmp_trip,
    .cycle_start, .hs_on, .ls_on, .trip_evt, .maxd_evt
  );

  pi_compensator #(.FRAC(FRAC), .KP(KP), .KI(KI)) u_comp (
    .clk, .rst_n, .sample(cycle_start), .e_in,
    .ic_out(ic), .ic_valid
  );

  sd_dac_modulator u_dac (.clk, .rst_n, .ic_in(ic), .dac_bit);

  segment_selector #(.SEG_TH(SEG_TH)) u_seg (
    .clk, .rst_n, .cycle_start(ic_valid), .ic, .seg_en
  );

  gate_swing_fsm #(.GS_TH(GS_TH)) u_gs (
    .clk, .rst_n, .cycle_start(ic_valid), .ic, .gain_sl,
    .step_up(gs_up), .step_dn(gs_dn)
  );

  sc_switch_controller #(.HALF(SC_HALF), .NOV(SC_NOV)) u_sc (
    .clk, .rst_n, .gain_sl, .sw(sc_sw), .sc_gain, .phase1(sc_ph1), .phase2(sc_ph2)
  );

  segment_gating u_gate (.hs_on, .ls_on, .seg_en, .p_on, .n_on, .q1_on);

endmodule
