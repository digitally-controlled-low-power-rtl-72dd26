// sc_switch_controller: switch-cap controller of the dual-output
// switched-capacitor (SC) gate-drive supply. It turns the 3-bit gain_sl of the
// gate swing controller into the pattern of the 18 switches S[17:0] that makes
// the SC circuit produce the selected discrete gate voltage.
//
// The SC circuit works in two phases. A free-running counter divides the
// clock into an SC period of 2*HALF clocks: phase 1 for HALF-NOV clocks, all
// switches open for NOV clocks, phase 2 for HALF-NOV clocks, all open for NOV
// clocks. The open intervals are break-before-make gaps so the flying
// capacitors are never shorted. gain_sl is sampled only at the start of
// phase 1, so one SC period always uses a single configuration. In each phase
// the closed switches come from a table indexed by the sampled code
// (PH1_TAB/PH2_TAB).
//
// The 18-switch, 3-bit-code interface and the table lookup follow the
// converter description. The two-phase timing, the gaps, the SC frequency and
// the table contents are this design's choices; the default table is a
// placeholder (see dcdc_pkg) to be replaced by the switch configurations of
// the actual capacitor network.
//
// Interface / timing: S is registered. `sc_gain` is the code in use.
// Synchronous active-low reset opens all switches and starts a period.
module sc_switch_controller
  import dcdc_pkg::*;
#(
  parameter int unsigned HALF    = 50,   // clocks per SC half period
  parameter int unsigned NOV     = 2,    // break-before-make gap, clocks
  parameter sc_tab_t     PH1_TAB = sc_default_tab(1'b0),
  parameter sc_tab_t     PH2_TAB = sc_default_tab(1'b1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  gain_t gain_sl,
  output scsw_t sw,        // S[17:0], 1 = switch closed
  output gain_t sc_gain,   // configuration in use
  output logic  phase1,
  output logic  phase2
);

  localparam int unsigned PER = 2 * HALF;
  localparam int unsigned CW  = $clog2(PER);

  logic [CW-1:0] cnt_q;
  logic ph1_d, ph2_d;

  always_comb begin
    ph1_d = (cnt_q < CW'(HALF - NOV));
    ph2_d = (cnt_q >= CW'(HALF)) && (cnt_q < CW'(PER - NOV));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      sc_gain <= gain_sl;
      sw      <= '0;
      phase1  <= 1'b0;
      phase2  <= 1'b0;
    end else begin
      cnt_q  <= (cnt_q == CW'(PER - 1)) ? '0 : cnt_q + 1'b1;
      if (cnt_q == CW'(PER - 1)) sc_gain <= gain_sl;
      phase1 <= ph1_d;
      phase2 <= ph2_d;
      if (ph1_d)      sw <= PH1_TAB[sc_gain];
      else if (ph2_d) sw <= PH2_TAB[sc_gain];
      else            sw <= '0;
    end
  end

  a_phases_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(phase1 && phase2));

endmodule
