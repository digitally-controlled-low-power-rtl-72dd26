// gate_swing_fsm: gate swing controller FSM. It sets the 3-bit gain_sl that
// tells the switch-cap controller which discrete gate-drive voltage the
// switched-capacitor supply must produce for the smallest power-stage segment.
//
// From i_c[n] and stored thresholds the FSM finds the target level: the number
// of thresholds GS_TH that i_c reaches (0..N_GAIN-1). The state is the present
// level. Once per switching cycle it moves one level towards the target, so a
// load step from 500 mA to 1 A walks gain_sl through 011, 100, 101 as the
// prototype does. Stepping one level per cycle also lets the switched-capacitor
// output settle between steps. Driving gain_sl from i_c and the direction of
// the steps follow the converter description; the one-level-per-cycle rule,
// the number of levels and the threshold values are this design's choices.
//
// Interface / timing: evaluated on the clock edge where cycle_start is high;
// gain_sl is a register. `step_up`/`step_dn` pulse with each move. Reset
// selects the highest level (full gate swing).
module gate_swing_fsm
  import dcdc_pkg::*;
#(
  parameter gs_th_t GS_TH = GS_TH_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cycle_start,
  input  ic_t   ic,
  output gain_t gain_sl,
  output logic  step_up,
  output logic  step_dn
);

  gain_t target;

  always_comb begin
    target = '0;
    for (int k = 0; k < N_GAIN - 1; k++)
      if (ic >= GS_TH[k]) target = GAIN_W'(k + 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gain_sl <= GAIN_W'(N_GAIN - 1);
      step_up <= 1'b0;
      step_dn <= 1'b0;
    end else begin
      step_up <= 1'b0;
      step_dn <= 1'b0;
      if (cycle_start) begin
        if (target > gain_sl) begin
          gain_sl <= gain_sl + 1'b1;
          step_up <= 1'b1;
        end else if (target < gain_sl) begin
          gain_sl <= gain_sl - 1'b1;
          step_dn <= 1'b1;
        end
      end
    end
  end

  a_gain_range: assert property (@(posedge clk) disable iff (!rst_n) gain_sl < GAIN_W'(N_GAIN));

endmodule
