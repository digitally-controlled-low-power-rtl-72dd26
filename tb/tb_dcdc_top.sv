// tb_dcdc_top: closed-loop, end-to-end test of the controller at its default
// parameters, with the analog parts modelled by buck_plant_model. The load
// current goes through a staircase 0.15 A -> 0.5 A -> 1 A -> 1.5 A -> 2.5 A ->
// 0.3 A -> 1 A -> 0.15 A -> 3.5 A -> 0.15 A, each held for 200 switching cycles,
// then the input sags from 5 V to 2 V for 50 cycles at 1 A and recovers. Checked:
//  * regulation: in the last 50 cycles of each step the output is within
//    30 mV of 1.8 V and |e[n]| <= 2 LSB;
//  * instantaneous optimisation: in every switching cycle seg_en is the
//    thermometer code of the i_c[n] computed in that cycle, and gain_sl is
//    one level closer to (or at) the target level of that i_c[n];
//  * the steady configuration of each step: 0.15 A -> 1 segment, level 1;
//    0.5 A -> 1 segment, level 011; 1 A -> 1 segment, level 101;
//    1.5 A -> 2 segments; 2.5 A -> 3 segments;
//  * the 500 mA -> 1 A step walks gain_sl 011 -> 100 -> 101;
//  * the switched-capacitor controller picks up each new gain code within one
//    SC period;
//  * no shoot-through in any segment.
// Every mechanism is counted and must occur at least once: comparator-ended
// and limit-ended on-times, segment additions and removals, gate-swing steps
// up and down, ADC window saturation, SC reconfigurations.
module tb_dcdc_top;
  import dcdc_pkg::*;

  logic  clk = 0, rst_n = 0, enable = 0;
  err_t  e_in;
  logic  adc_sample, dac_bit, cmp_trip, q1_on;
  seg_t  p_on, n_on, seg_en;
  scsw_t sc_sw;
  ic_t   ic;
  gain_t gain_sl, sc_gain;
  logic  trip_evt, maxd_evt, gs_up, gs_dn, sc_ph1, sc_ph2;
  real   i_load = 0.15, v_in = 5.0, v_out, i_l, i_lim;

  int checks = 0, failures = 0;

  dcdc_top dut (.*);

  buck_plant_model plant (
    .clk, .p_on, .n_on, .dac_bit, .adc_sample, .i_load, .v_in,
    .cmp_trip, .e_out(e_in), .v_out, .i_l, .i_lim
  );

  always #5 clk = ~clk;

  localparam int CYC = 100;          // clocks per switching cycle at the defaults
  localparam int STEP_CYCLES = 200;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic seg_t seg_of(input int i);
    if (i >= 140) return 3'b111;
    if (i >= 85)  return 3'b011;
    return 3'b001;
  endfunction

  function automatic int level_of(input int i);
    int th[5] = '{20, 30, 40, 55, 70};
    int t = 0;
    foreach (th[k]) if (i >= th[k]) t = k + 1;
    return t;
  endfunction

  // mechanism counters
  int n_trip = 0, n_maxd = 0, n_seg_up = 0, n_seg_dn = 0, n_gs_up = 0, n_gs_dn = 0;
  int n_adc_sat = 0, n_sc_reconf = 0, n_cycles = 0;

  // per-cycle monitor: one clock after i_c is updated the configuration must match it
  logic ic_valid_d;
  int   gain_before;
  seg_t seg_before;
  always @(posedge clk) begin
    ic_valid_d <= dut.ic_valid;
    if (dut.ic_valid) begin
      gain_before = int'(gain_sl);
      seg_before  = seg_en;
    end
  end

  always @(negedge clk) if (rst_n) begin
    int tgt;
    check(!((p_on & n_on) != '0), "shoot-through");
    if (trip_evt) n_trip++;
    if (maxd_evt) n_maxd++;
    if (gs_up) n_gs_up++;
    if (gs_dn) n_gs_dn++;
    if (adc_sample && (e_in == err_t'(7) || e_in == err_t'(-8))) n_adc_sat++;
    if (ic_valid_d && enable) begin
      n_cycles++;
      check(seg_en == seg_of(int'(ic)), $sformatf("seg_en %b for ic %0d", seg_en, ic));
      if ($countones(seg_en) > $countones(seg_before)) n_seg_up++;
      if ($countones(seg_en) < $countones(seg_before)) n_seg_dn++;
      tgt = level_of(int'(ic));
      if (tgt > gain_before)      check(int'(gain_sl) == gain_before + 1, "gain step up");
      else if (tgt < gain_before) check(int'(gain_sl) == gain_before - 1, "gain step down");
      else                        check(int'(gain_sl) == gain_before, "gain hold");
    end
  end

  // SC controller follows gain_sl within one SC period
  int sc_lag = 0;
  gain_t sc_prev;
  always @(negedge clk) if (rst_n) begin
    if (sc_gain != sc_prev) n_sc_reconf++;
    sc_prev = sc_gain;
    if (sc_gain != gain_sl) sc_lag++;
    else sc_lag = 0;
    check(sc_lag <= 100, "SC controller lags gain_sl by more than one period");
  end

  // gain_sl history across the 0.5 A -> 1 A step
  int gs_hist[$];
  bit record = 0;
  always @(negedge clk) if (record && (gs_hist.size() == 0 || gs_hist[$] != int'(gain_sl)))
    gs_hist.push_back(int'(gain_sl));

  task automatic run_step(input real amps, input int exp_segs, input int exp_level);
    real vmax, vmin;
    int emax;
    i_load = amps;
    repeat ((STEP_CYCLES - 50) * CYC) @(posedge clk);
    vmax = 0.0; vmin = 10.0; emax = 0;
    repeat (50 * CYC) begin
      @(negedge clk);
      if (v_out > vmax) vmax = v_out;
      if (v_out < vmin) vmin = v_out;
      if (int'(e_in) > emax) emax = int'(e_in);
      if (-int'(e_in) > emax) emax = -int'(e_in);
    end
    $display("load %4.2f A: v_out %5.3f..%5.3f V, |e|max %0d, ic %0d, seg_en %b, gain_sl %b",
             amps, vmin, vmax, emax, ic, seg_en, gain_sl);
    check(vmax < 1.83 && vmin > 1.77, $sformatf("regulation at %4.2f A", amps));
    check(emax <= 2, $sformatf("error at %4.2f A", amps));
    check($countones(seg_en) == exp_segs, $sformatf("segments at %4.2f A", amps));
    if (exp_level >= 0) check(int'(gain_sl) == exp_level, $sformatf("gate level at %4.2f A", amps));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    enable <= 1;
    run_step(0.15, 1, 1);
    run_step(0.5, 1, 3);
    record = 1;
    run_step(1.0, 1, 5);
    record = 0;
    run_step(1.5, 2, 5);
    run_step(2.5, 3, 5);
    run_step(0.3, 1, -1);
    run_step(1.0, 1, 5);
    run_step(0.15, 1, 1);
    run_step(3.5, 3, 5);
    run_step(0.15, 1, 1);
    // input sag to 2.0 V at 1 A: the needed duty ratio exceeds the on-time
    // limit, so every on-time ends at the limit and the output droops
    begin
      int maxd_before;
      maxd_before = n_maxd;
      i_load = 1.0;
      v_in = 2.0;
      repeat (50 * CYC) @(posedge clk);
      check(n_maxd - maxd_before > 20, "on-time limit during input sag");
      check(v_out < 1.79, "output droops during input sag");
      v_in = 5.0;
    end
    run_step(1.0, 1, 5);
    begin
      int idx3, idx4, idx5;
      idx3 = -1; idx4 = -1; idx5 = -1;
      foreach (gs_hist[i]) begin
        if (gs_hist[i] == 3 && idx3 < 0) idx3 = i;
        if (gs_hist[i] == 4 && idx4 < 0) idx4 = i;
        if (gs_hist[i] == 5 && idx5 < 0) idx5 = i;
      end
      check(idx3 >= 0 && idx4 > idx3 && idx5 > idx4, "0.5 A -> 1 A walks gain_sl 011, 100, 101");
    end
    $display("cycles=%0d comparator_ends=%0d limit_ends=%0d seg_add=%0d seg_remove=%0d gs_up=%0d gs_down=%0d adc_window_sat=%0d sc_reconf=%0d",
             n_cycles, n_trip, n_maxd, n_seg_up, n_seg_dn, n_gs_up, n_gs_dn, n_adc_sat, n_sc_reconf);
    check(n_trip > 0,     "comparator-ended on-time seen");
    check(n_maxd > 0,     "on-time limit seen");
    check(n_seg_up > 0,   "segment added");
    check(n_seg_dn > 0,   "segment removed");
    check(n_gs_up > 0,    "gate swing stepped up");
    check(n_gs_dn > 0,    "gate swing stepped down");
    check(n_adc_sat > 0,  "ADC window saturated");
    check(n_sc_reconf > 0, "SC reconfigured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
