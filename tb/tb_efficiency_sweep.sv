// tb_efficiency_sweep: steady-state efficiency workload. The closed loop
// (controller + buck_plant_model) is settled at a series of load currents
// from 0.1 A to 2.8 A. At each point the test bench takes the configuration
// the controller chose (segments, gate-swing level) and the simulated
// inductor current, and evaluates the MOSFET loss model
//   P_cond = <i_L^2> * R_DS0 / sum_k (Vg_k - V_TH)      (segments in parallel)
//   P_gate = sum_k C_G * Vg_k^2 * f_s
// for three cases: the chosen configuration, the fixed configuration (all
// three segments at full swing, no optimisation) and the best of all
// configurations (1..3 segments at full swing, or one segment at any level).
// Checked: the chosen configuration never loses more than the fixed one,
// stays within 10 % of the best, and gains at least 10 points of efficiency
// at 100 mA. The device constants (R_DS0 = 0.5 Ohm*V, C_G = 2.8 nF per
// segment, V_TH = 0.7 V, levels 1.5/2.2/2.9/3.6/4.3/5.0 V) are illustrative;
// with them the loss-optimal change points match the default thresholds.
// Replace them with the real power stage's values when calibrating.
module tb_efficiency_sweep;
  import dcdc_pkg::*;

  localparam real R_DS0 = 0.5, C_G = 2.8e-9, V_TH = 0.7, F_S = 1.0e6, V_O = 1.8;
  localparam real VG[6] = '{1.5, 2.2, 2.9, 3.6, 4.3, 5.0};

  logic  clk = 0, rst_n = 0, enable = 0;
  err_t  e_in;
  logic  adc_sample, dac_bit, cmp_trip, q1_on;
  seg_t  p_on, n_on, seg_en;
  scsw_t sc_sw;
  ic_t   ic;
  gain_t gain_sl, sc_gain;
  logic  trip_evt, maxd_evt, gs_up, gs_dn, sc_ph1, sc_ph2;
  real   i_load = 0.1, v_in = 5.0, v_out, i_l, i_lim;

  int checks = 0, failures = 0;

  dcdc_top dut (.*);

  buck_plant_model plant (
    .clk, .p_on, .n_on, .dac_bit, .adc_sample, .i_load, .v_in,
    .cmp_trip, .e_out(e_in), .v_out, .i_l, .i_lim
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // loss of k full-swing segments plus segment 0 at gate voltage vg0
  function automatic real loss(input real i2, input int k, input real vg0);
    real g, pg;
    g  = (vg0 - V_TH) + real'(k - 1) * (VG[5] - V_TH);
    pg = C_G * F_S * (vg0 * vg0 + real'(k - 1) * VG[5] * VG[5]);
    return i2 * R_DS0 / g + pg;
  endfunction

  initial begin
    automatic real loads[11] = '{0.1, 0.2, 0.3, 0.5, 0.7, 1.0, 1.3, 1.6, 2.0, 2.5, 2.8};
    real i2, p_opt, p_fix, p_best, p, eff_opt, eff_fix;
    int  n;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    enable <= 1;
    $display(" load  seg gain  loss_opt  loss_fixed  loss_best  eff_opt  eff_fixed");
    foreach (loads[j]) begin
      i_load = loads[j];
      repeat (250 * 100) @(posedge clk);
      i2 = 0.0;
      n  = 0;
      repeat (50 * 100) begin
        @(negedge clk);
        i2 += i_l * i_l;
        n++;
      end
      i2 = i2 / real'(n);
      p_opt  = loss(i2, $countones(seg_en), VG[gain_sl]);
      p_fix  = loss(i2, 3, VG[5]);
      p_best = p_fix;
      for (int k = 1; k <= 3; k++) begin
        p = loss(i2, k, VG[5]);
        if (p < p_best) p_best = p;
      end
      for (int g = 0; g < 6; g++) begin
        p = loss(i2, 1, VG[g]);
        if (p < p_best) p_best = p;
      end
      eff_opt = V_O * loads[j] / (V_O * loads[j] + p_opt);
      eff_fix = V_O * loads[j] / (V_O * loads[j] + p_fix);
      $display("%5.2f  %0d    %0d   %7.4f   %7.4f     %7.4f    %5.3f    %5.3f",
               loads[j], $countones(seg_en), gain_sl, p_opt, p_fix, p_best, eff_opt, eff_fix);
      check(p_opt <= p_fix * 1.0001, $sformatf("%4.2f A: optimised loss above fixed", loads[j]));
      check(p_opt <= p_best * 1.10, $sformatf("%4.2f A: optimised loss more than 10 %% above best", loads[j]));
      if (j == 0) check(eff_opt - eff_fix >= 0.10, "at least 10 points gained at 100 mA");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
