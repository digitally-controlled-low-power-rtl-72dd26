// tb_load_frequency: dynamic-load workload. The load current is a square
// wave between 0.3 A and 1.5 A, first at 5 kHz and then at 14 kHz (the load
// change frequency at which cycle-by-cycle optimisation gives its largest
// energy benefit over a steady-state-estimating optimiser). For every load
// period the controller must drop to one segment with a scaled gate swing
// during the light half and add the second segment during the heavy half,
// i.e. it reconfigures at every load change without waiting for a steady
// state. Also checked: seg_en matches the i_c[n] of each switching cycle,
// and the output stays within 1.8 V +/- 120 mV throughout.
module tb_load_frequency;
  import dcdc_pkg::*;

  logic  clk = 0, rst_n = 0, enable = 0;
  err_t  e_in;
  logic  adc_sample, dac_bit, cmp_trip, q1_on;
  seg_t  p_on, n_on, seg_en;
  scsw_t sc_sw;
  ic_t   ic;
  gain_t gain_sl, sc_gain;
  logic  trip_evt, maxd_evt, gs_up, gs_dn, sc_ph1, sc_ph2;
  real   i_load = 0.3, v_in = 5.0, v_out, i_l, i_lim;

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
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic ic_valid_d;
  bit   monitor = 0;
  real  vmin = 10.0, vmax = 0.0;
  always @(posedge clk) ic_valid_d <= dut.ic_valid;
  always @(negedge clk) if (monitor) begin
    if (v_out < vmin) vmin = v_out;
    if (v_out > vmax) vmax = v_out;
    if (ic_valid_d) check(seg_en == ((ic >= 140) ? 3'b111 : (ic >= 85) ? 3'b011 : 3'b001),
                          "seg_en follows i_c");
  end

  // run n load periods at the given half period (clocks); count, per half,
  // whether the expected configuration was reached
  task automatic run_freq(input int half_clks, input int periods, input string name);
    int light_ok = 0, heavy_ok = 0;
    bit seen;
    vmin = 10.0; vmax = 0.0;
    for (int p = 0; p < periods; p++) begin
      i_load = 1.5;
      seen = 0;
      repeat (half_clks) begin
        @(negedge clk);
        if ($countones(seg_en) == 2) seen = 1;
      end
      heavy_ok += seen;
      i_load = 0.3;
      seen = 0;
      repeat (half_clks) begin
        @(negedge clk);
        if (seg_en == 3'b001 && gain_sl < 3'd5) seen = 1;
      end
      light_ok += seen;
    end
    $display("%s: %0d periods, heavy-half reconfigurations %0d, light-half reconfigurations %0d, v_out %5.3f..%5.3f V",
             name, periods, heavy_ok, light_ok, vmin, vmax);
    check(heavy_ok == periods, {name, ": second segment added in every heavy half"});
    check(light_ok == periods, {name, ": light configuration in every light half"});
    check(vmin > 1.68 && vmax < 1.92, {name, ": output within 120 mV"});
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    enable <= 1;
    repeat (200 * 100) @(posedge clk);      // settle at 0.3 A
    monitor = 1;
    run_freq(10000, 6, "5 kHz");             // 100 us half period
    run_freq(3571, 14, "14 kHz");            // 35.7 us half period
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
