// tb_cpm_modulator: self-checking test of the switching-cycle logic. A
// comparator model raises cmp_trip after the high-side switch has been on for
// a random number of clocks T. Expected, for the default timing:
//   switching period         = SW_PERIOD clocks (cycle_start spacing)
//   high-side on-time        = min(max(T + 2, BLANK + 1), D_MAX_CLKS)
//     (2 clocks of synchroniser and register delay; blanking; on-time limit)
//   dead times               = DEAD clocks before turn-on and after turn-off
//   trip_evt / maxd_evt      = exactly one of them per on-time
// and never both switches on; with enable low both stay off.
module tb_cpm_modulator;

  localparam int SW_PERIOD = 100, DEAD = 2, BLANK = 4, D_MAX_CLKS = 85;

  logic clk = 0, rst_n = 0, enable = 1, cmp_trip = 0;
  logic cycle_start, hs_on, ls_on, trip_evt, maxd_evt;
  int checks = 0, failures = 0;

  cpm_modulator #(.SW_PERIOD(SW_PERIOD), .DEAD(DEAD), .BLANK(BLANK), .D_MAX_CLKS(D_MAX_CLKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // sampled once per clock, at the negative edge
  int T = 10;            // trip delay of the current cycle
  int hs_cnt = 0, gap_pre = 0, gap_post = 0, since_start = -1;
  int n_trip = 0, n_maxd = 0, n_cycles = 0, n_evt = 0;
  bit hs_prev = 0, ls_prev = 0, started = 0;

  always @(negedge clk) if (rst_n) begin
    check(!(hs_on && ls_on), "shoot-through");
    if (!enable) check(!hs_on && !(ls_on && since_start > 1), "switching while disabled");
    if (cycle_start) begin
      if (started) check(since_start == SW_PERIOD, $sformatf("period %0d", since_start));
      started = 1;
      since_start = 0;
      n_cycles++;
    end
    if (started) since_start++;
    if (trip_evt) n_trip++;
    if (maxd_evt) n_maxd++;
    if (trip_evt || maxd_evt) begin
      n_evt++;
      check(!(trip_evt && maxd_evt), "both events");
    end
    if (hs_on) hs_cnt++;
    if (hs_on && !hs_prev) check(since_start == DEAD + 1, $sformatf("turn-on at %0d", since_start));
    if (!hs_on && hs_prev) begin
      int exp_on;
      exp_on = (T + 2 > BLANK + 1) ? T + 2 : BLANK + 1;
      if (exp_on > D_MAX_CLKS) exp_on = D_MAX_CLKS;
      check(hs_cnt == exp_on, $sformatf("on-time %0d exp %0d (T=%0d)", hs_cnt, exp_on, T));
      if (T + 2 <= D_MAX_CLKS) check(trip_evt && !maxd_evt, "on-time ended by comparator");
      else                     check(maxd_evt && !trip_evt, "on-time ended by limit");
      gap_post = 0;
    end
    if (!hs_on && !ls_on && started) gap_post++;
    if (ls_on && !ls_prev && enable) check(gap_post == DEAD, $sformatf("dead time after turn-off %0d", gap_post));
    // comparator model
    cmp_trip <= hs_on && (hs_cnt >= T);
    if (!hs_on && hs_prev) begin
      hs_cnt = 0;
      cmp_trip <= 0;
    end
    if (cycle_start) begin
      T = (n_cycles % 7 == 3) ? 95 : int'($urandom_range(1, 70));
      hs_cnt = 0;
    end
    hs_prev = hs_on;
    ls_prev = ls_on;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (300 * SW_PERIOD) @(posedge clk);
    enable <= 0;
    repeat (5 * SW_PERIOD) @(posedge clk);
    check(n_trip > 100, "comparator-terminated cycles seen");
    check(n_maxd > 10, "on-time limit cycles seen");
    check(n_cycles >= 300, "cycles counted");
    $display("cycles=%0d trips=%0d maxduty=%0d", n_cycles, n_trip, n_maxd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
