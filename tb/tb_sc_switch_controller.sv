// tb_sc_switch_controller: self-checking test of the switch-cap controller.
// Predicts, from its own period counter, the phase of every clock and checks:
// phase 1 and phase 2 last HALF-NOV clocks each and are separated by NOV
// clocks with all switches open; the switch pattern in each phase is the
// table entry of the gain code that was present at the start of the period,
// even when gain_sl changes in the middle of a period. The expected table is
// written out here from its definition (code g closes switches 3g..3g+2 in
// phase 1 and 3g+3..3g+5, modulo 18, in phase 2).
module tb_sc_switch_controller;
  import dcdc_pkg::*;

  localparam int HALF = 10, NOV = 2, PER = 2 * HALF;

  logic  clk = 0, rst_n = 0;
  gain_t gain_sl = 3'd2;
  scsw_t sw;
  gain_t sc_gain;
  logic  phase1, phase2;
  int checks = 0, failures = 0;

  sc_switch_controller #(.HALF(HALF), .NOV(NOV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic scsw_t pattern(input int g, input bit ph2);
    scsw_t p = '0;
    int base = ph2 ? 3 * g + 3 : 3 * g;
    for (int k = 0; k < 3; k++) p[(base + k) % 18] = 1'b1;
    return p;
  endfunction

  initial begin
    automatic int t, g_used, n_ph1 = 0, n_ph2 = 0, n_mid_changes = 0;
    scsw_t exp_sw;
    bit e1, e2;
    @(posedge clk);
    rst_n <= 1;
    g_used = int'(gain_sl);
    // clock k after reset release: dut counter before edge k is k-1 (mod PER)
    for (int k = 1; k <= 400 * PER; k++) begin
      t = (k - 1) % PER;          // counter value seen on this edge
      // change the code at random moments, also inside a period
      if ($urandom_range(0, 7) == 0) begin
        gain_sl <= gain_t'($urandom_range(0, 5));
        if (t != PER - 2) n_mid_changes++;
      end
      @(posedge clk); #1;
      e1 = (t < HALF - NOV);
      e2 = (t >= HALF) && (t < PER - NOV);
      exp_sw = e1 ? pattern(g_used, 1'b0) : e2 ? pattern(g_used, 1'b1) : '0;
      if (t == PER - 1) g_used = int'(gain_sl);    // sampled on the wrap edge
      checks++;
      if (sw != exp_sw || phase1 != e1 || phase2 != e2 || int'(sc_gain) != g_used) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d t=%0d sw=%h exp=%h g=%0d", k, t, sw, exp_sw, g_used);
      end
      n_ph1 += e1;
      n_ph2 += e2;
    end
    checks++;
    if (n_ph1 != 400 * (HALF - NOV) || n_ph2 != 400 * (HALF - NOV) || n_mid_changes == 0) begin
      failures++;
      $display("FAIL phase counts %0d %0d", n_ph1, n_ph2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
