// tb_gate_swing_fsm: self-checking test of the gate swing controller FSM.
// 1) Load step 500 mA -> 1 A (peak-current codes 47 -> 79): gain_sl must walk
//    011 -> 100 -> 101, one level per switching cycle, and hold there.
// 2) Random references: after each strobe gain_sl must move one level towards
//    the target level (number of thresholds 20/30/40/55/70 reached), with
//    step_up/step_dn pulses that match, and never change without a strobe.
module tb_gate_swing_fsm;
  import dcdc_pkg::*;

  logic  clk = 0, rst_n = 0, cycle_start = 0;
  ic_t   ic = '0;
  gain_t gain_sl;
  logic  step_up, step_dn;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0;

  gate_swing_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int target_of(input int i);
    int th[5] = '{20, 30, 40, 55, 70};
    int t = 0;
    foreach (th[k]) if (i >= th[k]) t = k + 1;
    return t;
  endfunction

  task automatic strobe();
    @(negedge clk);
    cycle_start = 1;
    @(posedge clk); #1;
    cycle_start = 0;
  endtask

  initial begin
    int lvl, tgt, v;
    @(posedge clk); #1;
    check(gain_sl == 3'd5, "reset level is full swing");
    rst_n <= 1;
    // settle at 500 mA of load
    ic = 8'd47;
    repeat (8) strobe();
    check(gain_sl == 3'b011, $sformatf("500 mA level 011, got %b", gain_sl));
    ic = 8'd79;
    strobe(); check(gain_sl == 3'b100 && step_up, "first step to 100");
    strobe(); check(gain_sl == 3'b101 && step_up, "second step to 101");
    strobe(); check(gain_sl == 3'b101 && !step_up && !step_dn, "hold at 101");
    // random
    lvl = int'(gain_sl);
    for (int n = 0; n < 3000; n++) begin
      v = (n % 3 == 0) ? int'($urandom_range(0, 255)) : int'($urandom_range(10, 80));
      @(negedge clk);
      ic = ic_t'(v);
      @(posedge clk); #1;
      check(int'(gain_sl) == lvl && !step_up && !step_dn, "no change without strobe");
      strobe();
      tgt = target_of(v);
      if (tgt > lvl) begin
        lvl++;
        check(step_up && !step_dn, "step_up pulse");
        n_up++;
      end else if (tgt < lvl) begin
        lvl--;
        check(step_dn && !step_up, "step_dn pulse");
        n_dn++;
      end else check(!step_up && !step_dn, "no step pulse");
      check(int'(gain_sl) == lvl, $sformatf("ic=%0d gain=%0d exp=%0d", v, gain_sl, lvl));
    end
    check(n_up > 100 && n_dn > 100, "both directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
