// tb_pi_compensator: self-checking test of the PI compensator. Random error
// samples are applied with strobes at random intervals; an integer reference
// model of u[n] = clamp(u[n-1] + KP*(e[n]-e[n-1]) + KI*e[n]) predicts i_c.
// Also checks the one-clock strobe-to-output latency, that i_c holds between
// strobes, and that both clamps (0 and full scale) are reached.
module tb_pi_compensator;
  import dcdc_pkg::*;

  localparam int FRAC = 4, KP = 128, KI = 12;

  logic clk = 0, rst_n = 0, sample = 0;
  err_t e_in = '0;
  ic_t  ic_out;
  logic ic_valid;
  int checks = 0, failures = 0;
  int hit_lo = 0, hit_hi = 0;

  pi_compensator #(.FRAC(FRAC), .KP(KP), .KI(KI), .IC_INIT(0)) dut (.*);

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic int u_ref = 0;
    automatic int e_prev = 0, e_cur, bias;
    automatic int umax = (1 << (IC_W + FRAC)) - 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      // drift phases to drive the integrator into both clamps
      bias  = ((n / 500) % 2 == 0) ? 3 : -3;
      e_cur = int'($urandom_range(0, 8)) - 4 + bias;
      if (e_cur > 7)  e_cur = 7;
      if (e_cur < -8) e_cur = -8;
      e_in   <= err_t'(e_cur);
      sample <= 1'b1;
      @(posedge clk);                 // dut samples here
      sample <= 1'b0;
      u_ref = u_ref + KP * (e_cur - e_prev) + KI * e_cur;
      if (u_ref < 0)    u_ref = 0;
      if (u_ref > umax) u_ref = umax;
      e_prev = e_cur;
      #1;
      check(ic_valid == 1'b1, "ic_valid one clock after strobe");
      check(ic_out == ic_t'(u_ref >> FRAC), $sformatf("n=%0d ic=%0d exp=%0d", n, ic_out, u_ref >> FRAC));
      if (u_ref == 0) hit_lo++;
      if (u_ref == umax) hit_hi++;
      // idle clocks: output must hold
      repeat ($urandom_range(1, 4)) begin
        e_in <= err_t'($urandom);
        @(posedge clk); #1;
        check(ic_out == ic_t'(u_ref >> FRAC) && !ic_valid, "hold between strobes");
      end
    end
    check(hit_lo > 0, "lower clamp reached");
    check(hit_hi > 0, "upper clamp reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
