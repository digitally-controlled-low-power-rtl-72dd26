// tb_segment_gating: exhaustive self-checking test of the segment gating:
// every combination of high-side command, low-side command and segment
// enables; a segment conducts only when enabled, and Q1 pulls the smallest
// segment's PMOS gate up whenever that PMOS is commanded off.
module tb_segment_gating;
  import dcdc_pkg::*;

  logic hs_on, ls_on, q1_on;
  seg_t seg_en, p_on, n_on;
  int checks = 0, failures = 0;

  segment_gating dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      hs_on  = c[0];
      ls_on  = c[1];
      seg_en = seg_t'(c >> 2);
      #1;
      for (int s = 0; s < 3; s++) begin
        checks += 2;
        if (p_on[s] != (hs_on && seg_en[s])) begin failures++; $display("FAIL p_on c=%0d s=%0d", c, s); end
        if (n_on[s] != (ls_on && seg_en[s])) begin failures++; $display("FAIL n_on c=%0d s=%0d", c, s); end
      end
      checks++;
      if (q1_on != !(hs_on && seg_en[0])) begin failures++; $display("FAIL q1 c=%0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
