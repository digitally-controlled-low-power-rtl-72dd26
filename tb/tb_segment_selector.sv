// tb_segment_selector: self-checking test of the segment selector. Random
// current references (biased around the two thresholds) are applied; seg_en
// must change only on a cycle_start strobe and then equal the thermometer
// code 1 + #(thresholds reached), computed here from the threshold values.
// Also checks the all-segments reset state and that 1, 2 and 3 segments
// are all selected.
module tb_segment_selector;
  import dcdc_pkg::*;

  logic clk = 0, rst_n = 0, cycle_start = 0;
  ic_t  ic = '0;
  seg_t seg_en;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  segment_selector dut (.*);

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

  function automatic seg_t expect_seg(input int i);
    // thresholds: 85 (about 1.1 A load) and 140 (about 2 A load)
    if (i >= 140) return 3'b111;
    if (i >= 85)  return 3'b011;
    return 3'b001;
  endfunction

  initial begin
    seg_t held;
    int v;
    @(posedge clk); #1;
    check(seg_en == 3'b111, "reset selects all segments");
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      case (n % 4)
        0: v = $urandom_range(0, 255);
        1: v = 85 + int'($urandom_range(0, 4)) - 2;
        2: v = 140 + int'($urandom_range(0, 4)) - 2;
        default: v = $urandom_range(0, 100);
      endcase
      ic <= ic_t'(v);
      held = seg_en;
      @(posedge clk); #1;
      check(seg_en == held, "no change without strobe");
      cycle_start <= 1;
      @(posedge clk); #1;
      cycle_start <= 0;
      check(seg_en == expect_seg(v), $sformatf("ic=%0d seg_en=%b", v, seg_en));
      seen[$countones(seg_en)]++;
    end
    check(seen[1] > 0 && seen[2] > 0 && seen[3] > 0, "all segment counts used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
