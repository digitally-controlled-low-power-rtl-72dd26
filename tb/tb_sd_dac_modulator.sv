// tb_sd_dac_modulator: self-checking test of the first-order sigma-delta
// modulator. For a set of constant codes (including 0 and full scale) the
// number of ones in two windows of 2^IC_W clocks must equal the code exactly,
// and each output bit must match an accumulator/carry reference model.
module tb_sd_dac_modulator;
  import dcdc_pkg::*;

  logic clk = 0, rst_n = 0, dac_bit;
  ic_t  ic_in = '0;
  int checks = 0, failures = 0;

  sd_dac_modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: remainder of the running sum modulo 2^IC_W, carry out = bit
  int ref_acc = 0;
  bit ref_bit = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_acc = 0;
      ref_bit = 0;
    end else begin
      ref_bit = ((ref_acc + int'(ic_in)) >= (1 << IC_W));
      ref_acc = (ref_acc + int'(ic_in)) % (1 << IC_W);
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (dac_bit != ref_bit) begin
      failures++;
      if (failures < 10) $display("FAIL bit at %0t", $time);
    end
  end

  initial begin
    automatic int codes[$] = '{0, 1, 37, 128, 200, 255};
    int ones;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 16; r++) codes.push_back($urandom_range(0, 255));
    foreach (codes[i]) begin
      ic_in <= ic_t'(codes[i]);
      repeat (2 + $urandom_range(0, 9)) @(posedge clk);
      for (int w = 0; w < 2; w++) begin
        ones = 0;
        repeat (1 << IC_W) begin
          @(negedge clk);
          ones += int'(dac_bit);
        end
        checks++;
        if (ones != codes[i]) begin
          failures++;
          $display("FAIL density code=%0d ones=%0d", codes[i], ones);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
