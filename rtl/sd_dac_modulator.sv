// sd_dac_modulator: digital half of the one-bit sigma-delta DAC that turns
// the current reference i_c[n] into the analog peak-current limit v_c(t).
// The bitstream leaves the chip and an external RC low-pass filter recovers
// v_c(t) = V_FS * i_c / 2^IC_W; the filter and the peak-current comparator are
// analog and not part of this RTL.
//
// Following the converter description, the DAC is a simple sigma-delta type
// clocked far above the switching frequency. The modulator order is this
// design's choice: a first-order (error-feedback) modulator, i.e. an
// IC_W-bit phase accumulator whose carry is the output bit. Over any 2^IC_W
// consecutive clocks with a constant input, exactly i_c ones are produced.
//
// Interface / timing: ic_in is sampled every clock; dac_bit is registered.
// Synchronous active-low reset clears the accumulator and the output.
module sd_dac_modulator
  import dcdc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  ic_t  ic_in,
  output logic dac_bit
);

  ic_t          acc_q;
  logic [IC_W:0] sum;

  assign sum = {1'b0, acc_q} + {1'b0, ic_in};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q   <= '0;
      dac_bit <= 1'b0;
    end else begin
      acc_q   <= sum[IC_W-1:0];
      dac_bit <= sum[IC_W];
    end
  end

endmodule
