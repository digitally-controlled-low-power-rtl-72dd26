// cpm_modulator: switching-cycle timer and peak-current latch of the
// mixed-signal peak-current-programmed-mode buck controller.
//
// Every SW_PERIOD clocks (1 MHz switching with the default 100 MHz clock) a
// new switching cycle starts: `cycle_start` pulses, and after a dead time of
// DEAD clocks with both switches off the high-side (PMOS) switch turns on.
// It stays on until the analog comparator reports that the inductor current
// has reached the limit v_c(t) set by the sigma-delta DAC (`cmp_trip`), or
// until the maximum on-time D_MAX_CLKS is reached. Then, after another dead
// time, the low-side (NMOS) switch conducts to the end of the cycle.
//
// Peak-current control and the 1 MHz switching frequency follow the converter
// description. The clock rate, the dead times, the leading-edge blanking
// (comparator ignored for the first BLANK clocks of the on-time), the maximum
// on-time and the two-flop synchroniser on cmp_trip are this design's choices.
//
// Interface / timing: cmp_trip is asynchronous and is synchronised (2 clocks
// of latency). hs_on/ls_on are registered and never high together.
// trip_evt pulses when an on-time ends by the comparator, maxd_evt when it
// ends by the on-time limit. Synchronous active-low reset.
module cpm_modulator #(
  parameter int unsigned SW_PERIOD  = 100,  // clocks per switching cycle
  parameter int unsigned DEAD       = 2,    // dead time, clocks
  parameter int unsigned BLANK      = 4,    // leading-edge blanking, clocks
  parameter int unsigned D_MAX_CLKS = 85    // maximum high-side on-time, clocks
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,       // 0: both switches off
  input  logic cmp_trip,     // comparator: inductor current >= v_c(t)
  output logic cycle_start,  // one-clock pulse at the start of each cycle
  output logic hs_on,        // high-side switch command
  output logic ls_on,        // low-side switch command
  output logic trip_evt,
  output logic maxd_evt
);

  localparam int unsigned CW = $clog2(SW_PERIOD);

  typedef enum logic [1:0] {S_DEAD1, S_ON, S_DEAD2, S_OFF} phase_e;

  logic [CW-1:0] cnt_q;
  logic [CW-1:0] ph_cnt_q;
  phase_e        ph_q;
  logic [1:0]    sync_q;
  logic          trip_s;

  assign trip_s = sync_q[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_q <= '0;
    end else begin
      sync_q <= {sync_q[0], cmp_trip};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      ph_cnt_q    <= '0;
      ph_q        <= S_OFF;
      cycle_start <= 1'b0;
      hs_on       <= 1'b0;
      ls_on       <= 1'b0;
      trip_evt    <= 1'b0;
      maxd_evt    <= 1'b0;
    end else begin
      trip_evt    <= 1'b0;
      maxd_evt    <= 1'b0;
      cycle_start <= 1'b0;
      cnt_q       <= (cnt_q == CW'(SW_PERIOD - 1)) ? '0 : cnt_q + 1'b1;
      ph_cnt_q    <= ph_cnt_q + 1'b1;
      if (cnt_q == CW'(SW_PERIOD - 1)) begin
        // a new cycle begins: both off for the dead time
        cycle_start <= 1'b1;
        ph_q        <= S_DEAD1;
        ph_cnt_q    <= '0;
        hs_on       <= 1'b0;
        ls_on       <= 1'b0;
      end else begin
        unique case (ph_q)
          S_DEAD1: if (ph_cnt_q == CW'(DEAD - 1)) begin
            ph_q     <= enable ? S_ON : S_OFF;
            ph_cnt_q <= '0;
            hs_on    <= enable;
          end
          S_ON: begin
            if (ph_cnt_q >= CW'(BLANK) && trip_s) begin
              trip_evt <= 1'b1;
              ph_q     <= S_DEAD2;
              ph_cnt_q <= '0;
              hs_on    <= 1'b0;
            end else if (ph_cnt_q == CW'(D_MAX_CLKS - 1)) begin
              maxd_evt <= 1'b1;
              ph_q     <= S_DEAD2;
              ph_cnt_q <= '0;
              hs_on    <= 1'b0;
            end
          end
          S_DEAD2: if (ph_cnt_q == CW'(DEAD - 1)) begin
            ph_q  <= S_OFF;
            ls_on <= enable;
          end
          S_OFF: if (!enable) ls_on <= 1'b0;
          default: ph_q <= S_OFF;
        endcase
      end
    end
  end

  // the two switches of a leg must never conduct together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(hs_on && ls_on));

endmodule
