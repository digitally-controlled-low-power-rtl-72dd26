// pi_compensator: digital voltage-loop compensator of the peak-current-mode
// buck controller. Once per switching cycle (strobe `sample`) it takes the
// windowed-ADC error e[n] and updates the digital peak-current reference
// i_c[n], which both sets the peak inductor current (through the
// sigma-delta DAC) and steers the segment and gate-swing optimisation.
//
// The overall role (error in, current reference out, one update per switching
// cycle) follows the converter description; the control law is this design's
// choice, since only the function of the compensator is specified. It is a
// PI law in incremental (velocity) form:
//     u[n] = u[n-1] + KP*(e[n] - e[n-1]) + KI*e[n]
// with u held in fixed point (FRAC fractional bits) and clamped to the range
// of i_c, so the integrator cannot wind up. i_c[n] = u[n] >> FRAC.
//
// Interface / timing: e_in is read on the clock edge where `sample` is high;
// ic_out and ic_valid (a one-cycle pulse) change on that same edge, i.e. one
// clock after the strobe is seen. Synchronous active-low reset clears the
// state to u = IC_INIT << FRAC and e[n-1] = 0.
module pi_compensator
  import dcdc_pkg::*;
#(
  parameter int unsigned FRAC    = 4,    // fractional bits of u
  parameter int unsigned KP      = 128,  // proportional gain, LSB = 2^-FRAC i_c codes per e LSB
  parameter int unsigned KI      = 12,   // integral gain,     LSB = 2^-FRAC i_c codes per e LSB
  parameter int unsigned IC_INIT = 0     // i_c after reset
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,     // one pulse per switching cycle
  input  err_t e_in,       // e[n]
  output ic_t  ic_out,     // i_c[n]
  output logic ic_valid    // pulses when ic_out has been updated
);

  localparam int unsigned UW   = IC_W + FRAC;          // width of u
  localparam int unsigned ACCW = UW + 12;              // headroom for the update
  localparam logic signed [ACCW-1:0] U_MAX = ACCW'((2**UW) - 1);

  logic [UW-1:0]  u_q;
  err_t           e_prev_q;

  logic signed [ACCW-1:0] de, u_next_wide;

  always_comb begin
    de          = ACCW'(e_in) - ACCW'(e_prev_q);
    u_next_wide = $signed({{(ACCW-UW){1'b0}}, u_q})
                + $signed(ACCW'(KP)) * de
                + $signed(ACCW'(KI)) * ACCW'(e_in);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_q      <= UW'(IC_INIT) << FRAC;
      e_prev_q <= '0;
      ic_valid <= 1'b0;
    end else begin
      ic_valid <= sample;
      if (sample) begin
        e_prev_q <= e_in;
        if (u_next_wide < 0)           u_q <= '0;
        else if (u_next_wide > U_MAX)  u_q <= '1;
        else                           u_q <= u_next_wide[UW-1:0];
      end
    end
  end

  assign ic_out = u_q[UW-1 -: IC_W];

endmodule
