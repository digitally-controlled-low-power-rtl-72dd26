// buck_plant_model: behavioural model (simulation only) of the analog parts
// around the digital controller, stepped once per controller clock:
//  * RC filter of the sigma-delta DAC bitstream, scaled so that a constant
//    code c gives a peak-current limit of c * I_LSB amperes;
//  * peak-current comparator (inductor current >= limit);
//  * buck power stage: switch node at v_in when any PMOS segment conducts,
//    at 0 V when any NMOS segment conducts, one diode drop below ground when
//    neither conducts and the inductor current is positive; conduction drop
//    i*R_on with R_on = R_SEG / (number of enabled segments);
//  * inductor L, output capacitor C and a programmable load current;
//  * windowed ADC: on adc_sample it converts V_REF - v_out into a 4-bit
//    two's-complement code with step ADC_LSB, saturating at the window edges.
// Component values: v_in = 5 V (a port, so input sags can be applied),
// V_REF = 1.8 V, L = 2.2 uH and C = 47 uF follow the prototype; the rest
// (filter time constant, on-resistance, 10 mV ADC step) are chosen here.
module buck_plant_model
  import dcdc_pkg::*;
#(
  parameter real T_CLK   = 10.0e-9,
  parameter real V_REF   = 1.8,
  parameter real L_H     = 2.2e-6,
  parameter real C_F     = 47.0e-6,
  parameter real I_LSB   = 0.016,
  parameter real TAU_DAC = 0.5e-6,
  parameter real R_SEG   = 0.15,
  parameter real ADC_LSB = 0.010,
  parameter real V_INIT  = 1.8
) (
  input  logic clk,
  input  seg_t p_on,
  input  seg_t n_on,
  input  logic dac_bit,
  input  logic adc_sample,
  input  real  i_load,
  input  real  v_in,
  output logic cmp_trip,
  output err_t e_out,
  output real  v_out,
  output real  i_l,
  output real  i_lim
);

  real v_sw, r_on;
  int  nseg;

  initial begin
    v_out    = V_INIT;
    i_l      = 0.0;
    i_lim    = 0.0;
    e_out    = '0;
    cmp_trip = 1'b0;
  end

  always @(posedge clk) begin
    real err;
    int  code;
    nseg = $countones(p_on | n_on);
    r_on = (nseg > 0) ? R_SEG / real'(nseg) : 0.0;
    if (p_on != '0)      v_sw = v_in - i_l * r_on;
    else if (n_on != '0) v_sw = -i_l * r_on;
    else if (i_l > 0.0)  v_sw = -0.7;
    else                 v_sw = v_out;              // discontinuous: no current
    i_l   = i_l + (v_sw - v_out) / L_H * T_CLK;
    if (p_on == '0 && n_on == '0 && i_l < 0.0) i_l = 0.0;
    v_out = v_out + (i_l - i_load) / C_F * T_CLK;
    i_lim = i_lim + ((dac_bit ? I_LSB * 256.0 : 0.0) - i_lim) * T_CLK / TAU_DAC;
    cmp_trip <= (i_l >= i_lim);
    if (adc_sample) begin
      err  = (V_REF - v_out) / ADC_LSB;
      code = $rtoi((err >= 0.0) ? err + 0.5 : err - 0.5);
      if (code > 7)  code = 7;
      if (code < -8) code = -8;
      e_out <= err_t'(code);
    end
  end

endmodule
