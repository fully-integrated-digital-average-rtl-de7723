// buck_plant_model: behavioural model of the synchronous buck power stage and
// its output filter, with the sensing front end, for closed-loop testbenches.
//
// Integrates the inductor current and capacitor voltage once per clock (the
// clock period dt is 0.2 ns). Switch node: VIN while hs is on, 0 while ls is
// on, and during dead time the body diode of the off switch carries the
// current (-0.7 V for positive current, VIN + 0.7 V for negative). Load is a
// resistor r_load (input, ohms). Sensing: v_sense = K_V*v_out (output divider),
// i_sense = I_OFS + K_I*i_L (sense resistor and difference amplifier).
`timescale 1ns/1ps
module buck_plant_model #(
  parameter real VIN   = 12.0,
  parameter real L     = 2.2e-6,
  parameter real C     = 50.0e-6,
  parameter real RDCR  = 0.010,
  parameter real RESR  = 0.002,
  parameter real RON   = 0.035,
  parameter real DT    = 0.2e-9,
  parameter real K_V   = 1.1231,
  parameter real K_I   = 0.86,
  parameter real I_OFS = 0.91
) (
  input  logic clk,
  input  logic hs,
  input  logic ls,
  input  real  r_load,
  output real  v_out,
  output real  i_l,
  output real  v_sense,
  output real  i_sense
);
  real v_c = 0.0;
  initial begin v_out = 0.0; i_l = 0.0; end

  always @(posedge clk) begin
    real v_sw, i_o, di, dv;
    if (hs)                v_sw = VIN - i_l * RON;
    else if (ls)           v_sw = -i_l * RON;
    else if (i_l > 0.0)    v_sw = -0.7;
    else if (i_l < 0.0)    v_sw = VIN + 0.7;
    else                   v_sw = v_out;
    i_o = v_out / r_load;
    di  = (v_sw - v_out - i_l * RDCR) / L * DT;
    dv  = (i_l - i_o) / C * DT;
    i_l = i_l + di;
    v_c = v_c + dv;
    v_out = v_c + (i_l - i_o) * RESR;
  end

  assign v_sense = K_V * v_out;
  assign i_sense = I_OFS + K_I * i_l;
endmodule
