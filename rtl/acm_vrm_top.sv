// acm_vrm_top: the digital side of the fully integrated VRM: the ACM controller
// together with the two one-shot timers that convert the sensed output voltage
// and inductor current into pulse lengths for the window ADC.
//
// The power stage (LDMOS switches, gate drivers with bootstrap, high-side level
// shifter) and the external filter, sense resistor and amplifier are analog and
// are not modelled here; their interface is brought out: hs/ls are the gate
// drive commands, v_sense is the divided output voltage K_V*v_out and i_sense the
// amplified current-sense voltage, both in volts, as they reach the one-shots.
// The one-shot parameters are those of an external RC network and are set here
// as parameters (RC time constant in ns, logic and threshold voltages).
// Timing: clk has the period of one delay element (200 ps).
`timescale 1ns/1ps
module acm_vrm_top
  import acm_pkg::*;
#(
  parameter real OS_V_RC_NS = 40.0,
  parameter real OS_I_RC_NS = 40.0,
  parameter real OS_VDD     = 5.0,
  parameter real OS_VTH     = 0.5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sclk,
  input  logic                 cs_n,
  input  logic                 mosi,
  output logic                 miso,
  input  real                  v_sense,
  input  real                  i_sense,
  output logic                 hs,
  output logic                 ls,
  output logic                 c,
  output logic [VC_W-1:0]      vc,
  output logic [DUTY_W-1:0]    d,
  output logic [ADC_W-1:0]     v_code,
  output logic [ADC_W-1:0]     i_code,
  output logic [REF_MSB_W-1:0] ref_msb,
  output logic                 adc_sat,
  output logic                 period_start,
  output phase_e               phase
);
  logic trg_v, trg_i, os_v, os_i;

  one_shot_timer #(.RC_NS(OS_V_RC_NS), .VDD(OS_VDD), .VTH(OS_VTH)) u_os_v (
    .v_trg(trg_v), .v_sample(v_sense), .v_inv(os_v)
  );
  one_shot_timer #(.RC_NS(OS_I_RC_NS), .VDD(OS_VDD), .VTH(OS_VTH)) u_os_i (
    .v_trg(trg_i), .v_sample(i_sense), .v_inv(os_i)
  );

  acm_controller u_ctrl (
    .clk, .rst_n, .sclk, .cs_n, .mosi, .miso,
    .trg_v, .trg_i, .os_v, .os_i, .hs, .ls,
    .c, .vc, .d, .v_code, .i_code, .ref_msb, .adc_sat, .period_start, .phase
  );
endmodule
