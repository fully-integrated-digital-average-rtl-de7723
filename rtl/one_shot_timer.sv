// one_shot_timer: behavioural model of the voltage-to-time converter that feeds
// the window ADC. Not synthesizable logic: the real part is a NOR gate and an
// inverter on chip with an external RC network, biased by the sampled analog
// signal.
//
// A rising edge on v_trg starts a pulse on v_inv whose length is
//   T_pulse = RC * ln(VDD / (v_sample - VTH))          (eq. (10))
// so a larger sample gives a shorter pulse. The model evaluates that formula at
// the trigger edge, holds v_inv high for T_pulse and then releases it; the pulse
// is clipped to [0, TMAX_NS]. A sample at or below VTH saturates to TMAX_NS.
// Ports: v_trg (logic), v_sample (real, volts), v_inv (logic). Parameters:
// RC_NS in nanoseconds, VDD and VTH in volts. Time unit 1 ns.
`timescale 1ns/1ps
module one_shot_timer #(
  parameter real RC_NS   = 40.0,
  parameter real VDD     = 5.0,
  parameter real VTH     = 0.5,
  parameter real TMAX_NS = 200.0
) (
  input  logic v_trg,
  input  real  v_sample,
  output logic v_inv
);
  real t_pulse;

  function automatic real pulse_len(input real vs);
    real t;
    if (vs - VTH <= 0.0) return TMAX_NS;
    t = RC_NS * $ln(VDD / (vs - VTH));
    if (t < 0.0)     t = 0.0;
    if (t > TMAX_NS) t = TMAX_NS;
    return t;
  endfunction

  initial v_inv = 1'b0;

  always @(posedge v_trg) begin
    t_pulse = pulse_len(v_sample);
    v_inv   = 1'b1;
    #(t_pulse) v_inv = 1'b0;
  end
endmodule
