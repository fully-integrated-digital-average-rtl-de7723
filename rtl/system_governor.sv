// system_governor: sequences the work of one switching cycle.
//
// The switching period is cut into 16 (or, at 620 kHz, 32) intervals of one
// ring-oscillator period each; the DPWM's time base counts them. Starting at
// the programmable blanking time t_blank the governor runs, interval by
// interval:
//   t_blank                  : channel = voltage, trigger the one-shot and the
//                              reference pulse (t_conv_v begins)
//   + CONV                   : start the voltage PI (t_calc), v_c[n]
//   + 1                      : switch the channel mux to current (t_dead-zone)
//   + DZ                     : trigger the current sample (t_conv_i)
//   + CONV                   : start the current PI (t_calc), d[n]
//   last interval            : load d[n] into the DPWM (t_pwm)
// This order is the document's; the interval counts CONV = 2 and DZ = 2 are
// this design's (they fit the longest reference pulse and leave the default
// t_blank = 7 of 16 intervals). A t_blank that would push the current
// calculation into the last interval is clamped to the largest that fits.
// Interface: interval and ref_rise come from the DPWM and ring oscillator; the
// outputs are one-clock strobes issued on the clock after an interval begins
// (trg, pi_start with pi_loop, pwm_load), the level sel_i and the phase name.
`timescale 1ns/1ps
module system_governor
  import acm_pkg::*;
#(
  parameter int unsigned CONV = 2,
  parameter int unsigned DZ   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fsel,
  input  logic [INT_W-1:0] t_blank,
  input  logic [INT_W-1:0] interval,
  output logic             sel_i,
  output logic             trg,
  output logic             pi_start,
  output loop_e            pi_loop,
  output logic             pwm_load,
  output phase_e           phase
);
  localparam int unsigned SPAN = 2 * CONV + DZ + 2;  // t_blank .. calc_i

  logic [INT_W-1:0] last_int, tb_max, tb;
  always_comb begin
    last_int = fsel ? INT_W'(NINT_SLOW - 1) : INT_W'(NINT_FAST - 1);
    tb_max   = last_int - INT_W'(SPAN);
    tb       = (t_blank > tb_max) ? tb_max : t_blank;
  end

  logic [INT_W-1:0] k_conv_v, k_calc_v, k_dz, k_conv_i, k_calc_i;
  always_comb begin
    k_conv_v = tb;
    k_calc_v = tb + INT_W'(CONV);
    k_dz     = k_calc_v + 1'b1;
    k_conv_i = k_dz + INT_W'(DZ);
    k_calc_i = k_conv_i + INT_W'(CONV);
  end

  logic [INT_W-1:0] int_q;
  logic             started;
  logic             new_int;
  assign new_int = started && (interval != int_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_q    <= '0;
      started  <= 1'b0;
      sel_i    <= 1'b0;
      trg      <= 1'b0;
      pi_start <= 1'b0;
      pi_loop  <= LOOP_V;
      pwm_load <= 1'b0;
      phase    <= PH_WAIT;
    end else begin
      int_q    <= interval;
      started  <= 1'b1;
      trg      <= 1'b0;
      pi_start <= 1'b0;
      pwm_load <= 1'b0;
      if (new_int) begin
        if (interval == k_conv_v) begin
          sel_i <= 1'b0; trg <= 1'b1; phase <= PH_CONV_V;
        end else if (interval == k_calc_v) begin
          pi_start <= 1'b1; pi_loop <= LOOP_V; phase <= PH_CALC_V;
        end else if (interval == k_dz) begin
          sel_i <= 1'b1; phase <= PH_DEADZONE;
        end else if (interval == k_conv_i) begin
          trg <= 1'b1; phase <= PH_CONV_I;
        end else if (interval == k_calc_i) begin
          pi_start <= 1'b1; pi_loop <= LOOP_I; phase <= PH_CALC_I;
        end else if (interval == last_int) begin
          pwm_load <= 1'b1; phase <= PH_PWM;
        end else if (interval == '0) begin
          phase <= PH_BLANK;
        end else if (interval > k_calc_i) begin
          phase <= PH_WAIT;
        end
      end
    end
  end
endmodule
