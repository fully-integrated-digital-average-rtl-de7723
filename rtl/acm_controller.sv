// acm_controller: the digital average-current-mode controller of the VRM.
//
// Two loops run once per switching cycle on shared hardware. The outer voltage
// loop samples the output voltage through the window ADC against a fixed
// reference pulse and its PI compensator produces the current reference v_c.
// The inner current loop samples the inductor current through the same ADC; the
// window follows v_c: the three MSBs of the cast v_c set the reference pulse,
// the six LSBs are subtracted from the ADC code to give the current error, and
// the current PI produces the duty command d. The hybrid DPWM turns d into the
// PWM signal c, and the dead-time unit splits c into high-side and low-side
// drive signals. The system governor orders sampling, calculation and PWM
// update within the cycle; the serial interface holds the configuration.
// Wiring follows the controller's block diagram. Interface: clk is the
// delay-element time base (t_pd = 200 ps); the one-shot timers are outside (they
// need the analog sample and an RC network): trg_v/trg_i fire them, os_v/os_i
// return their pulses. Outputs hs/ls go to the gate drivers; the remaining
// outputs expose internal values for observation. Some status outputs of the
// sub-blocks stay unconnected on purpose (ADC valid strobes, PI busy/done, the
// DPWM's dcc0, the raw ring clock, the cast v_c and its LSBs): the governor's
// fixed schedule leaves every conversion and calculation more than enough
// time, so nothing here waits on them; they remain for test and reuse.
`timescale 1ns/1ps
module acm_controller
  import acm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // serial interface
  input  logic                 sclk,
  input  logic                 cs_n,
  input  logic                 mosi,
  output logic                 miso,
  // one-shot timers
  output logic                 trg_v,
  output logic                 trg_i,
  input  logic                 os_v,
  input  logic                 os_i,
  // gate drive
  output logic                 hs,
  output logic                 ls,
  // observation
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
  cfg_t cfg;
  spi_regs u_spi (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .cfg);

  // ---------------------------------------------------------- time base
  logic ref_clk, ref_rise;
  ring_oscillator #(.HALF(RING_HALF)) u_ring (
    .clk, .rst_n, .en(1'b1), .ref_clk, .ref_rise
  );

  logic [INT_W-1:0] interval;
  logic             dcc0, pwm_load, d_x;
  hr_dpwm u_dpwm (
    .clk, .rst_n, .ref_rise, .fsel(cfg.fsel), .d, .d_x, .load(pwm_load),
    .c, .dcc0, .interval, .period_start
  );

  logic   sel_i, trg, pi_start;
  loop_e  pi_loop;
  system_governor u_gov (
    .clk, .rst_n, .fsel(cfg.fsel), .t_blank(cfg.t_blank), .interval,
    .sel_i, .trg, .pi_start, .pi_loop, .pwm_load, .phase
  );

  // The reference pulse starts on the clock after trg; the one-shot trigger is
  // registered so that both pulses start together.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trg_v <= 1'b0;
      trg_i <= 1'b0;
    end else begin
      trg_v <= trg & ~sel_i;
      trg_i <= trg &  sel_i;
    end
  end

  // ------------------------------------------------------------- sensing
  logic [VC_CAST_W-1:0] vc_cast;
  logic [ADC_W-1:0]     lsb;
  err_t                 i_e;
  current_ref_segmenter u_seg (
    .fixed(cfg.iref_fixed), .vc, .i_code, .vc_cast, .msb(ref_msb), .lsb, .i_e
  );

  logic ref_v, ref_i;
  ref_pulse_gen u_ref (
    .clk, .rst_n, .trg, .sel_i, .vref_w(cfg.vref_w), .iref_base(cfg.iref_base),
    .msb(ref_msb), .ref_v, .ref_i
  );

  logic v_valid, i_valid;
  window_dl_adc u_adc (
    .clk, .rst_n, .sel_i, .trg, .os_v, .os_i, .ref_v, .ref_i,
    .v_code, .v_valid, .i_code, .i_valid, .sat(adc_sat)
  );

  // Voltage error: the voltage window is centred on code 2^(k-1).
  err_t v_x;
  assign v_x = err_t'($signed({1'b0, v_code})) - err_t'(1 << (ADC_W - 1));

  // ------------------------------------------------------- compensators
  logic pi_busy, pi_done;
  pi_compensator u_pi (
    .clk, .rst_n, .start(pi_start), .loop(pi_loop),
    .x((pi_loop == LOOP_V) ? v_x : i_e),
    .a_v(cfg.a_v), .b_v(cfg.b_v), .a_i(cfg.a_i), .b_i(cfg.b_i),
    .vc, .d, .d_x, .busy(pi_busy), .done(pi_done)
  );

  // ------------------------------------------------------------ dead time
  dead_time u_dt (.clk, .rst_n, .c, .sel(cfg.dt_sel), .hs, .ls);
endmodule
