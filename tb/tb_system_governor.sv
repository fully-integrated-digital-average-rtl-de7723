// tb_system_governor: steps the interval index through whole periods and
// checks the schedule of one switching cycle: voltage trigger at t_blank,
// voltage PI start CONV = 2 intervals later, channel switch one interval after
// that, current trigger DZ = 2 intervals later, current PI start 2 intervals
// later and the DPWM load in the last interval; the channel select must be
// voltage at the voltage trigger and current at the current trigger. Covers
// several t_blank values, the clamp of a too-large t_blank, and the
// 32-interval mode.
`timescale 1ns/1ps
module tb_system_governor;
  import acm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, fsel = 1'b0;
  logic [4:0] t_blank = 5'd7, interval = '0;
  logic sel_i, trg, pi_start, pwm_load;
  loop_e pi_loop;
  phase_e phase;
  always #0.1 clk = ~clk;

  system_governor dut (.clk, .rst_n, .fsel, .t_blank, .interval, .sel_i, .trg,
                       .pi_start, .pi_loop, .pwm_load, .phase);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one period; each interval lasts 8 clocks; record where each event fired
  task automatic period(input logic fs, input int tbl);
    int n, tbe;
    int at_trg_v, at_trg_i, at_pv, at_pi, at_pwm, at_dz;
    at_trg_v = -1; at_trg_i = -1; at_pv = -1; at_pi = -1; at_pwm = -1; at_dz = -1;
    fsel = fs; t_blank = 5'(tbl);
    n = fs ? 32 : 16;
    for (int k = 0; k < n; k++) begin
      @(negedge clk) interval = 5'(k);
      repeat (8) begin
        @(negedge clk);
        if (trg && !sel_i) at_trg_v = k;
        if (trg && sel_i)  at_trg_i = k;
        if (pi_start && pi_loop == LOOP_V) at_pv = k;
        if (pi_start && pi_loop == LOOP_I) at_pi = k;
        if (pwm_load) at_pwm = k;
        if (phase == PH_DEADZONE && at_dz < 0) at_dz = k;
      end
    end
    tbe = (tbl > n - 1 - 8) ? n - 1 - 8 : tbl;
    check(at_trg_v == tbe,     $sformatf("trg_v at %0d exp %0d", at_trg_v, tbe));
    check(at_pv    == tbe + 2, $sformatf("pi_v at %0d", at_pv));
    check(at_dz    == tbe + 3, $sformatf("dead-zone at %0d", at_dz));
    check(at_trg_i == tbe + 5, $sformatf("trg_i at %0d", at_trg_i));
    check(at_pi    == tbe + 7, $sformatf("pi_i at %0d", at_pi));
    check(at_pwm   == n - 1,   $sformatf("pwm at %0d", at_pwm));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    period(1'b0, 7);     // one period to get in step
    period(1'b0, 7);
    period(1'b0, 3);
    period(1'b0, 0);
    period(1'b0, 12);    // clamped to 7
    period(1'b1, 12);
    period(1'b1, 23);
    period(1'b1, 30);    // clamped to 23
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
