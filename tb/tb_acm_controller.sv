// tb_acm_controller: open-loop integration test of the controller. The two
// one-shot models are fed constant sample voltages, so every cycle converts the
// same voltage and current while the voltage loop winds up. Each switching
// cycle the testbench checks: the triggers fire in intervals t_blank and
// t_blank + 5 (defaults); the ADC codes are within one count of the value
// predicted from the one-shot formula and the reference pulse widths
// (320 and 500 - 64*msb element delays); v_c and d follow an integer model of
// both PI loops fed with those codes (voltage error = code - 32, current error
// = code - v_c[5:0] of the cast reference); and the PWM ON time of the next
// cycle equals the loaded d. Coefficients are the stand-alone defaults.
`timescale 1ns/1ps
module tb_acm_controller;
  import acm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic miso, trg_v, trg_i, os_v, os_i, hs, ls, c, adc_sat, period_start;
  logic [11:0] vc, d;
  logic [5:0] v_code, i_code;
  logic [2:0] ref_msb;
  phase_e phase;
  real vs = 1.55, is = 1.6;
  always #0.1 clk = ~clk;

  acm_controller dut (.clk, .rst_n, .sclk(1'b0), .cs_n(1'b1), .mosi(1'b0), .miso,
                      .trg_v, .trg_i, .os_v, .os_i, .hs, .ls, .c, .vc, .d, .v_code,
                      .i_code, .ref_msb, .adc_sat, .period_start, .phase);
  one_shot_timer u_osv (.v_trg(trg_v), .v_sample(vs), .v_inv(os_v));
  one_shot_timer u_osi (.v_trg(trg_i), .v_sample(is), .v_inv(os_i));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // trigger positions
  // (interval = clocks since the period started / 256)
  int trgv_int = -1, trgi_int = -1, msb_at_i = 0, since = 0;
  always @(posedge clk) begin
    since = period_start ? 0 : since + 1;
    if (trg_v) trgv_int = since / 256;
    if (trg_i) begin trgi_int = since / 256; msb_at_i = int'(ref_msb); end
  end

  function automatic int ticks(input real v);
    return int'($ceil(40.0 * $ln(5.0 / (v - 0.5)) / 0.2));
  endfunction

  initial begin
    longint uv, ui, epv, epi, e;
    int on, exp_v, exp_i, d_prev, lsb, moves, msb_prev;
    uv = 0; ui = 0; epv = 0; epi = 0; d_prev = 0; moves = 0; msb_prev = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    do @(negedge clk); while (!period_start);
    for (int p = 0; p < 60; p++) begin
      // one period: measure ON time
      on = 0;
      do begin
        if (c) on++;
        @(negedge clk);
      end while (!period_start);
      if (p > 0) check(on == d_prev, $sformatf("p%0d ON time %0d exp %0d", p, on, d_prev));
      check(trgv_int == 7 && trgi_int == 12, $sformatf("trigger intervals %0d %0d", trgv_int, trgi_int));
      // ADC codes against the one-shot formula
      exp_v = 320 - ticks(vs);
      exp_i = 500 - 64 * msb_at_i - ticks(is);
      exp_v = exp_v < 0 ? 0 : (exp_v > 63 ? 63 : exp_v);
      exp_i = exp_i < 0 ? 0 : (exp_i > 63 ? 63 : exp_i);
      check(int'(v_code) >= exp_v - 1 && int'(v_code) <= exp_v + 1, $sformatf("v_code %0d exp %0d", v_code, exp_v));
      check(int'(i_code) >= exp_i - 1 && int'(i_code) <= exp_i + 1, $sformatf("i_code %0d exp %0d (msb %0d)", i_code, exp_i, msb_at_i));
      // PI model
      e  = -(longint'(v_code) - 32);
      uv = uv + longint'(A_V_DEF) * e - longint'(B_V_DEF) * epv;
      uv = uv < 0 ? 0 : (uv > 4194303 ? 4194303 : uv);
      epv = e;
      lsb = int'((uv >> 13) & 63);
      e  = -(longint'(i_code) - lsb);
      ui = ui + longint'(A_I_DEF) * e - longint'(B_I_DEF) * epi;
      ui = ui < 0 ? 0 : (ui > 4194303 ? 4194303 : ui);
      epi = e;
      check(vc == 12'(uv >> 10), $sformatf("p%0d vc %0d exp %0d", p, vc, uv >> 10));
      check(d == 12'(ui >> 10), $sformatf("p%0d d %0d exp %0d", p, d, ui >> 10));
      d_prev = int'(d);
      if (msb_at_i != msb_prev) moves++;
      msb_prev = msb_at_i;
      // change the current sample now and then
      if (p == 20) is = 2.2;
      if (p == 40) is = 0.95;
    end
    check(moves > 0, "current window moved");
    check(d_prev > 0, "duty nonzero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
