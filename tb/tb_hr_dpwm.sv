// tb_hr_dpwm: loads duty commands and measures the PWM output over whole
// switching periods. At fsel = 0 the period must be 16 reference periods
// (4096 element delays) and the ON time exactly d element delays (D = d/4096),
// for commands below and above one half; at fsel = 1 the period is 8192 and the
// ON time {d, d_x}. Commands are loaded in the last interval, as the governor
// does, and measured one full period later.
`timescale 1ns/1ps
module tb_hr_dpwm;
  import acm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ref_rise = 1'b0, fsel = 1'b0, load = 1'b0, d_x = 1'b0;
  logic [11:0] d = '0;
  logic c, dcc0, period_start;
  logic [4:0] interval;
  always #0.1 clk = ~clk;

  hr_dpwm dut (.clk, .rst_n, .ref_rise, .fsel, .d, .d_x, .load, .c, .dcc0, .interval, .period_start);

  // reference-clock strobe every 256 clocks
  int tick = 0;
  always @(posedge clk) begin
    tick <= (tick == 255) ? 0 : tick + 1;
    ref_rise <= (tick == 255);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input logic fs, input logic [11:0] dv, input logic dxv);
    int on, len, exp_on, exp_len;
    logic [4:0] last;
    last = fs ? 5'd31 : 5'd15;
    fsel = fs;
    // load in the last interval
    do @(negedge clk); while (interval != last);
    d = dv; d_x = dxv; load = 1'b1;
    @(negedge clk) load = 1'b0;
    // skip to the second period start, then measure one period
    do @(negedge clk); while (!period_start);
    do @(negedge clk); while (!period_start);
    on = 0; len = 0;
    do begin
      if (c) on++;
      len++;
      @(negedge clk);
    end while (!period_start);
    exp_len = fs ? 8192 : 4096;
    exp_on  = fs ? int'({dv, dxv}) : int'(dv);
    check(len == exp_len, $sformatf("period %0d exp %0d", len, exp_len));
    check(on == exp_on, $sformatf("fsel=%0d d=%0d dx=%0d on=%0d exp %0d", fs, dv, dxv, on, exp_on));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(1'b0, 12'd0, 1'b0);
    run_case(1'b0, 12'd640, 1'b0);     // 15.6 %  ("001010000000")
    run_case(1'b0, 12'd2688, 1'b0);    // 65.6 %  ("101010000000")
    run_case(1'b0, 12'd512, 1'b0);     // 12.5 %
    run_case(1'b0, 12'd2048, 1'b0);
    run_case(1'b0, 12'd1, 1'b0);
    run_case(1'b0, 12'd4095, 1'b0);
    for (int i = 0; i < 6; i++) run_case(1'b0, 12'($urandom), 1'b0);
    run_case(1'b1, 12'd640, 1'b1);
    run_case(1'b1, 12'd2688, 1'b0);
    run_case(1'b1, 12'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
