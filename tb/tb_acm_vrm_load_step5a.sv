// tb_acm_vrm_load_step5a: closed-loop run of the whole controller with the
// larger filter of the wide-range load test (L = 1.5 uH, C_out = 300 uF,
// 12 V to 1.5 V) and 5 A load steps, 3 A to 8 A and back.
//
// The top runs at its default parameters. The current-sense gain of the plant
// model is lowered to 0.35 V/A so that 0..9 A maps onto the eight segments of
// the adaptive current window (one-shot pulses of about 52..563 element
// delays); the serial port loads loop coefficients matched to these gains.
// Sequence: start-up to 3 A, step to 8 A, step back to 3 A. For each step the
// testbench records the peak deviation of v_out from 1.5 V and the time until
// v_out stays within 20 mV, and checks steady-state regulation (within 40 mV,
// mean inductor current equal to the load, period 4096 element delays), a
// peak deviation below 200 mV and recovery within 150 us. Counts the window
// moves (reference MSB changes) across the wide current range and fails if
// there were none, or if the drives ever overlapped.
`timescale 1ns/1ps
module tb_acm_vrm_load_step5a;
  import acm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0;
  logic miso, hs, ls, c, adc_sat, period_start;
  logic [11:0] vc, d;
  logic [5:0] v_code, i_code;
  logic [2:0] ref_msb;
  phase_e phase;
  real v_sense, i_sense, v_out, i_l, r_load;
  always #0.1 clk = ~clk;

  acm_vrm_top dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .v_sense, .i_sense,
                   .hs, .ls, .c, .vc, .d, .v_code, .i_code, .ref_msb, .adc_sat,
                   .period_start, .phase);

  buck_plant_model #(.L(1.5e-6), .C(300.0e-6), .K_I(0.35), .I_OFS(0.95)) plant (
    .clk, .hs, .ls, .r_load, .v_out, .i_l, .v_sense, .i_sense);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_move = 0, n_overlap = 0;
  logic [2:0] msb_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (ref_msb != msb_q) n_move++;
    msb_q <= ref_msb;
    if (hs && ls) n_overlap++;
  end

  task automatic spi_write(input logic [6:0] a, input logic [15:0] wd);
    logic [23:0] f;
    f = {1'b0, a, wd};
    cs_n = 1'b0;
    #2;
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i];
      #2 sclk = 1'b1;
      #2 sclk = 1'b0;
    end
    #2 cs_n = 1'b1;
    #4;
  endtask

  // Runs n periods. Records min/max of v_out and mean i_L over the last m
  // periods, the peak deviation from 1.5 V over all n, and the end of the last
  // period in which v_out left the +-20 mV band.
  real vmin, vmax, isum, peak, t_start, t_last_out;
  int  icnt, plen_min, plen_max;
  task automatic run(input int n, input int m);
    int p, len;
    vmin = 1.0e9; vmax = -1.0e9; isum = 0.0; icnt = 0; peak = 0.0;
    plen_min = 1 << 30; plen_max = 0;
    t_start = $realtime; t_last_out = $realtime;
    p = 0;
    do @(posedge clk); while (!period_start);
    while (p < n) begin
      len = 0;
      do begin
        @(posedge clk);
        len++;
        if (v_out - 1.5 > peak)  peak = v_out - 1.5;
        if (1.5 - v_out > peak)  peak = 1.5 - v_out;
        if (v_out > 1.52 || v_out < 1.48) t_last_out = $realtime;
        if (p >= n - m) begin
          if (v_out < vmin) vmin = v_out;
          if (v_out > vmax) vmax = v_out;
          isum += i_l; icnt++;
        end
      end while (!period_start);
      if (p >= n - m) begin
        if (len < plen_min) plen_min = len;
        if (len > plen_max) plen_max = len;
      end
      if (p % 50 == 0)
        $display("  period %0d: v_out %.4f i_L %.3f vc %0d d %0d v_code %0d i_code %0d msb %0d",
                 p, v_out, i_l, vc, d, v_code, i_code, ref_msb);
      p++;
    end
  endtask

  task automatic regulated(input string what, input real iload);
    real imean;
    imean = isum / icnt;
    $display("%s: v_out %.4f .. %.4f V, i_L mean %.3f A, period %0d..%0d, vc=%0d d=%0d msb=%0d",
             what, vmin, vmax, imean, plen_min, plen_max, vc, d, ref_msb);
    check(vmin > 1.46 && vmax < 1.54, {what, ": output within 40 mV of 1.5 V"});
    check(imean > iload - 0.2 && imean < iload + 0.2, {what, ": mean inductor current"});
    check(plen_min == 4096 && plen_max == 4096, {what, ": switching period"});
  endtask

  task automatic transient(input string what);
    real t_rec;
    t_rec = (t_last_out - t_start) / 1000.0;
    $display("%s: peak deviation %.1f mV, back within 20 mV after %.1f us",
             what, peak * 1000.0, t_rec);
    check(peak < 0.200, {what, ": peak deviation below 200 mV"});
    check(t_rec < 150.0, {what, ": recovery within 150 us"});
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_load = 0.5;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    spi_write(REG_A_V, 16'd40212);
    spi_write(REG_B_V, 16'd39000);
    spi_write(REG_A_I, 16'd4700);
    spi_write(REG_B_I, 16'd3760);
    run(800, 60);
    regulated("3 A", 3.0);
    r_load = 1.5 / 8.0;
    run(400, 60);
    transient("3 A -> 8 A");
    regulated("8 A", 8.0);
    r_load = 0.5;
    run(400, 60);
    transient("8 A -> 3 A");
    regulated("3 A again", 3.0);
    check(n_move > 0, "current window moved");
    check(n_overlap == 0, "no drive overlap");
    $display("events: move=%0d", n_move);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
