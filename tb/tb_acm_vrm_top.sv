// tb_acm_vrm_top: closed-loop test of the whole controller on a buck converter
// model (12 V to 1.5 V, L = 2.2 uH, C = 50 uF), with the top at its default
// parameters.
//
// Sequence: reset; the serial port loads loop coefficients matched to this
// testbench's sensing gains (the stand-alone defaults suit other gains); start-up
// from 0 V; regulation at 1.5 A; a 1.5 A load step up to 3 A and back (the
// current window must move: the reference-pulse MSBs change); a switch to the
// 620 kHz mode (32 intervals, 13-bit duty) and a new dead time over the serial
// port, with regulation there too; finally back at 1.25 MHz the constant
// current window mode (no segmentation), with the window base placed from the
// present operating point, and a small load step 1.5 A to 1.8 A that stays
// inside the fixed 64-element window. Checks: the output voltage settles within
// 40 mV of 1.5 V in every phase, the mean inductor current matches the load,
// the switching period is 4096 / 8192 element delays, and the high-side and
// low-side drives never overlap and always leave a gap. Counts how often each
// mechanism happened (voltage and current samples, PI updates, DPWM loads,
// window moves, ADC saturation, dead-time gaps, both switching frequencies,
// constant-window periods)
// and fails any that never did.
`timescale 1ns/1ps
module tb_acm_vrm_top;
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

  buck_plant_model plant (.clk, .hs, .ls, .r_load, .v_out, .i_l, .v_sense, .i_sense);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------ event counters
  int n_vs = 0, n_is = 0, n_piv = 0, n_pii = 0, n_load = 0, n_move = 0,
      n_sat = 0, n_gap = 0, n_fast = 0, n_slow = 0, n_overlap = 0, n_fixed = 0;
  logic [2:0] msb_q = '0;
  logic hs_q = 1'b0, ls_q = 1'b0;
  phase_e ph_q = PH_WAIT;
  logic sat_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (phase != ph_q) begin
      case (phase)
        PH_CONV_V: n_vs++;
        PH_CONV_I: n_is++;
        PH_CALC_V: n_piv++;
        PH_CALC_I: n_pii++;
        PH_PWM:    n_load++;
        default: ;
      endcase
    end
    ph_q <= phase;
    if (adc_sat && !sat_q) n_sat++;
    sat_q <= adc_sat;
    if (ref_msb != msb_q) n_move++;
    msb_q <= ref_msb;
    if (hs && ls) n_overlap++;
    if (!hs && !ls && (hs_q || ls_q)) n_gap++;
    hs_q <= hs; ls_q <= ls;
  end

  // ------------------------------------------------------ serial port
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

  // ------------------------------------------------------ measurement
  // Runs n periods; over the last m of them records min/max of v_out, the mean
  // inductor current and the period length.
  real vmin, vmax, isum;
  int  fixed_base = 0;
  int  icnt, plen_min, plen_max;
  task automatic run(input int n, input int m);
    int p, len;
    vmin = 1.0e9; vmax = -1.0e9; isum = 0.0; icnt = 0;
    plen_min = 1 << 30; plen_max = 0;
    p = 0;
    do @(posedge clk); while (!period_start);
    while (p < n) begin
      len = 0;
      do begin
        @(posedge clk);
        len++;
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
      if (len == 8192) n_slow++;
      if (len == 4096) n_fast++;
      if (fixed_base > 0) n_fixed++;
      if (p % 25 == 0)
        $display("  period %0d: v_out %.4f i_L %.3f vc %0d d %0d v_code %0d i_code %0d msb %0d",
                 p, v_out, i_l, vc, d, v_code, i_code, ref_msb);
      p++;
    end
  endtask

  task automatic regulated(input string what, input real iload, input int period);
    real imean;
    imean = isum / icnt;
    $display("%s: v_out %.4f .. %.4f V, i_L mean %.3f A, period %0d..%0d, vc=%0d d=%0d msb=%0d",
             what, vmin, vmax, imean, plen_min, plen_max, vc, d, ref_msb);
    check(vmin > 1.46 && vmax < 1.54, {what, ": output within 40 mV of 1.5 V"});
    check(imean > iload - 0.15 && imean < iload + 0.15, {what, ": mean inductor current"});
    check(plen_min == period && plen_max == period, {what, ": switching period"});
  endtask

  initial begin
    #8000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_load = 1.0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // coefficients for this testbench's sensing gains (Q6.10)
    spi_write(REG_A_V, 16'd16384);   // 16.0
    spi_write(REG_B_V, 16'd15892);   // 15.52
    spi_write(REG_A_I, 16'd2816);    // 2.75
    spi_write(REG_B_I, 16'd2253);    // 2.2
    // start-up and regulation at 1.5 A
    run(400, 60);
    regulated("1.5 A", 1.5, 4096);
    // load step 1.5 A -> 3 A
    r_load = 0.5;
    run(300, 60);
    regulated("3 A", 3.0, 4096);
    // back to 1.5 A
    r_load = 1.0;
    run(300, 60);
    regulated("1.5 A again", 1.5, 4096);
    // 620 kHz mode and a longer dead time
    spi_write(REG_FSEL, 16'd1);
    spi_write(REG_DTSEL, 16'd5);
    run(200, 60);
    regulated("620 kHz", 1.5, 8192);
    // constant current window (no segmentation) at 1.25 MHz: the window is
    // placed so that the present 1.5 A sample reads about code 10, leaving room
    // for a 0.3 A load step up to 1.8 A inside the fixed 64-element span.
    spi_write(REG_FSEL, 16'd0);
    run(100, 10);
    fixed_base = 500 - 64 * int'(ref_msb) - int'(i_code) + 10;
    $display("constant window: base width %0d", fixed_base);
    spi_write(REG_IREFB, 16'(fixed_base));
    spi_write(REG_IFIX, 16'd1);
    run(300, 60);
    regulated("constant window 1.5 A", 1.5, 4096);
    check(ref_msb == 3'd0, "constant window keeps the reference MSBs at 0");
    r_load = 1.5 / 1.8;
    run(300, 60);
    regulated("constant window 1.8 A", 1.8, 4096);
    check(n_fixed > 0, "constant-window periods");
    check(n_vs > 0, "voltage samples");
    check(n_is > 0, "current samples");
    check(n_piv > 0 && n_pii > 0, "PI updates of both loops");
    check(n_load > 0, "DPWM loads");
    check(n_move > 0, "current window moved (reference MSBs changed)");
    check(n_sat > 0, "ADC window saturated");
    check(n_gap > 0, "dead-time gaps");
    check(n_overlap == 0, "no drive overlap");
    check(n_slow > 0 && n_fast > 0, "both switching frequencies");
    $display("events: vsample=%0d isample=%0d piv=%0d pii=%0d load=%0d move=%0d sat=%0d gap=%0d fast=%0d slow=%0d fixed=%0d",
             n_vs, n_is, n_piv, n_pii, n_load, n_move, n_sat, n_gap, n_fast, n_slow, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
