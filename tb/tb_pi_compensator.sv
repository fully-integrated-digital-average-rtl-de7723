// tb_pi_compensator: runs interleaved voltage and current updates with random
// errors and compares both loops' outputs with an integer model of
// u[n] = u[n-1] + a*e[n] - b*e[n-1] (e = -x, Q6.10 coefficients, state clamped
// to [0, 4096) with 10 fractional bits). Uses the coefficients of eq. (9) and
// random ones, drives both clamps, and checks that each update completes in 4
// clocks (0.8 ns, inside the 40 ns calculation budget) and that the loop not
// being updated keeps its state.
`timescale 1ns/1ps
module tb_pi_compensator;
  import acm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  loop_e loop = LOOP_V;
  err_t x = '0;
  coef_t a_v = A_V_DEF, b_v = B_V_DEF, a_i = A_I_DEF, b_i = B_I_DEF;
  logic [11:0] vc, d;
  logic d_x, busy, done;
  always #0.1 clk = ~clk;

  pi_compensator dut (.clk, .rst_n, .start, .loop, .x, .a_v, .b_v, .a_i, .b_i,
                      .vc, .d, .d_x, .busy, .done);

  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  longint mu [2];
  longint mep [2];
  localparam longint UMAX = (longint'(1) << 22) - 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(input loop_e l, input int xv);
    longint e, a, b, u;
    int lat;
    @(negedge clk);
    loop = l; x = err_t'(xv); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
    check(lat == 4, $sformatf("latency %0d", lat));
    e = -longint'(xv);
    a = (l == LOOP_V) ? longint'(a_v) : longint'(a_i);
    b = (l == LOOP_V) ? longint'(b_v) : longint'(b_i);
    u = mu[l] + a * e - b * mep[l];
    if (u < 0) begin u = 0; n_lo++; end
    if (u > UMAX) begin u = UMAX; n_hi++; end
    mu[l] = u; mep[l] = e;
    check(vc == 12'(mu[0] >> 10), $sformatf("vc %0d exp %0d", vc, mu[0] >> 10));
    check(d == 12'(mu[1] >> 10), $sformatf("d %0d exp %0d", d, mu[1] >> 10));
    check(d_x == mu[1][9], "d_x");
  endtask

  initial begin
    mu[0] = 0; mu[1] = 0; mep[0] = 0; mep[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // eq. (9) coefficients, voltage below target: v_c must rise
    for (int i = 0; i < 20; i++) begin update(LOOP_V, -5); update(LOOP_I, -20); end
    check(vc > 0 && d > 0, "outputs rise for negative measured error");
    for (int i = 0; i < 200; i++) begin update(LOOP_V, -32); update(LOOP_I, -63); end
    for (int i = 0; i < 300; i++) update(LOOP_V, 32);
    for (int i = 0; i < 400; i++) begin
      update(LOOP_V, int'($urandom % 65) - 32);
      update(LOOP_I, int'($urandom % 127) - 63);
    end
    a_v = coef_t'($urandom); b_v = coef_t'($urandom); a_i = coef_t'($urandom); b_i = coef_t'($urandom);
    for (int i = 0; i < 200; i++) update(loop_e'($urandom % 2), int'($urandom % 256) - 128);
    check(n_hi > 0 && n_lo > 0, "both clamps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
