// dead_time: programmable dead time between the high-side and low-side drives.
//
// The PWM signal c runs through a 200-element delay line; an 8:1 mux picks one
// of eight taps as c_d. The high-side drive is on only while both c and c_d are
// high, the low-side drive only while both are low, so each turn-on waits for
// the selected delay after the other switch turned off and the two never
// overlap. The document gives the 200 elements, the 8-channel mux and the
// 1..40 ns range; the tap positions (5, 25, 50, 75, 100, 125, 150, 200
// elements = 1, 5, 10, 15, 20, 25, 30, 40 ns at 200 ps) are this design's
// choice. Interface: c in, sel[2:0] from the configuration, hs/ls out
// (combinational from registered signals). Timing: hs rises and ls rises
// dt_tap(sel) clock cycles after the opposite edge of c.
`timescale 1ns/1ps
module dead_time
  import acm_pkg::*;
#(
  parameter int unsigned CELLS = DT_CELLS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       c,
  input  logic [2:0] sel,
  output logic       hs,
  output logic       ls
);
  logic [CELLS:1] tap;
  delay_line #(.N(CELLS)) u_line (.clk(clk), .rst_n(rst_n), .din(c), .tap(tap));

  logic c_d;
  int unsigned idx;
  always_comb begin
    idx = dt_tap(sel);
    if (idx > CELLS) idx = CELLS;
    c_d = tap[idx];
  end

  assign hs = c & c_d;
  assign ls = ~(c | c_d);

  // The two drives must never be on together.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(hs && ls));
endmodule
