// hr_dpwm: hybrid high-resolution digital PWM (coarse counter + fine delay line).
//
// Three parts, as in the document:
//  * Coarse delay module. A divide-by-N counter on the ring-oscillator reference
//    gives the time base DCC_0 (50 % square wave whose period is the switching
//    period) and the interval index. A delayed clock chain gives DCC_k, DCC_0
//    delayed by k reference periods; a mux picks DLY_Coarse = DCC_{coarse}.
//  * Fine delay module. DLY_Coarse runs through a 256-cell delay line; a 256:1
//    mux picks tap d[7:0] as DLY_Fine.
//  * Combination logic. d[11] = 0: c = DCC_0 & ~DLY_Fine (D < 0.5);
//    d[11] = 1: c = DCC_0 | DLY_Fine (D >= 0.5, the first half cycle is padded).
// Hence the ON time is d[10:0] element delays (plus half a period if d[11]) and
// D = d/4096. With fsel = 0 there are 16 intervals per period, the coarse mux
// uses DCC_0..DCC_7 (d[10:8]) and the period is 4096 t_pd (1.22 MHz at 200 ps).
// With fsel = 1 the period has 32 intervals, the mux uses 16 taps, and the
// extra LSB d_x extends the command to 13 bits ({d, d_x}/8192): the same element
// delay gives one more bit at half the frequency. Widening the mux to 16:1 for
// that mode is this design's reading; the document shows the 8:1 mux of the
// 12-bit mode.
// Interface: ref_rise is the reference clock-enable strobe; load captures
// {d, d_x} (the governor asserts it in the last interval, t_pwm). Outputs c
// (registered, one t_pd behind DCC_0), dcc0, interval (index in the period) and
// period_start (one-cycle strobe when interval 0 begins).
`timescale 1ns/1ps
module hr_dpwm
  import acm_pkg::*;
#(
  parameter int unsigned FINE_N = FINE_CELLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_rise,
  input  logic              fsel,
  input  logic [DUTY_W-1:0] d,
  input  logic              d_x,
  input  logic              load,
  output logic              c,
  output logic              dcc0,
  output logic [INT_W-1:0]  interval,
  output logic              period_start
);
  localparam int unsigned NCHAIN = NINT_SLOW / 2;  // 16 delayed copies max

  // ---------------------------------------------------------- duty register
  logic [DUTY_W-1:0] d_q;
  logic              dx_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    begin d_q <= '0; dx_q <= 1'b0; end
    else if (load) begin d_q <= d;  dx_q <= d_x;  end
  end

  logic       pad;
  logic [3:0] coarse;
  logic [7:0] fine;
  always_comb begin
    pad = d_q[DUTY_W-1];
    if (!fsel) begin
      coarse = {1'b0, d_q[10:8]};
      fine   = d_q[7:0];
    end else begin
      coarse = d_q[10:7];
      fine   = {d_q[6:0], dx_q};
    end
  end

  // ------------------------------------------------- coarse delay module
  logic [INT_W-1:0] last_int;
  assign last_int = fsel ? INT_W'(NINT_SLOW - 1) : INT_W'(NINT_FAST - 1);

  logic [INT_W-1:0] half_int;
  assign half_int = fsel ? INT_W'(NINT_SLOW / 2) : INT_W'(NINT_FAST / 2);

  logic [INT_W-1:0] int_next;
  assign int_next = (interval >= last_int) ? '0 : interval + 1'b1;

  logic [NCHAIN-1:1] dcc_chain;   // DCC_1 .. DCC_15
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      interval     <= last_int;
      dcc0         <= 1'b0;
      dcc_chain    <= '0;
      period_start <= 1'b0;
    end else begin
      period_start <= 1'b0;
      if (ref_rise) begin
        interval     <= int_next;
        dcc0         <= (int_next < half_int);
        dcc_chain    <= {dcc_chain[NCHAIN-2:1], dcc0};
        period_start <= (int_next == '0);
      end
    end
  end

  logic dly_coarse;
  always_comb begin
    if (coarse == 4'd0) dly_coarse = dcc0;
    else                dly_coarse = dcc_chain[coarse];
  end

  // --------------------------------------------------- fine delay module
  logic [FINE_N:1] fine_tap;
  delay_line #(.N(FINE_N)) u_fine (
    .clk(clk), .rst_n(rst_n), .din(dly_coarse), .tap(fine_tap)
  );

  logic dly_fine;
  always_comb begin
    if (fine == 8'd0) dly_fine = dly_coarse;
    else              dly_fine = fine_tap[fine];
  end

  // --------------------------------------------- combination logic module
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   c <= 1'b0;
    else if (pad) c <= dcc0 | dly_fine;
    else          c <= dcc0 & ~dly_fine;
  end
endmodule
