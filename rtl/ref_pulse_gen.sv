// ref_pulse_gen: reference pulses for the window ADC.
//
// Voltage channel: a pulse of fixed, programmable width vref_w sets the centre
// of the voltage window (V_ref). Current channel: the 3-bit segmented reference
// pulse generator. Its pulse width follows the three MSBs of the cast current
// reference v_c[8:6]: iref_base - 64*msb element delays. One MSB step equals the
// 64-cell span of the ADC, so each step moves the current window by exactly its
// own width and the six LSBs of v_c can finish the job digitally. A larger
// current gives a shorter one-shot pulse, hence the pulse shortens as the MSBs
// grow. The document names the generator and its 3-bit input; the counter used
// here, the width formula and the base width register are this design's.
// Interface: trg starts a pulse on the channel sel_i names; ref_v and ref_i are
// high from the clock after trg for the programmed number of clocks.
`timescale 1ns/1ps
module ref_pulse_gen
  import acm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trg,
  input  logic                 sel_i,
  input  logic [PW_W-1:0]      vref_w,
  input  logic [PW_W-1:0]      iref_base,
  input  logic [REF_MSB_W-1:0] msb,
  output logic                 ref_v,
  output logic                 ref_i
);
  localparam int unsigned SEG = ADC_CELLS;   // ticks per MSB step

  logic [PW_W-1:0] i_width;
  always_comb begin
    logic [PW_W:0] step;
    step = (PW_W+1)'(msb) * (PW_W+1)'(SEG);
    if ({1'b0, iref_base} > step) i_width = iref_base - step[PW_W-1:0];
    else                          i_width = '0;
  end

  logic [PW_W-1:0] cnt;
  logic            chan;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      chan <= 1'b0;
    end else if (trg) begin
      cnt  <= sel_i ? i_width : vref_w;
      chan <= sel_i;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end
  end

  assign ref_v = (cnt != '0) && !chan;
  assign ref_i = (cnt != '0) &&  chan;
endmodule
