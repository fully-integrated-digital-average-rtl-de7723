// ring_oscillator: the controller's internal reference clock.
//
// A ring of HALF delay elements closed through an inverter oscillates with a
// period of 2*HALF element delays. In the t_pd,DE time base this is a Johnson
// ring: a shift register of HALF stages fed back inverted. With HALF = 128 the
// period is 256 t_pd = 51.2 ns, i.e. 16 periods per 1.25 MHz switching cycle as
// the timing diagram of the controller requires (each coarse DPWM step is one
// reference period and the fine line spans 256 elements). The document gives the
// oscillator's role and frequency, not its insides; the ring length is derived
// from those numbers. Outputs: ref_clk (50 % square wave) and ref_rise, a
// one-cycle strobe on each rising edge used as a clock enable by the time base.
// en = 0 stops the ring.
`timescale 1ns/1ps
module ring_oscillator #(
  parameter int unsigned HALF = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic ref_clk,
  output logic ref_rise
);
  logic [HALF-1:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ring <= '0;
    else if (en) ring <= {ring[HALF-2:0], ~ring[HALF-1]};
  end

  assign ref_clk = ring[HALF-1];

  // ring[HALF-2] is what ring[HALF-1] becomes on the next clock: strobe the
  // cycle in which the output is about to rise.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_rise <= 1'b0;
    else        ref_rise <= en && ring[HALF-2] && !ring[HALF-1];
  end
endmodule
