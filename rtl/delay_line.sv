// delay_line: a string of N identical delay elements with every tap brought out.
//
// The document builds its ADC, DPWM and dead-time unit from strings of standard
// buffers, each delaying an edge by t_pd,DE. Here the clock period is t_pd,DE, so
// element k is a flip-flop and tap[k] is din delayed by exactly k periods.
// Interface: din in, tap[N:1] out. Timing: one element per clock; no enable.
// Reset clears the string (the real line is empty once its input has been low
// for N*t_pd).
`timescale 1ns/1ps
module delay_line #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         din,
  output logic [N:1]   tap
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tap <= '0;
    else        tap <= {tap[N-1:1], din};
  end
endmodule
