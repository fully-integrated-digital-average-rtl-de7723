// window_dl_adc: dual-channel 6-bit window delay-line ADC.
//
// Each conversion is started by trg, which fires the selected channel's
// one-shot timer and reference pulse together. The one-shot pulse (V_INV)
// shortens as the sampled signal rises; it is inverted and ANDed with the
// reference pulse, leaving a differential pulse as long as the reference pulse
// outlasts the one-shot pulse. That pulse runs into a 64-cell delay line; on its
// falling edge the status register captures the line as a thermometer code, and
// a 64-to-6 decoder turns the code into the result. The result is therefore
// (T_ref - T_pulse)/t_pd, clipped to 0..63: the difference between the sample
// and the reference, without a subtractor. One unit serves both channels: a mux
// picks the one-shot and reference pulse of the channel sel_i names, and a
// demux routes the result to v_code (output voltage) or i_code (inductor
// current). All of this follows the document. This design's own choices: the
// status register is cleared at trg (so a conversion in which no differential
// pulse appears reads 0), the result is published one cycle after the
// reference pulse falls, a 64-cell count saturates to 63 and raises sat.
// Interface: os_v/os_i one-shot pulses, ref_v/ref_i reference pulses, sel_i
// channel, trg start. Outputs v_code/v_valid, i_code/i_valid, sat (valid with
// the result). Conversion time: T_ref + 2 clocks after trg.
`timescale 1ns/1ps
module window_dl_adc
  import acm_pkg::*;
#(
  parameter int unsigned CELLS = ADC_CELLS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel_i,
  input  logic             trg,
  input  logic             os_v,
  input  logic             os_i,
  input  logic             ref_v,
  input  logic             ref_i,
  output logic [ADC_W-1:0] v_code,
  output logic             v_valid,
  output logic [ADC_W-1:0] i_code,
  output logic             i_valid,
  output logic             sat
);
  // Channel mux.
  logic os_sel, ref_sel;
  assign os_sel  = sel_i ? os_i  : os_v;
  assign ref_sel = sel_i ? ref_i : ref_v;

  // Differential pulse: reference pulse AND inverted one-shot output.
  logic diff;
  assign diff = ref_sel & ~os_sel;

  logic [CELLS:1] tap;
  delay_line #(.N(CELLS)) u_line (.clk(clk), .rst_n(rst_n), .din(diff), .tap(tap));

  // Status register, clocked by the falling edge of the differential pulse.
  logic [CELLS:1] status;
  logic           ref_q, chan_q, eoc_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
      ref_q  <= 1'b0;
      chan_q <= 1'b0;
      eoc_q  <= 1'b0;
    end else begin
      ref_q <= ref_sel;
      eoc_q <= ref_q & ~ref_sel;
      if (trg) begin
        status <= '0;
        chan_q <= sel_i;
      end else if (tap[1] && !diff) begin
        status <= tap;
      end
    end
  end

  // Error decoder 64 -> 6 bit: length of the run of set cells starting at the
  // line's input (cells further down may still hold an earlier pulse).
  logic [ADC_W:0] count;
  always_comb begin
    logic run;
    count = '0;
    run   = 1'b1;
    for (int unsigned k = 1; k <= CELLS; k++) begin
      run = run & status[k];
      if (run) count = (ADC_W+1)'(k);
    end
  end

  logic [ADC_W-1:0] code;
  logic             over;
  assign over = (count > (ADC_W+1)'((1 << ADC_W) - 1));
  assign code = over ? '1 : count[ADC_W-1:0];

  // Demux to the two channel registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_code <= '0; i_code <= '0; v_valid <= 1'b0; i_valid <= 1'b0; sat <= 1'b0;
    end else begin
      v_valid <= 1'b0;
      i_valid <= 1'b0;
      if (eoc_q) begin
        sat <= over;
        if (chan_q) begin i_code <= code; i_valid <= 1'b1; end
        else        begin v_code <= code; v_valid <= 1'b1; end
      end
    end
  end
endmodule
