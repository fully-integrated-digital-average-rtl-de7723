// tb_ref_pulse_gen: triggers the voltage and current reference pulses with
// random settings and measures their widths: vref_w for the voltage channel,
// iref_base - 64*msb (0 if negative) for the current channel, starting one
// clock after the trigger, and only on the selected channel.
`timescale 1ns/1ps
module tb_ref_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0, trg = 1'b0, sel_i = 1'b0;
  logic [9:0] vref_w = '0, iref_base = '0;
  logic [2:0] msb = '0;
  logic ref_v, ref_i;
  always #0.1 clk = ~clk;

  ref_pulse_gen dut (.clk, .rst_n, .trg, .sel_i, .vref_w, .iref_base, .msb, .ref_v, .ref_i);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input logic ch);
    int w, exp, other;
    @(negedge clk);
    sel_i = ch; trg = 1'b1;
    @(negedge clk);
    trg = 1'b0;
    w = 0; other = 0;
    for (int t = 0; t < 1100; t++) begin
      if (ch ? ref_i : ref_v) w++;
      if (ch ? ref_v : ref_i) other++;
      if (t > 0 && !(ch ? ref_i : ref_v)) break;
      @(negedge clk);
    end
    exp = ch ? int'(iref_base) - 64 * int'(msb) : int'(vref_w);
    if (exp < 0) exp = 0;
    check(w == exp, $sformatf("ch=%0d width %0d exp %0d", ch, w, exp));
    check(other == 0, "other channel quiet");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    vref_w = 10'd320; pulse(1'b0);
    iref_base = 10'd500;
    for (int m = 0; m < 8; m++) begin msb = 3'(m); pulse(1'b1); end
    iref_base = 10'd300; msb = 3'd7; pulse(1'b1);     // clipped to 0
    for (int i = 0; i < 30; i++) begin
      vref_w = 10'($urandom); iref_base = 10'($urandom); msb = 3'($urandom);
      pulse(1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
