// tb_window_dl_adc: plays the one-shot and reference pulses of random widths
// into both channels and checks the result: code = clamp(T_ref - T_pulse, 0,
// 63) in element delays, sat set when the difference reaches 64, the result
// routed to the channel that was selected and the other left untouched, and
// the result valid two clocks after the reference pulse ends.
`timescale 1ns/1ps
module tb_window_dl_adc;
  logic clk = 1'b0, rst_n = 1'b0, sel_i = 1'b0, trg = 1'b0;
  logic os_v = 1'b0, os_i = 1'b0, ref_v = 1'b0, ref_i = 1'b0;
  logic [5:0] v_code, i_code;
  logic v_valid, i_valid, sat;
  always #0.1 clk = ~clk;

  window_dl_adc dut (.clk, .rst_n, .sel_i, .trg, .os_v, .os_i, .ref_v, .ref_i,
                     .v_code, .v_valid, .i_code, .i_valid, .sat);

  int checks = 0, failures = 0, n_sat = 0, n_zero = 0;
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

  task automatic convert(input logic ch, input int w_os, input int w_ref);
    int exp, lat;
    logic [5:0] other;
    other = ch ? v_code : i_code;
    @(negedge clk);
    sel_i = ch; trg = 1'b1;
    @(negedge clk);
    trg = 1'b0;
    lat = 1;
    for (int t = 0; t < w_ref + 10; t++) begin
      if (ch) begin os_i = (t < w_os); ref_i = (t < w_ref); end
      else    begin os_v = (t < w_os); ref_v = (t < w_ref); end
      if (v_valid || i_valid) break;
      @(negedge clk);
      lat++;
    end
    exp = w_ref - w_os;
    if (exp < 0) exp = 0;
    check(ch ? i_valid : v_valid, "valid on the selected channel");
    check(!(ch ? v_valid : i_valid), "no valid on the other channel");
    check(lat == w_ref + 3, $sformatf("latency %0d exp %0d", lat, w_ref + 3));
    check((ch ? i_code : v_code) == 6'(exp > 63 ? 63 : exp),
          $sformatf("ch=%0d os=%0d ref=%0d code=%0d exp=%0d", ch, w_os, w_ref, ch ? i_code : v_code, exp));
    check(sat == (exp >= 64), "saturation flag");
    check((ch ? v_code : i_code) == other, "other channel kept");
    if (exp >= 64) n_sat++;
    if (exp == 0) n_zero++;
    os_v = 0; os_i = 0; ref_v = 0; ref_i = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    convert(1'b0, 100, 132);   // mid window
    convert(1'b1, 50, 50);     // zero difference
    convert(1'b1, 60, 40);     // one-shot longer: no differential pulse
    convert(1'b0, 10, 200);    // over range
    convert(1'b0, 20, 83);     // 63
    convert(1'b1, 20, 84);     // 64 -> saturates
    for (int i = 0; i < 200; i++) begin
      w = 20 + $urandom % 400;
      convert(1'($urandom), w, w - 10 + $urandom % 90);
    end
    check(n_sat > 0 && n_zero > 0, "saturation and empty conversions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
