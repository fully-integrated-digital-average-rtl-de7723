// tb_dead_time: drives a random PWM-like signal (pulses and gaps of 1..600
// clocks) through the dead-time unit for each of the eight selections and
// compares hs/ls with a model built from the input history:
// hs = c & c(t-T), ls = !c & !c(t-T), with T = 5, 25, 50, 75, 100, 125, 150,
// 200 element delays. Also checks that hs and ls never overlap and that
// every selection produced both edges.
`timescale 1ns/1ps
module tb_dead_time;
  logic clk = 1'b0, rst_n = 1'b0, c = 1'b0;
  logic [2:0] sel = '0;
  logic hs, ls;
  always #0.1 clk = ~clk;

  dead_time dut (.clk, .rst_n, .c, .sel, .hs, .ls);

  int checks = 0, failures = 0;
  localparam int TAPS [8] = '{5, 25, 50, 75, 100, 125, 150, 200};
  logic hist [0:255];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, hs_rises;
    foreach (hist[i]) hist[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      hs_rises = 0;
      // let the line settle at c = 0 under the new selection
      c = 1'b0;
      repeat (210) begin
        @(posedge clk);
        for (int k = 255; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = c;
      end
      @(negedge clk);
      for (int p = 0; p < 12; p++) begin
        run = 1 + ($urandom % 600);
        if (p % 2 == 0) c = 1'b1; else c = 1'b0;
        repeat (run) begin
          // hist[k-1] holds c as sampled k posedges ago
          #0.01;
          checks++;
          if (hs !== (c & hist[TAPS[s]-1]) || ls !== (!c & !hist[TAPS[s]-1]) || (hs && ls)) begin
            failures++;
            if (failures < 6) $display("FAIL sel=%0d c=%b hs=%b ls=%b t=%0t", s, c, hs, ls, $time);
          end
          if (hs && !(c & hist[TAPS[s]])) hs_rises++;
          @(posedge clk);
          for (int k = 255; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = c;
          @(negedge clk);
        end
      end
      checks++;
      if (hs_rises == 0) begin failures++; $display("FAIL sel=%0d no hs edge", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
