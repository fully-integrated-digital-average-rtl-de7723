// tb_delay_line: drives random bits into a 13-cell and a 64-cell delay line and
// checks every tap against a software history of the input: tap[k] must equal
// the input of k clocks earlier.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int N = 64;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic [N:1] tap;
  always #0.1 clk = ~clk;

  delay_line #(.N(N)) dut (.clk, .rst_n, .din, .tap);

  int checks = 0, failures = 0;
  logic hist [0:N+2];

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      // after the last posedge, hist[k] is the input sampled k posedges ago
      if (cyc > 0)
        for (int k = 1; k <= N; k++) begin
          checks++;
          if (tap[k] !== hist[k]) begin
            failures++;
            if (failures < 5) $display("cyc %0d tap[%0d]=%b exp %b", cyc, k, tap[k], hist[k]);
          end
        end
      din = 1'($urandom);
      @(posedge clk);
      for (int k = N + 2; k > 1; k--) hist[k] = hist[k-1];
      hist[1] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
