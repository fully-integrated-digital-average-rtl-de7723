// tb_ring_oscillator: checks that the reference clock has a period of 2*HALF
// element delays with 50 % duty, that ref_rise marks each rising edge, and that
// en = 0 stops the ring.
`timescale 1ns/1ps
module tb_ring_oscillator;
  localparam int HALF = 128;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic ref_clk, ref_rise;
  always #0.1 clk = ~clk;

  ring_oscillator #(.HALF(HALF)) dut (.clk, .rst_n, .en, .ref_clk, .ref_rise);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, last_rise, highs, rises;
    logic prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) en = 1'b1;
    last_rise = -1; highs = 0; rises = 0; prev = ref_clk;
    for (t = 0; t < 20 * HALF; t++) begin
      @(negedge clk);
      if (ref_clk && !prev) begin
        check(ref_rise === 1'b1, "ref_rise with rising edge");
        if (last_rise >= 0) check(t - last_rise == 2 * HALF, $sformatf("period %0d", t - last_rise));
        last_rise = t;
        rises++;
      end else begin
        check(ref_rise === 1'b0, "no ref_rise without edge");
      end
      if (last_rise >= 0 && ref_clk) highs++;
      prev = ref_clk;
    end
    check(rises >= 9, "enough periods");
    // duty: count high cycles over the whole periods observed
    check(highs >= (rises - 1) * HALF && highs <= rises * HALF, $sformatf("duty highs=%0d", highs));
    // stop
    @(negedge clk) en = 1'b0;
    prev = ref_clk;
    for (t = 0; t < 4 * HALF; t++) begin
      @(negedge clk);
      check(ref_clk === prev && ref_rise === 1'b0, "stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
