// tb_one_shot_timer: triggers the one-shot model for a range of sample
// voltages and measures the output pulse against RC*ln(VDD/(v - VTH)),
// computed here from the formula; also checks that a larger sample gives a
// shorter pulse and that a sample at the threshold gives the maximum pulse.
`timescale 1ns/1ps
module tb_one_shot_timer;
  logic v_trg = 1'b0, v_inv;
  real  v_sample = 1.0;
  one_shot_timer #(.RC_NS(40.0), .VDD(5.0), .VTH(0.5), .TMAX_NS(200.0)) dut (.v_trg, .v_sample, .v_inv);

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

  task automatic shot(input real v, output real width);
    realtime t0;
    v_sample = v;
    #5 v_trg = 1'b1;
    t0 = $realtime;
    #1 v_trg = 1'b0;
    #0.001;
    check(v_inv === 1'b1, "pulse started");
    wait (v_inv == 1'b0);
    width = $realtime - t0;
    #5;
  endtask

  initial begin
    real w, prev, exp;
    prev = 1.0e9;
    for (int i = 0; i < 20; i++) begin
      real v;
      v = 0.7 + 0.2 * i;
      shot(v, w);
      exp = 40.0 * $ln(5.0 / (v - 0.5));
      if (exp < 0.0) exp = 0.0;
      check(w > exp - 0.01 && w < exp + 0.01, $sformatf("v=%f w=%f exp=%f", v, w, exp));
      check(w <= prev, "monotonic");
      prev = w;
    end
    shot(0.5, w);
    check(w > 199.99 && w < 200.01, "threshold gives maximum pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
