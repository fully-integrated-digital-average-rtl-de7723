// tb_current_ref_segmenter: checks the cast and split of v_c and the current
// error for corner and random values in both modes. Adaptive (fixed = 0):
// v_c/8 = {msb, lsb}, i_e = i_code - lsb. Constant window (fixed = 1): msb = 0,
// i_e = i_code - min(v_c/8, 63). Expected values are computed with integer
// arithmetic in the testbench.
`timescale 1ns/1ps
module tb_current_ref_segmenter;
  import acm_pkg::*;
  logic        fixed;
  logic [11:0] vc;
  logic [5:0]  i_code;
  logic [8:0]  vc_cast;
  logic [2:0]  msb;
  logic [5:0]  lsb;
  err_t        i_e;

  current_ref_segmenter dut (.fixed, .vc, .i_code, .vc_cast, .msb, .lsb, .i_e);

  int checks = 0, failures = 0;
  initial begin
    int v, ic, ecast, emsb, etgt;
    for (int n = 0; n < 4000; n++) begin
      case (n % 2000)
        0: begin v = 0;    ic = 0;  end
        1: begin v = 4095; ic = 0;  end
        2: begin v = 0;    ic = 63; end
        3: begin v = 4095; ic = 63; end
        4: begin v = 511;  ic = 10; end
        5: begin v = 512;  ic = 10; end
        default: begin v = $urandom % 4096; ic = $urandom % 64; end
      endcase
      fixed = (n >= 2000);
      vc = 12'(v); i_code = 6'(ic);
      #1;
      ecast = v / 8;
      emsb  = fixed ? 0 : ecast / 64;
      etgt  = fixed ? ((ecast > 63) ? 63 : ecast) : ecast % 64;
      checks++;
      if (vc_cast != 9'(ecast) || msb != 3'(emsb) || lsb != 6'(ecast % 64)
          || int'(i_e) != ic - etgt) begin
        failures++;
        if (failures < 5)
          $display("FAIL fixed=%0d vc=%0d ic=%0d -> %0d %0d %0d %0d", fixed, v, ic, vc_cast, msb, lsb, i_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
