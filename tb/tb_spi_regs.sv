// tb_spi_regs: checks the reset defaults (coefficients of eq. (9) in Q6.10 and
// the other configuration fields), then writes every register through the
// serial port with random data, reads each back over MISO and compares both
// the read data and the configuration outputs. Also checks that an aborted
// frame (cs_n raised early) changes nothing.
`timescale 1ns/1ps
module tb_spi_regs;
  import acm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0;
  logic miso;
  cfg_t cfg;
  always #0.1 clk = ~clk;

  spi_regs dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .cfg);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real HALF = 2.0;   // sclk half period, ns (20 clk periods)

  task automatic frame(input logic rw, input logic [6:0] a, input logic [15:0] wd,
                       output logic [15:0] rdata, input int nbits = 24);
    logic [23:0] f;
    f = {rw, a, wd};
    rdata = '0;
    cs_n = 1'b0;
    #(HALF);
    for (int i = 23; i >= 24 - nbits; i--) begin
      mosi = f[i];
      #(HALF) sclk = 1'b1;
      if (i < 16) rdata = {rdata[14:0], miso};
      #(HALF) sclk = 1'b0;
    end
    #(HALF) cs_n = 1'b1;
    #(HALF * 2);
  endtask

  function automatic logic [15:0] field(input cfg_t c, input int a);
    case (a)
      0: return c.a_v;  1: return c.b_v;  2: return c.a_i;  3: return c.b_i;
      4: return 16'(c.t_blank); 5: return 16'(c.dt_sel);
      6: return 16'(c.vref_w);  7: return 16'(c.iref_base);
      8: return 16'(c.fsel);
      default: return 16'(c.iref_fixed);
    endcase
  endfunction

  localparam int NREG = 10;
  localparam int WIDTHS [NREG] = '{16, 16, 16, 16, 5, 3, 10, 10, 1, 1};

  initial begin
    logic [15:0] rd, wd [NREG];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(cfg.a_v == 16'd40212 && cfg.b_v == 16'd35164 && cfg.a_i == 16'd246 && cfg.b_i == 16'd212,
          "default coefficients");
    check(cfg.t_blank == 5'd7 && cfg.fsel == 1'b0 && cfg.iref_fixed == 1'b0, "default timing and mode");
    for (int a = 0; a < NREG; a++) begin
      frame(1'b1, 7'(a), 16'h0, rd);
      check(rd == field(cfg, a), $sformatf("read default reg %0d = %h", a, rd));
    end
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < NREG; a++) begin
        wd[a] = 16'($urandom) & 16'((1 << WIDTHS[a]) - 1);
        frame(1'b0, 7'(a), wd[a], rd);
        check(field(cfg, a) == wd[a], $sformatf("write reg %0d", a));
      end
    for (int a = 0; a < NREG; a++) begin
      frame(1'b1, 7'(a), 16'h0, rd);
      check(rd == wd[a], $sformatf("read back reg %0d = %h exp %h", a, rd, wd[a]));
    end
    frame(1'b0, 7'd0, ~wd[0], rd, 20);       // aborted write
    check(cfg.a_v == wd[0], "aborted frame ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
