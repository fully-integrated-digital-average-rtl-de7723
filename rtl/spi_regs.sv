// spi_regs: serial configuration interface with a small preprogrammed register
// file.
//
// On reset the registers hold the defaults of acm_pkg::CFG_DEFAULT (the PI
// coefficients of eq. (9), blanking time, dead time, reference pulse widths,
// switching frequency), so the controller runs stand-alone; the serial port can
// read or overwrite them at start-up. The document calls this a custom SPI with
// a small volatile memory and lists what it holds; the frame format, register
// map and reset values are this design's.
// Frame (SPI mode 0, MSB first, cs_n low for exactly 24 sclk cycles):
//   bit 23 = 1 read / 0 write, bits 22:16 register address, bits 15:0 data.
// A write takes effect when cs_n rises after 24 bits. On a read, miso returns
// the register's 16 bits, MSB first, shifted on the falling sclk edges after the
// address. sclk, cs_n and mosi are synchronised to clk (two flip-flops each), so
// sclk must stay below clk/4.
// Registers: 0 a_v, 1 b_v, 2 a_i, 3 b_i (Q6.10), 4 t_blank, 5 dead-time select,
// 6 voltage reference pulse width, 7 current reference base width, 8 fsel,
// 9 constant-window current loop (1) or segmented adaptive window (0, reset).
`timescale 1ns/1ps
module spi_regs
  import acm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso,
  output cfg_t cfg
);
  // ------------------------------------------------------- synchronisers
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end
  logic sclk_rise, sclk_fall, cs_active, cs_rise;
  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign cs_active = ~cs_s[1];
  assign cs_rise   = cs_s[1] & ~cs_s[2];

  // ------------------------------------------------------- register read
  function automatic logic [15:0] rd(input cfg_t r, input logic [6:0] a);
    case (a)
      REG_A_V:    return r.a_v;
      REG_B_V:    return r.b_v;
      REG_A_I:    return r.a_i;
      REG_B_I:    return r.b_i;
      REG_TBLANK: return 16'(r.t_blank);
      REG_DTSEL:  return 16'(r.dt_sel);
      REG_VREFW:  return 16'(r.vref_w);
      REG_IREFB:  return 16'(r.iref_base);
      REG_FSEL:   return 16'(r.fsel);
      REG_IFIX:   return 16'(r.iref_fixed);
      default:    return 16'h0000;
    endcase
  endfunction

  // ------------------------------------------------------- frame engine
  logic [23:0] sh;
  logic [4:0]  nbits;
  logic [15:0] out_sh;
  logic        rd_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      nbits  <= '0;
      out_sh <= '0;
      rd_mode <= 1'b0;
      miso   <= 1'b0;
      cfg    <= CFG_DEFAULT;
    end else begin
      if (!cs_active) begin
        nbits   <= '0;
        rd_mode <= 1'b0;
        miso  <= 1'b0;
      end else begin
        if (sclk_rise) begin
          sh <= {sh[22:0], mosi_s[1]};
          if (nbits != 5'd31) nbits <= nbits + 1'b1;
          if (nbits == 5'd7) begin              // address complete with this bit
            out_sh  <= rd(cfg, {sh[5:0], mosi_s[1]});
            rd_mode <= sh[6];
          end
        end
        if (sclk_fall && nbits >= 5'd8 && nbits < 5'd24 && rd_mode) begin
          miso   <= out_sh[15];
          out_sh <= {out_sh[14:0], 1'b0};
        end
      end
      if (cs_rise && nbits == 5'd24 && !sh[23]) begin
        case (sh[22:16])
          REG_A_V:    cfg.a_v       <= sh[15:0];
          REG_B_V:    cfg.b_v       <= sh[15:0];
          REG_A_I:    cfg.a_i       <= sh[15:0];
          REG_B_I:    cfg.b_i       <= sh[15:0];
          REG_TBLANK: cfg.t_blank   <= sh[INT_W-1:0];
          REG_DTSEL:  cfg.dt_sel    <= sh[2:0];
          REG_VREFW:  cfg.vref_w    <= sh[PW_W-1:0];
          REG_IREFB:  cfg.iref_base <= sh[PW_W-1:0];
          REG_FSEL:   cfg.fsel      <= sh[0];
          REG_IFIX:   cfg.iref_fixed <= sh[0];
          default: ;
        endcase
      end
    end
  end
endmodule
