// acm_pkg: constants and types shared by the digital average-current-mode (ACM)
// controller.
//
// Time base. Every block is written in one clock domain whose period equals the
// propagation time of one delay element (t_pd,DE = 200 ps). An asynchronous
// delay line of N elements is therefore modelled as an N-stage shift register,
// which is cycle-for-cycle what the element string does to an edge. Sizes that
// follow the document: 6-bit window ADC built on a 64-cell line, 12-bit PI
// compensators, 12-bit hybrid DPWM (3 coarse bits from a 16-interval time base,
// 8 fine bits from a 256-cell line), 12-to-9-bit cast of v_c with a 3-bit
// reference pulse generator, 200-element dead-time line with an 8:1 tap mux.
// The register map, coefficient format and reset values are this design's own.
`timescale 1ns/1ps
package acm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DUTY_W      = 12;  // d[11:0]
  localparam int unsigned COARSE_W    = 3;   // d[10:8] at 16 intervals/period
  localparam int unsigned FINE_W      = 8;   // d[7:0]
  localparam int unsigned FINE_CELLS  = 256; // fine delay line length
  localparam int unsigned NINT_FAST   = 16;  // intervals per period, 1.25 MHz
  localparam int unsigned NINT_SLOW   = 32;  // intervals per period, 620 kHz
  localparam int unsigned INT_W       = 5;   // interval index width
  localparam int unsigned RING_HALF   = 128; // ring-oscillator half period, in t_pd
  localparam int unsigned ADC_W       = 6;   // window ADC resolution (k)
  localparam int unsigned ADC_CELLS   = 64;  // window ADC delay line
  localparam int unsigned VC_W        = 12;  // voltage compensator output
  localparam int unsigned VC_CAST_W   = 9;   // m: cast width of v_c
  localparam int unsigned REF_MSB_W   = VC_CAST_W - ADC_W; // m-k = 3
  localparam int unsigned DT_CELLS    = 200; // dead-time delay line
  localparam int unsigned PW_W        = 10;  // reference pulse width, in t_pd
  localparam int unsigned ERR_W       = 8;   // signed error word into the PI
  localparam int unsigned COEF_W      = 16;  // unsigned Q6.10 coefficient
  localparam int unsigned COEF_FRAC   = 10;

  // ------------------------------------------------------------- types
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic signed [ERR_W-1:0] err_t;

  typedef enum logic { LOOP_V = 1'b0, LOOP_I = 1'b1 } loop_e;

  typedef enum logic [2:0] {
    PH_BLANK, PH_CONV_V, PH_CALC_V, PH_DEADZONE,
    PH_CONV_I, PH_CALC_I, PH_WAIT, PH_PWM
  } phase_e;

  // Run-time configuration held by the serial interface.
  typedef struct packed {
    coef_t            a_v;       // voltage loop a (Q6.10)
    coef_t            b_v;       // voltage loop b
    coef_t            a_i;       // current loop a
    coef_t            b_i;       // current loop b
    logic [INT_W-1:0] t_blank;   // blanking time, in ring-oscillator intervals
    logic [2:0]       dt_sel;    // dead-time tap select
    logic [PW_W-1:0]  vref_w;    // voltage reference pulse width, in t_pd
    logic [PW_W-1:0]  iref_base; // current reference pulse width at MSBs = 0
    logic             fsel;      // 0: 16 intervals (1.25 MHz), 1: 32 (620 kHz)
    logic             iref_fixed; // 1: constant current window (no segmentation)
  } cfg_t;

  // Register addresses of the serial interface.
  localparam logic [6:0] REG_A_V = 7'd0, REG_B_V = 7'd1, REG_A_I = 7'd2,
                         REG_B_I = 7'd3, REG_TBLANK = 7'd4, REG_DTSEL = 7'd5,
                         REG_VREFW = 7'd6, REG_IREFB = 7'd7, REG_FSEL = 7'd8,
                         REG_IFIX = 7'd9;

  // Defaults: the coefficients of eq. (9) in Q6.10 (0.24, 0.2069, 39.27, 34.34).
  localparam coef_t A_V_DEF = 16'd40212;
  localparam coef_t B_V_DEF = 16'd35164;
  localparam coef_t A_I_DEF = 16'd246;
  localparam coef_t B_I_DEF = 16'd212;

  localparam cfg_t CFG_DEFAULT = '{
    a_v: A_V_DEF, b_v: B_V_DEF, a_i: A_I_DEF, b_i: B_I_DEF,
    t_blank: 5'd7, dt_sel: 3'd2, vref_w: 10'd320, iref_base: 10'd500,
    fsel: 1'b0, iref_fixed: 1'b0
  };

  // Dead-time tap positions (elements) for select 0..7: 1, 5, 10 .. 40 ns.
  function automatic int unsigned dt_tap(input logic [2:0] sel);
    case (sel)
      3'd0: return 5;
      3'd1: return 25;
      3'd2: return 50;
      3'd3: return 75;
      3'd4: return 100;
      3'd5: return 125;
      3'd6: return 150;
      default: return 200;
    endcase
  endfunction

endpackage
