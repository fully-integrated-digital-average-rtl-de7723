// current_ref_segmenter: 12-to-9-bit cast of the current reference v_c and the
// LSB offset of the segmented (adaptive) current reference.
//
// The voltage compensator's 12-bit output v_c is cast to m = 9 bits by dropping
// its three LSBs (a cast gain of 1/8). In the adaptive mode (fixed = 0) the
// 9-bit word is split: the m-k = 3 MSBs go to the reference pulse generator and
// select the current window; the k = 6 LSBs are subtracted from the window ADC's
// current code i_c, giving the current error i_e = i_c - v_c[5:0]. In steady
// state the ADC code equals the LSBs and i_e is zero. In the constant-window
// mode (fixed = 1) the window stays at segment 0 (msb = 0) and the whole cast
// reference, saturated to k = 6 bits (m-to-k casting), is the target:
// i_e = i_c - min(v_c_cast, 63). Both modes, the split and the subtraction
// follow the document; which bits the cast keeps, and saturation as the m-to-k
// cast, are this design's reading. Purely combinational.
`timescale 1ns/1ps
module current_ref_segmenter
  import acm_pkg::*;
(
  input  logic                 fixed,
  input  logic [VC_W-1:0]      vc,
  input  logic [ADC_W-1:0]     i_code,
  output logic [VC_CAST_W-1:0] vc_cast,
  output logic [REF_MSB_W-1:0] msb,
  output logic [ADC_W-1:0]     lsb,
  output err_t                 i_e
);
  logic [ADC_W-1:0] target;

  assign vc_cast = vc[VC_W-1 -: VC_CAST_W];
  assign msb     = fixed ? '0 : vc_cast[VC_CAST_W-1 -: REF_MSB_W];
  assign lsb     = vc_cast[ADC_W-1:0];

  always_comb begin
    if (!fixed)                             target = lsb;
    else if (vc_cast[VC_CAST_W-1:ADC_W] != '0) target = '1;
    else                                    target = lsb;
  end

  assign i_e = err_t'($signed({1'b0, i_code})) - err_t'($signed({1'b0, target}));
endmodule
