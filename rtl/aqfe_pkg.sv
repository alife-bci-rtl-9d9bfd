// aqfe_pkg: widths and types shared by the blocks of the AQFE (adaptive
// quality feature extractor), a hardware piecewise-linear continuous wavelet
// transform (PLCWT).
//
// Fixed word widths follow the datapath of the architecture: 8-bit input
// samples, 24-bit second antiderivative words in the Integ RAM and 32-bit
// words in the Output RAM. The sparse coefficient word layout and the
// reduction-unit operation codes are choices of this design.
package aqfe_pkg;

  localparam int unsigned IN_W  = 8;   // input sample width
  localparam int unsigned X2_W  = 24;  // Integ RAM word width per lane
  localparam int unsigned OUT_W = 32;  // Output RAM word width per lane

  // Operation tags the control unit hands to the reduction unit. Each tag is
  // issued in the same cycle as the RAM read it belongs to; the unit applies
  // it one cycle later, when the read data arrives.
  typedef enum logic [2:0] {
    RU_NONE = 3'd0,  // nothing
    RU_LOAD = 3'd1,  // acc <= Output RAM word (end-border product)
    RU_ADDB = 3'd2,  // acc <= acc + Output RAM word (start-border product)
    RU_INTA = 3'd3,  // first X2 word of a symmetric pair is captured
    RU_INTB = 3'd4   // second X2 word: product b * (X2a +/- X2b) is formed
  } ru_op_e;

  // Saturate a wide signed value to X2_W bits.
  function automatic logic signed [X2_W-1:0] sat_x2(input logic signed [39:0] v);
    logic signed [39:0] hi, lo;
    hi = 40'sd1 <<< (X2_W - 1);
    lo = -hi;
    hi = hi - 40'sd1;
    if (v > hi)      return hi[X2_W-1:0];
    else if (v < lo) return lo[X2_W-1:0];
    else             return v[X2_W-1:0];
  endfunction

endpackage
