// dct_pkg: constants and types shared by the 8-point DCT modules.
//
// The 5-multiplier butterfly uses four distinct multiplier constants, named
// m1..m4 after the multiplier labels M1..M4 of the butterfly diagram:
//   m1 = cos(4*pi/16)                  = 0.70710678
//   m2 = cos(6*pi/16)                  = 0.38268343
//   m3 = cos(2*pi/16) - cos(6*pi/16)   = 0.54119610
//   m4 = cos(2*pi/16) + cos(6*pi/16)   = 1.30656296
// These values belong to the Arai-Agui-Nakajima flow graph that the
// butterfly follows; the diagram shows only the labels. Each constant is
// stored as an unsigned fixed-point integer with FRAC fraction bits, rounded
// to nearest by coef_int().
package dct_pkg;

  // Number of points of the transform.
  localparam int unsigned NPTS = 8;

  // Default sample width (signed) and constant fraction width.
  localparam int unsigned DEF_IN_W = 8;
  localparam int unsigned DEF_FRAC = 12;

  // The four multiplier constants.
  typedef enum logic [1:0] {
    M1 = 2'd0,
    M2 = 2'd1,
    M3 = 2'd2,
    M4 = 2'd3
  } mconst_e;

  localparam real M1_R = 0.7071067811865476;
  localparam real M2_R = 0.3826834323650898;
  localparam real M3_R = 0.5411961001461970;
  localparam real M4_R = 1.3065629648763766;

  // Constant 'sel' scaled by 2**frac and rounded to the nearest integer.
  function automatic int unsigned coef_int(mconst_e sel, int unsigned frac);
    real r;
    case (sel)
      M1:      r = M1_R;
      M2:      r = M2_R;
      M3:      r = M3_R;
      default: r = M4_R;
    endcase
    return int'($rtoi(r * (2.0 ** frac) + 0.5));
  endfunction

endpackage
