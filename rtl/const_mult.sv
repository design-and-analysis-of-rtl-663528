// const_mult: multiplies a signed integer sample by one of the fixed
// butterfly constants m1..m4 (see dct_pkg) and rounds the product back to an
// integer.
//
// The constant is held as an unsigned integer K = round(m * 2**FRAC). The
// product a*K is formed at full width, 2**(FRAC-1) is added and the sum is
// shifted right arithmetically by FRAC, so the result is a*m rounded to the
// nearest integer (ties toward +infinity). The circuit is purely
// combinational: one multiplier by a constant and one adder, no clock.
//
// Ports:
//   a  signed [DW-1:0]  sample
//   p  signed [DW-1:0]  round(a * m)
// The caller sizes DW so that |a * m| fits; every constant is below 1.31.
//
// The butterfly diagram names the four multipliers only; the constant
// values, the fixed-point format and the rounding are this design's choice.
module const_mult
  import dct_pkg::*;
#(
  parameter int unsigned DW   = DEF_IN_W + 4,
  parameter int unsigned FRAC = DEF_FRAC,
  parameter mconst_e     SEL  = M1
) (
  input  logic signed [DW-1:0] a,
  output logic signed [DW-1:0] p
);

  localparam int unsigned K    = coef_int(SEL, FRAC);
  // K < 2**(FRAC+1), so a signed copy of it needs FRAC+2 bits.
  localparam int unsigned PW   = DW + FRAC + 2;

  logic signed [FRAC+1:0] k_s;
  logic signed [PW-1:0]   prod;
  logic signed [PW-1:0]   prod_rnd;

  assign k_s = (FRAC + 2)'(K);

  always_comb begin
    prod     = PW'(a) * PW'(k_s);
    prod_rnd = prod + (PW'(1) <<< (FRAC - 1));
  end

  assign p = DW'(prod_rnd >>> FRAC);

endmodule
