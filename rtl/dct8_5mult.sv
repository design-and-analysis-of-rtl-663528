// dct8_5mult: 8-point one-dimensional DCT built as a butterfly network with
// only five constant multipliers.
//
// The network has six steps. Steps 1-3 are adders and subtractors that fold
// the eight samples into sums and differences; step 4 holds the five
// multipliers (m1 twice, m2, m3, m4); steps 5-6 are adders and subtractors
// again:
//   1: b0=x0+x7 b1=x1+x6 b2=x3-x4 b3=x1-x6 b4=x2+x5 b5=x3+x4 b6=x2-x5 b7=x0-x7
//   2: c0=b0+b5 c1=b1-b4 c2=b2+b6 c3=b1+b4 c4=b0-b5 c5=b3+b7 c6=b3+b6
//   3: d0=c0+c3 d1=c0-c3 d3=c1+c4 d4=c2-c5
//   4: e2=m3*c2 e3=m1*c6 e4=m4*c5 e6=m1*d3 e7=m2*d4
//   5: f2=c4+e6 f3=c4-e6 f4=e3+b7 f5=b7-e3 f6=e2+e7 f7=e4+e7
//   6: y0=d0 y1=f4+f7 y2=f2 y3=f5-f6 y4=d1 y5=f5+f6 y6=f3 y7=f4-f7
// The result is a scaled DCT: with X(k) = sum_n x(n) cos((2n+1)k*pi/16),
//   y(0) = X(0)   and   y(k) = 2 cos(k*pi/16) X(k) for k = 1..7.
// The per-output scale is left to the stage that follows (a quantiser
// usually absorbs it), which is what lets the network get by with five
// multipliers.
//
// Ports: x[0..7] signed IN_W-bit samples; y[0..7] signed (IN_W+4)-bit
// coefficients, rounded to integers at the multiplier outputs. IN_W+4 bits
// hold every output for any input (the largest, |y(1)|, stays below
// 10.1 * 2**(IN_W-1)). The module is purely combinational.
//
// The input pairing, the add/sub structure and the multiplier labels follow
// the butterfly diagram of the 5-multiplier DCT; the equations of each step,
// the constants, the widths and the rounding are this design's reading of
// the Arai-Agui-Nakajima algorithm that the diagram draws.
module dct8_5mult
  import dct_pkg::*;
#(
  parameter int unsigned IN_W = DEF_IN_W,
  parameter int unsigned FRAC = DEF_FRAC
) (
  input  logic signed [IN_W-1:0] x [NPTS],
  output logic signed [IN_W+3:0] y [NPTS]
);

  localparam int unsigned W = IN_W + 4;
  typedef logic signed [W-1:0] word_t;

  word_t xs [NPTS];
  word_t b0, b1, b2, b3, b4, b5, b6, b7;
  word_t c0, c1, c2, c3, c4, c5, c6;
  word_t d0, d1, d3, d4;
  word_t e2, e3, e4, e6, e7;
  word_t f2, f3, f4, f5, f6, f7;

  // Sign-extend the samples to the working width.
  always_comb
    for (int i = 0; i < NPTS; i++)
      xs[i] = W'(x[i]);

  // Steps 1-3: add/sub network ahead of the multipliers.
  always_comb begin
    b0 = xs[0] + xs[7];
    b1 = xs[1] + xs[6];
    b2 = xs[3] - xs[4];
    b3 = xs[1] - xs[6];
    b4 = xs[2] + xs[5];
    b5 = xs[3] + xs[4];
    b6 = xs[2] - xs[5];
    b7 = xs[0] - xs[7];

    c0 = b0 + b5;
    c1 = b1 - b4;
    c2 = b2 + b6;
    c3 = b1 + b4;
    c4 = b0 - b5;
    c5 = b3 + b7;
    c6 = b3 + b6;

    d0 = c0 + c3;
    d1 = c0 - c3;
    d3 = c1 + c4;
    d4 = c2 - c5;
  end

  // Step 4: the five multipliers.
  const_mult #(.DW(W), .FRAC(FRAC), .SEL(M3)) u_mul_e2 (.a(c2), .p(e2));
  const_mult #(.DW(W), .FRAC(FRAC), .SEL(M1)) u_mul_e3 (.a(c6), .p(e3));
  const_mult #(.DW(W), .FRAC(FRAC), .SEL(M4)) u_mul_e4 (.a(c5), .p(e4));
  const_mult #(.DW(W), .FRAC(FRAC), .SEL(M1)) u_mul_e6 (.a(d3), .p(e6));
  const_mult #(.DW(W), .FRAC(FRAC), .SEL(M2)) u_mul_e7 (.a(d4), .p(e7));

  // Steps 5-6: add/sub network after the multipliers.
  always_comb begin
    f2 = c4 + e6;
    f3 = c4 - e6;
    f4 = e3 + b7;
    f5 = b7 - e3;
    f6 = e2 + e7;
    f7 = e4 + e7;

    y[0] = d0;
    y[1] = f4 + f7;
    y[2] = f2;
    y[3] = f5 - f6;
    y[4] = d1;
    y[5] = f5 + f6;
    y[6] = f3;
    y[7] = f4 - f7;
  end

endmodule
