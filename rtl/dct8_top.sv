// dct8_top: the 5-multiplier 8-point DCT with registered input and output.
//
// A vector of eight signed samples is captured in an input register when
// in_valid is high. The register feeds the combinational 5-multiplier
// butterfly (dct8_5mult), whose eight coefficients are captured in an output
// register. The unit accepts a new vector on every clock and returns its
// coefficients two clocks later: a vector presented with in_valid in cycle t
// appears on y with out_valid in cycle t+2. Cycles without in_valid leave
// bubbles that travel through as out_valid low. The register-to-register
// path is the whole butterfly, so the clock period is set by its
// add-add-add-multiply-add-add chain.
//
// Ports:
//   clk, rst_n         clock, active-low asynchronous reset of the valid bits
//   in_valid, x[0..7]  input vector, signed IN_W bits per sample
//   out_valid, y[0..7] scaled DCT coefficients, signed IN_W+4 bits
//                      (y(0) = X(0), y(k) = 2 cos(k*pi/16) X(k) otherwise)
//
// The butterfly follows the 5-multiplier DCT architecture; the registers,
// the valid handshake and the reset are this design's choice, since the
// architecture is described as a combinational network only.
module dct8_top
  import dct_pkg::*;
#(
  parameter int unsigned IN_W = DEF_IN_W,
  parameter int unsigned FRAC = DEF_FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x [NPTS],
  output logic                   out_valid,
  output logic signed [IN_W+3:0] y [NPTS]
);

  logic signed [IN_W-1:0] x_q [NPTS];
  logic                   x_vld_q;
  logic signed [IN_W+3:0] y_d [NPTS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      x_vld_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      x_vld_q   <= in_valid;
      out_valid <= x_vld_q;
    end

  // Data registers load only with a valid vector; they need no reset.
  always_ff @(posedge clk) begin
    if (in_valid) x_q <= x;
    if (x_vld_q)  y   <= y_d;
  end

  dct8_5mult #(.IN_W(IN_W), .FRAC(FRAC)) u_dct (
    .x(x_q),
    .y(y_d)
  );

endmodule
