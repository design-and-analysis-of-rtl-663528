// tb_const_mult: exhaustive check of the four constant multipliers.
//
// One const_mult per constant (m1..m4) is driven with every sample value
// whose product fits the 12-bit word. The reference is the product with the
// constant taken from $cos in double precision. A result passes if it lies
// within 0.5 (rounding) plus |a| * 2**-(FRAC+1) (quantisation of the
// constant) of that product.
module tb_const_mult;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int unsigned DW   = 12;
  localparam int unsigned FRAC = 12;
  localparam int          AMAX = 1560;  // |AMAX * m4| < 2**(DW-1)

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DW-1:0] a;
  logic signed [DW-1:0] p [4];

  const_mult #(.DW(DW), .FRAC(FRAC), .SEL(M1)) u_m1 (.a(a), .p(p[0]));
  const_mult #(.DW(DW), .FRAC(FRAC), .SEL(M2)) u_m2 (.a(a), .p(p[1]));
  const_mult #(.DW(DW), .FRAC(FRAC), .SEL(M3)) u_m3 (.a(a), .p(p[2]));
  const_mult #(.DW(DW), .FRAC(FRAC), .SEL(M4)) u_m4 (.a(a), .p(p[3]));

  int checks = 0;
  int failures = 0;
  real m [4];

  initial begin
    m[0] = $cos(4.0 * PI / 16.0);
    m[1] = $cos(6.0 * PI / 16.0);
    m[2] = $cos(2.0 * PI / 16.0) - $cos(6.0 * PI / 16.0);
    m[3] = $cos(2.0 * PI / 16.0) + $cos(6.0 * PI / 16.0);
    for (int v = -AMAX; v <= AMAX; v++) begin
      a = DW'(v);
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        real err;
        err = absr(real'(p[i]) - real'(v) * m[i]);
        checks++;
        if (err > 0.5 + absr(real'(v)) / (2.0 ** (FRAC + 1)) + 1e-9) begin
          failures++;
          if (failures < 10)
            $display("FAIL m%0d a=%0d p=%0d expected %f", i + 1, v, p[i], real'(v) * m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
