// tb_dct8_5mult: checks the combinational 5-multiplier butterfly against the
// DCT sum.
//
// Directed vectors (zero, constant, extremes, alternating signs, single
// impulses) and random vectors at the default 8-bit width are applied. Each
// output must lie within 2.0 of the scaled reference from tb_dct_ref_pkg;
// the worst-case rounding error of the five multipliers is 1.5 plus under
// 0.4 from the constants.
module tb_dct8_5mult;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IN_W   = DEF_IN_W;
  localparam int          NRAND  = 3000;
  localparam real         TOL    = 2.0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0] x [NPTS];
  logic signed [IN_W+3:0] y [NPTS];

  dct8_5mult u_dut (.x(x), .y(y));

  int checks = 0;
  int failures = 0;
  real worst = 0.0;

  task automatic apply(input int v [8]);
    for (int n = 0; n < 8; n++) x[n] = IN_W'(v[n]);
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      real e;
      e = absr(real'(y[k]) - ref_coef(v, k));
      if (e > worst) worst = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL y[%0d]=%0d expected %f for %p", k, y[k], ref_coef(v, k), v);
      end
    end
  endtask

  localparam int LO = -(2 ** (IN_W - 1));
  localparam int HI = 2 ** (IN_W - 1) - 1;

  initial begin
    int v [8];
    v = '{default: 0};   apply(v);
    v = '{default: HI};  apply(v);
    v = '{default: LO};  apply(v);
    v = '{HI, LO, HI, LO, HI, LO, HI, LO}; apply(v);
    v = '{LO, HI, HI, LO, LO, HI, HI, LO}; apply(v);
    v = '{HI, HI, HI, HI, LO, LO, LO, LO}; apply(v);
    for (int i = 0; i < 8; i++) begin
      v = '{default: 0};
      v[i] = HI;
      apply(v);
      v[i] = LO;
      apply(v);
    end
    // Vectors that drive each output to its largest magnitude.
    for (int k = 1; k < 8; k++) begin
      for (int n = 0; n < 8; n++)
        v[n] = ($cos(real'((2 * n + 1) * k) * PI / 16.0) >= 0.0) ? HI : LO;
      apply(v);
    end
    for (int t = 0; t < NRAND; t++) begin
      for (int n = 0; n < 8; n++) v[n] = int'($urandom_range(HI - LO)) + LO;
      apply(v);
    end
    $display("worst error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
