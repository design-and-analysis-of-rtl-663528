// tb_dct8_top: end-to-end test of the registered 5-multiplier DCT at its
// default parameters.
//
// A stream of random 8-sample vectors is offered with a random valid pattern,
// so that the unit sees both back-to-back vectors (one per clock) and
// bubbles. Every vector presented in cycle t must come out with out_valid in
// cycle t+2, and every cycle without a vector must leave out_valid low two
// cycles later. Coefficients are compared with the DCT sum (tolerance 2.0).
// Midway, reset is asserted while vectors are in flight; they must be
// dropped. Each of these events is counted and must occur.
module tb_dct8_top;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IN_W   = DEF_IN_W;
  localparam int          NCYC   = 4000;
  localparam real         TOL    = 2.0;
  localparam int          LO     = -(2 ** (IN_W - 1));
  localparam int          HI     = 2 ** (IN_W - 1) - 1;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic                   rst_n;
  logic                   in_valid;
  logic signed [IN_W-1:0] x [NPTS];
  logic                   out_valid;
  logic signed [IN_W+3:0] y [NPTS];

  dct8_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y(y)
  );

  int checks = 0;
  int failures = 0;
  int n_vectors = 0;
  int n_back_to_back = 0;
  int n_bubbles = 0;
  int n_flushed = 0;

  // What was presented in each cycle.
  bit hist_v [NCYC + 4];
  int hist_x [NCYC + 4][8];

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < 8; n++) x[n] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < NCYC; t++) begin
      // Present this cycle's input (about three in four cycles carry one).
      hist_v[t] = ($urandom_range(3) != 0);
      for (int n = 0; n < 8; n++) hist_x[t][n] = int'($urandom_range(HI - LO)) + LO;
      in_valid = hist_v[t];
      for (int n = 0; n < 8; n++) x[n] = IN_W'(hist_x[t][n]);
      if (hist_v[t]) n_vectors++;
      if (t > 0 && hist_v[t] && hist_v[t-1]) n_back_to_back++;
      if (t > 0 && !hist_v[t]) n_bubbles++;

      @(posedge clk);
      #1;

      // Reset in the middle of the stream drops what is in flight.
      if (t == NCYC / 2) begin
        if (hist_v[t] || hist_v[t-1]) n_flushed++;
        rst_n = 1'b0;
        #1;
        checks++;
        if (out_valid) fail("out_valid high during reset");
        hist_v[t] = 1'b0;
        hist_v[t-1] = 1'b0;
        #1 rst_n = 1'b1;
      end

      // Now in cycle t+1: the output belongs to cycle t-1.
      if (t >= 1) begin
        checks++;
        if (out_valid !== hist_v[t-1])
          fail($sformatf("cycle %0d: out_valid=%0b expected %0b", t + 1, out_valid, hist_v[t-1]));
        else if (out_valid)
          for (int k = 0; k < 8; k++) begin
            real r;
            r = ref_coef(hist_x[t-1], k);
            checks++;
            if (absr(real'(y[k]) - r) > TOL)
              fail($sformatf("cycle %0d: y[%0d]=%0d expected %f", t + 1, k, y[k], r));
          end
      end
    end

    $display("vectors=%0d back_to_back=%0d bubbles=%0d flushed_by_reset=%0d",
             n_vectors, n_back_to_back, n_bubbles, n_flushed);
    checks += 3;
    if (n_back_to_back == 0) fail("no back-to-back vectors");
    if (n_bubbles == 0)      fail("no bubbles");
    if (n_flushed == 0)      fail("reset never hit a vector in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
