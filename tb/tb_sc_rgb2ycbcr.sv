// tb_sc_rgb2ycbcr: converts corner colours and then all 4096 colours and compares
// Y, Cb and Cr with the exact equations evaluated in real arithmetic,
// clamped to the 4-bit range (offset 8 for the chroma channels). A
// stochastic result carries the stream's estimation error on top of the
// rounding: each component must be within TOL levels of the exact value and
// the mean absolute error over all conversions below MEAN_TOL. The latency from the
// start edge to done must be 2^LEN_LOG2 + 1 cycles.
module tb_sc_rgb2ycbcr;
  localparam int LEN_LOG2 = 10;
  localparam real TOL = 1.6;
  localparam real MEAN_TOL = 0.45;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  logic [3:0] r = 0, g = 0, b = 0, y, cb, cr;
  logic busy, done;

  sc_rgb2ycbcr #(.LEN_LOG2(LEN_LOG2)) dut (.clk, .rst_n, .start, .r, .g, .b, .busy, .done, .y, .cb, .cr);

  initial begin
    repeat (4110 * ((1 << LEN_LOG2) + 10)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clamp4(real v);
    return (v < 0.0) ? 0.0 : (v > 15.0) ? 15.0 : v;
  endfunction

  int n_conv = 0, clamps = 0;
  real sum_err = 0.0, max_err = 0.0;

  task automatic convert(int rv, int gv, int bv);
    int lat;
    real ey, ecb, ecr, d;
    real fy, fcb, fcr;
    @(negedge clk);
    r = 4'(rv); g = 4'(gv); b = 4'(bv);
    start = 1;
    @(negedge clk);
    start = 0;
    r = 4'($urandom); g = 4'($urandom); b = 4'($urandom);  // inputs latched at start
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != (1 << LEN_LOG2) + 1) begin failures++; $display("FAIL latency %0d", lat); end
    fy  =  0.299 * rv + 0.587 * gv + 0.114 * bv;
    fcb = -0.169 * rv - 0.331 * gv + 0.500 * bv + 8.0;
    fcr =  0.500 * rv - 0.419 * gv - 0.081 * bv + 8.0;
    if (fcb > 15.0 || fcr > 15.0 || fcb < 0.0 || fcr < 0.0) clamps++;
    ey = clamp4(fy); ecb = clamp4(fcb); ecr = clamp4(fcr);
    for (int c = 0; c < 3; c++) begin
      int got;
      real exp_v;
      got   = (c == 0) ? int'(y) : (c == 1) ? int'(cb) : int'(cr);
      exp_v = (c == 0) ? ey : (c == 1) ? ecb : ecr;
      d = (real'(got) > exp_v) ? real'(got) - exp_v : exp_v - real'(got);
      sum_err += d;
      if (d > max_err) max_err = d;
      checks++;
      if (d > TOL) begin
        failures++;
        $display("FAIL rgb=(%0d,%0d,%0d) comp %0d got %0d exp %f", rv, gv, bv, c, got, exp_v);
      end
    end
    n_conv++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    convert(0, 0, 0);
    convert(15, 15, 15);
    convert(15, 0, 0);
    convert(0, 15, 0);
    convert(0, 0, 15);
    convert(15, 15, 0);
    convert(8, 8, 8);
    for (int c = 0; c < 4096; c++) convert(c >> 8, (c >> 4) & 15, c & 15);
    checks++;
    if (sum_err / real'(3 * n_conv) > MEAN_TOL) begin
      failures++;
      $display("FAIL mean error %f", sum_err / real'(3 * n_conv));
    end
    checks++;
    if (clamps == 0) begin failures++; $display("FAIL no clamped case"); end
    $display("conversions=%0d mean_abs_err=%f max_err=%f clamped=%0d", n_conv, sum_err / real'(3 * n_conv), max_err, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
