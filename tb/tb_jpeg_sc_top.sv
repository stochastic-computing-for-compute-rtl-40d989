// tb_jpeg_sc_top: end-to-end test of the stochastic JPEG front end on a
// 16x16 frame (stream lengths at their defaults).
//
// The frame (random colours plus a few saturated ones) is written through
// the load port, then one start processes it. The testbench
//   * compares every converted pixel on ycc_* with the RGB to YCbCr
//     equations in real arithmetic (within 1.6 levels, the worst case of
//     the converter over all 4096 colours);
//   * keeps the converted planes and compares every quantized coefficient
//     with the real-valued 2-D DCT of the corresponding 8x8 block of those
//     planes times 1/QF (within 2 + 4% of the block's absolute term sum);
//   * checks coefficient order (component, block, index), the number of
//     hsync / vsync pulses, and the total cycle count of the frame;
//   * counts how often each mechanism occurred (line end, frame end,
//     clamped colour, negative coefficient, each component's transform,
//     the done pulse) and fails if one never did.
module tb_jpeg_sc_top;
  localparam int IMG_W = 16;
  localparam int IMG_H = 16;
  localparam int CC_LOG2 = 10;
  localparam int DCT_LOG2 = 16;
  localparam int NPIX = IMG_W * IMG_H;
  localparam int NBLK = NPIX / 64;
  localparam int AW = $clog2(NPIX);
  localparam int BW = (NBLK > 1) ? $clog2(NBLK) : 1;
  localparam int RECIP = 128;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load_we = 0, start = 0;
  logic [AW-1:0] load_addr = 0;
  logic [11:0] load_data = 0;
  logic [7:0] quant_recip = 8'(RECIP);
  logic busy, done, hsync_out, vsync_out, ycc_valid, coef_valid;
  logic [AW-1:0] ycc_addr;
  logic [11:0] ycc_data;
  logic [1:0] coef_comp;
  logic [BW-1:0] coef_block;
  logic [5:0] coef_index;
  logic signed [11:0] coef_data;

  jpeg_sc_top #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data, .start, .quant_recip,
    .busy, .done, .hsync_out, .vsync_out, .ycc_valid, .ycc_addr, .ycc_data,
    .coef_valid, .coef_comp, .coef_block, .coef_index, .coef_data);

  initial begin
    // watchdog: comfortably above the expected frame length
    repeat (NPIX * ((1 << CC_LOG2) + 8) + 3 * NBLK * ((1 << DCT_LOG2) + 200) + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [NPIX];             // {R,G,B}
  int plane [3][NPIX];        // converted planes as seen on ycc_*
  int n_hsync = 0, n_vsync = 0, n_done = 0, n_clamp = 0, n_neg = 0, n_ycc = 0;
  int n_comp [3] = '{0, 0, 0};
  int n_coef = 0;
  real worst = 0.0;
  longint cyc = 0, t_start = 0, t_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real basis(int u, int m);
    return ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) * $cos((2.0 * m + 1.0) * u * PI / 16.0);
  endfunction

  function automatic real clamp4(real v);
    return (v < 0.0) ? 0.0 : (v > 15.0) ? 15.0 : v;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ------------------------------------------------------ output monitors
  always @(negedge clk) if (rst_n) begin
    if (hsync_out) n_hsync++;
    if (vsync_out) n_vsync++;
    if (done) begin n_done++; t_done = cyc; end
    if (ycc_valid) begin
      int a, rv, gv, bv;
      real f [3];
      a  = int'(ycc_addr);
      rv = (img[a] >> 8) & 15; gv = (img[a] >> 4) & 15; bv = img[a] & 15;
      f[0] =  0.299 * rv + 0.587 * gv + 0.114 * bv;
      f[1] = -0.169 * rv - 0.331 * gv + 0.500 * bv + 8.0;
      f[2] =  0.500 * rv - 0.419 * gv - 0.081 * bv + 8.0;
      if (f[1] > 15.0 || f[2] > 15.0 || f[1] < 0.0 || f[2] < 0.0) n_clamp++;
      checks++;
      if (a != n_ycc) begin failures++; $display("FAIL ycc order %0d exp %0d", a, n_ycc); end
      for (int c = 0; c < 3; c++) begin
        plane[c][a] = (ycc_data >> (8 - 4 * c)) & 15;
        checks++;
        if (absr(real'(plane[c][a]) - clamp4(f[c])) > 1.6) begin
          failures++;
          $display("FAIL pixel %0d comp %0d got %0d exp %f", a, c, plane[c][a], f[c]);
        end
      end
      n_ycc++;
    end
    if (coef_valid) begin
      int c, bk, u, v, br, bc, exp_c, exp_b, exp_i;
      real x, s, q, err, tol;
      c = int'(coef_comp); bk = int'(coef_block); u = int'(coef_index) / 8; v = int'(coef_index) % 8;
      exp_c = n_coef / (NBLK * 64); exp_b = (n_coef / 64) % NBLK; exp_i = n_coef % 64;
      checks++;
      if (c != exp_c || bk != exp_b || int'(coef_index) != exp_i) begin
        failures++;
        $display("FAIL coef order c=%0d b=%0d i=%0d exp %0d %0d %0d", c, bk, coef_index, exp_c, exp_b, exp_i);
      end
      br = bk / (IMG_W / 8); bc = bk % (IMG_W / 8);
      x = 0.0; s = 0.0; q = real'(RECIP) / 255.0;
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < 8; n++) begin
          int p;
          p = plane[c][(br * 8 + m) * IMG_W + bc * 8 + n];
          x += p * basis(u, m) * basis(v, n);
          s += p * absr(basis(u, m) * basis(v, n));
        end
      x *= q; s *= q;
      err = absr(real'(coef_data) - x);
      tol = 2.0 + 0.04 * s;
      if (err / tol > worst) worst = err / tol;
      checks++;
      if (err > tol) begin
        failures++;
        $display("FAIL coef c=%0d b=%0d (%0d,%0d) got %0d exp %f", c, bk, u, v, coef_data, x);
      end
      if (coef_data < 0) n_neg++;
      if (coef_index == 6'd63) n_comp[c]++;
      n_coef++;
    end
  end

  // ------------------------------------------------------ stimulus
  initial begin
    longint expect_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NPIX; a++) begin
      int rv, gv, bv;
      rv = $urandom % 16; gv = $urandom % 16; bv = $urandom % 16;
      if (a % 37 == 5) begin rv = 0; gv = 0; bv = 15; end      // Cb saturates
      if (a % 41 == 7) begin rv = 15; gv = 0; bv = 0; end      // Cr saturates
      if ((a / IMG_W) < 4 && (a % IMG_W) < 8) begin            // smooth corner
        rv = (a % IMG_W) * 2; gv = 8; bv = 15 - (a / IMG_W);
      end
      img[a] = (rv << 8) | (gv << 4) | bv;
      load_we = 1; load_addr = AW'(a); load_data = 12'(img[a]);
      @(negedge clk);
    end
    load_we = 0;
    start = 1;
    t_start = cyc;
    @(negedge clk);
    start = 0;
    wait (n_done == 1);
    repeat (5) @(negedge clk);
    // totals and cycle count
    expect_cycles = longint'(NPIX) * ((1 << CC_LOG2) + 6) + 3 * NBLK * ((1 << DCT_LOG2) + 132) + 1;
    checks += 4;
    if (n_ycc != NPIX) begin failures++; $display("FAIL pixels %0d", n_ycc); end
    if (n_coef != 3 * NBLK * 64) begin failures++; $display("FAIL coefs %0d", n_coef); end
    if (n_hsync != IMG_H) begin failures++; $display("FAIL hsync pulses %0d", n_hsync); end
    if (t_done - t_start != expect_cycles) begin
      failures++; $display("FAIL frame cycles %0d exp %0d", t_done - t_start, expect_cycles);
    end
    // every mechanism must have happened
    checks += 7;
    if (n_vsync != 1) begin failures++; $display("FAIL vsync pulses %0d", n_vsync); end
    if (n_done != 1)  begin failures++; $display("FAIL done pulses %0d", n_done); end
    if (n_clamp == 0) begin failures++; $display("FAIL no clamped colour"); end
    if (n_neg == 0)   begin failures++; $display("FAIL no negative coefficient"); end
    for (int c = 0; c < 3; c++)
      if (n_comp[c] != NBLK) begin failures++; $display("FAIL comp %0d blocks %0d", c, n_comp[c]); end
    $display("frame cycles=%0d lines=%0d frames=%0d clamped=%0d negative_coefs=%0d blocks=%0d/%0d/%0d worst_err/tol=%f",
             t_done - t_start, n_hsync, n_vsync, n_clamp, n_neg, n_comp[0], n_comp[1], n_comp[2], worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
