// tb_sc_dct_quant: loads 8x8 blocks (flat, ramp, checkerboard, random),
// transforms them with several quantization factors and compares all 64
// outputs with the 2-D DCT computed in real arithmetic,
//   X(u,v) = a(u) a(v) sum x(m,n) cos((2m+1)u pi/16) cos((2n+1)v pi/16),
// multiplied by the same 1/QF the unit is given. Stochastic estimation
// error grows with the size of the sum, so each output must be within
// TOL_ABS + TOL_REL * S of the exact value, where S is the sum of
// |x * basis * 1/QF| over the block (the quantity whose fraction the stream
// carries). It also checks the latency of 2^LEN_LOG2 + 1 cycles and that
// loads while busy are ignored.
module tb_sc_dct_quant;
  localparam int LEN_LOG2 = 16;
  localparam real TOL_ABS = 2.0;
  localparam real TOL_REL = 0.04;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load = 0, start = 0;
  logic [5:0] load_idx = 0, rd_idx = 0;
  logic [3:0] load_data = 0;
  logic [7:0] quant_recip = 8'd255;
  logic busy, done;
  logic signed [11:0] rd_coef;

  sc_dct_quant #(.LEN_LOG2(LEN_LOG2)) dut (
    .clk, .rst_n, .load, .load_idx, .load_data, .quant_recip, .start,
    .busy, .done, .rd_idx, .rd_coef);

  initial begin
    repeat (9 * ((1 << LEN_LOG2) + 200)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int blk [64];
  real worst = 0.0;
  int n_neg = 0;

  function automatic real basis(int u, int m);
    real a;
    a = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return a * $cos((2.0 * m + 1.0) * u * PI / 16.0);
  endfunction

  task automatic run_block(int recip, bit poke_busy);
    int lat;
    real x, s, err, q;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load = 1; load_idx = 6'(i); load_data = 4'(blk[i]);
    end
    @(negedge clk);
    load = 0;
    quant_recip = 8'(recip);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin
      if (poke_busy && lat == 5) begin
        load = 1; load_idx = 6'd0; load_data = 4'(~blk[0]);   // must be ignored
      end else load = 0;
      @(negedge clk);
      lat++;
    end
    load = 0;
    checks++;
    if (lat != (1 << LEN_LOG2) + 1) begin failures++; $display("FAIL latency %0d", lat); end
    q = real'(recip) / 255.0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        x = 0.0; s = 0.0;
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++) begin
            x += blk[m*8+n] * basis(u, m) * basis(v, n);
            s += blk[m*8+n] * ((basis(u, m) * basis(v, n) < 0.0) ? -basis(u, m) * basis(v, n)
                                                                   : basis(u, m) * basis(v, n));
          end
        x = x * q; s = s * q;
        rd_idx = 6'(u*8+v);
        #1;
        if (rd_coef < 0) n_neg++;
        err = real'(rd_coef) - x;
        if (err < 0.0) err = -err;
        if (err / (TOL_ABS + TOL_REL * s) > worst) worst = err / (TOL_ABS + TOL_REL * s);
        checks++;
        if (err > TOL_ABS + TOL_REL * s) begin
          failures++;
          if (failures < 20) $display("FAIL (%0d,%0d) got %0d exp %f S %f", u, v, rd_coef, x, s);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (blk[i]) blk[i] = 15;                       // flat, full scale
    run_block(255, 1'b1);
    foreach (blk[i]) blk[i] = 0;                        // all zero
    run_block(255, 1'b0);
    foreach (blk[i]) blk[i] = (i % 8) * 2;              // horizontal ramp
    run_block(255, 1'b0);
    foreach (blk[i]) blk[i] = (((i / 8) + (i % 8)) % 2) ? 15 : 0;   // checkerboard
    run_block(255, 1'b0);
    foreach (blk[i]) blk[i] = $urandom % 16;            // random, QF = 1
    run_block(255, 1'b0);
    foreach (blk[i]) blk[i] = $urandom % 16;            // random, QF = 2
    run_block(128, 1'b0);
    foreach (blk[i]) blk[i] = 15 - (i / 8) * 2;         // vertical ramp, QF = 5
    run_block(51, 1'b0);
    foreach (blk[i]) blk[i] = $urandom % 16;            // random, QF = 16
    run_block(16, 1'b0);
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL no negative coefficient seen"); end
    $display("worst error / tolerance = %f, negative outputs = %0d", worst, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
