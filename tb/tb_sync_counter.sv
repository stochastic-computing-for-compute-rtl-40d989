// tb_sync_counter: steps an 8x4 raster counter at random times and checks
// the column and row counts and the hsync / vsync flags against a model,
// and that every line ends with hsync and the frame with vsync.
module tb_sync_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr = 0, step = 0;
  logic [2:0] hcount;
  logic [1:0] vcount;
  logic hsync, vsync;
  int mh, mv, nh, nv;

  sync_counter #(.IMG_W(8), .IMG_H(4)) dut (.clk, .rst_n, .clr, .step, .hcount, .vcount, .hsync, .vsync);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    mh = 0; mv = 0; nh = 0; nv = 0;
    for (int n = 0; n < 600; n++) begin
      step = ($urandom % 3) != 0;
      clr  = (n == 300);
      #1;
      checks += 2;
      if (hsync !== (mh == 7)) begin failures++; $display("FAIL hsync"); end
      if (vsync !== (mh == 7 && mv == 3)) begin failures++; $display("FAIL vsync"); end
      if (step && hsync && !clr) nh++;
      if (step && vsync && !clr) nv++;
      @(negedge clk);
      if (clr) begin mh = 0; mv = 0; end
      else if (step) begin
        if (mh == 7) begin mh = 0; mv = (mv == 3) ? 0 : mv + 1; end
        else mh++;
      end
      checks++;
      if (int'(hcount) != mh || int'(vcount) != mv) begin
        failures++;
        $display("FAIL count %0d,%0d exp %0d,%0d", hcount, vcount, mh, mv);
      end
    end
    checks += 2;
    if (nh < 10) begin failures++; $display("FAIL few lines %0d", nh); end
    if (nv < 2)  begin failures++; $display("FAIL few frames %0d", nv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
