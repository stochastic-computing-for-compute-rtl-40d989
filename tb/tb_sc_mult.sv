// tb_sc_mult: exhaustive check of the 4-lane stochastic multiplier, plus
// a statistical check that two independent random streams of values 0.75
// and 0.5 multiply to about 0.375.
module tb_sc_mult;
  int checks = 0, failures = 0;
  logic [3:0] a, b, p;

  sc_mult #(.N(4)) dut (.a, .b, .p);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (p[l] !== (a[l] && b[l])) begin failures++; $display("FAIL a=%0h b=%0h", a, b); end
        end
      end
    ones = 0;
    for (int n = 0; n < 20000; n++) begin
      a = {3'b0, ($urandom % 4) != 0};
      b = {3'b0, ($urandom % 2) != 0};
      #1;
      ones += int'(p[0]);
    end
    checks++;
    if (ones < 7200 || ones > 7800) begin failures++; $display("FAIL product rate %0d/20000", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
