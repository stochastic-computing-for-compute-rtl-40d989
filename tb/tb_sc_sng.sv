// tb_sc_sng: checks the weighted binary generator. For every input x and
// every non-zero random number r the output must equal x[msb(r)], the input
// bit selected by the highest set bit of r; summed over all 255 non-zero r
// the number of ones must be exactly x (the stream value x/255).
module tb_sc_sng;
  int checks = 0, failures = 0;
  logic [7:0] x, rnd;
  logic bit_out;

  sc_sng #(.W(8)) dut (.x, .rnd, .bit_out);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, msb;
    for (int xv = 0; xv < 256; xv++) begin
      ones = 0;
      for (int r = 1; r < 256; r++) begin
        x = 8'(xv); rnd = 8'(r);
        #1;
        msb = 0;
        for (int i = 0; i < 8; i++) if (r >= (1 << i)) msb = i;
        checks++;
        if (bit_out !== x[msb]) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d r=%0d got %0b", xv, r, bit_out);
        end
        ones += int'(bit_out);
      end
      checks++;
      if (ones != xv) begin failures++; $display("FAIL x=%0d ones=%0d", xv, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
