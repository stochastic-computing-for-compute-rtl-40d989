// tb_sc_accum: drives the signed stochastic accumulator with random
// enable, bit and sign inputs and clears, and compares its count each cycle
// with an integer model.
module tb_sc_accum;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr = 0, en = 0, bit_in = 0, neg = 0;
  logic signed [11:0] count;
  int model;

  sc_accum #(.CW(12)) dut (.clk, .rst_n, .clr, .en, .bit_in, .neg, .count);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 0;
    for (int n = 0; n < 5000; n++) begin
      clr    = ($urandom % 300) == 0;
      en     = ($urandom % 4) != 0;
      bit_in = $urandom % 2;
      neg    = (n % 1000 < 500) ? (($urandom % 4) == 0) : (($urandom % 4) != 0);
      @(negedge clk);
      if (clr) model = 0;
      else if (en && bit_in) model += neg ? -1 : 1;
      checks++;
      if (int'(count) != model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d count=%0d model=%0d", n, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
