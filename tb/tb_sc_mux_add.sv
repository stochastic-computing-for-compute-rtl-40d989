// tb_sc_mux_add: checks the scaled MUX adder. For random inputs and selects
// the output must be the selected input and out_idx the select; with random
// streams of values 1, 0.5, 0.25 and 0 on a 4-input adder the output rate
// must be about their mean, 0.4375. An 8-input adder is checked too.
module tb_sc_mux_add;
  int checks = 0, failures = 0;
  logic [3:0] in4;
  logic [1:0] sel4, idx4;
  logic       out4;
  logic [7:0] in8;
  logic [2:0] sel8, idx8;
  logic       out8;

  sc_mux_add #(.N(4)) dut4 (.in_bits(in4), .sel(sel4), .out_bit(out4), .out_idx(idx4));
  sc_mux_add #(.N(8)) dut8 (.in_bits(in8), .sel(sel8), .out_bit(out8), .out_idx(idx8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int n = 0; n < 2000; n++) begin
      in4 = 4'($urandom); sel4 = 2'($urandom);
      in8 = 8'($urandom); sel8 = 3'($urandom);
      #1;
      checks += 4;
      if (out4 !== in4[sel4]) begin failures++; $display("FAIL mux4"); end
      if (idx4 !== sel4)      begin failures++; $display("FAIL idx4"); end
      if (out8 !== in8[sel8]) begin failures++; $display("FAIL mux8"); end
      if (idx8 !== sel8)      begin failures++; $display("FAIL idx8"); end
    end
    ones = 0;
    for (int n = 0; n < 40000; n++) begin
      in4 = {1'b0, ($urandom % 4) == 0, ($urandom % 2) == 0, 1'b1};
      sel4 = 2'($urandom);
      #1;
      ones += int'(out4);
    end
    checks++;
    if (ones < 17000 || ones > 18000) begin failures++; $display("FAIL scaled sum %0d/40000", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
