// tb_pixel_bram: writes random words to random addresses of a 256-word
// RAM, keeps a model, and checks that every read returns the model's word
// one clock after the address, including a read of an address written in
// the same cycle (old data). A second, 16-word instance is initialised from
// tb/pixel_init.hex, whose word i is (i*0x123 + 0x5A) mod 4096, and read
// back.
module tb_pixel_bram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [11:0] wdata = 0, rdata;
  logic [11:0] model [256];

  pixel_bram #(.DATA_W(12), .DEPTH(256)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [3:0]  iaddr = 0;
  logic [11:0] idata;
  pixel_bram #(.DATA_W(12), .DEPTH(16), .INIT_FILE("tb/pixel_init.hex")) dut_init (
    .clk, .we(1'b0), .waddr(4'd0), .wdata(12'd0), .raddr(iaddr), .rdata(idata));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] expect_q;
    for (int a = 0; a < 16; a++) begin
      iaddr = 4'(a);
      @(negedge clk);
      checks++;
      if (idata !== 12'((a * 12'h123 + 12'h05A) & 12'hFFF)) begin
        failures++;
        $display("FAIL init word %0d = %h", a, idata);
      end
    end
    for (int a = 0; a < 256; a++) begin
      we = 1; waddr = 8'(a); wdata = 12'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 3000; n++) begin
      we = ($urandom % 2) == 1;
      waddr = 8'($urandom); wdata = 12'($urandom);
      raddr = ($urandom % 8 == 0) ? waddr : 8'($urandom);
      expect_q = model[raddr];
      @(negedge clk);
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
