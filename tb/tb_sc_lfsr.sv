// tb_sc_lfsr: checks that each LFSR configuration used by the design is
// maximal length: from its seed it visits 2^W-1 distinct non-zero states
// and returns to the seed, that reseed restarts the sequence and that a
// disabled LFSR holds. The expected next state is computed independently
// from the polynomial taps.
module tb_sc_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NL = 5;
  localparam logic [7:0] TAPS [NL] = '{8'hB8, 8'hB4, 8'hB2, 8'hC6, 8'hE1};
  localparam logic [7:0] SEEDS[NL] = '{8'h01, 8'h5A, 8'hC3, 8'h27, 8'h80};
  logic [7:0] st [NL];
  logic [15:0] st16;
  logic reseed = 0, en = 0;

  for (genvar i = 0; i < NL; i++) begin : g_l
    sc_lfsr #(.W(8), .TAPS(TAPS[i]), .SEED(SEEDS[i])) dut (.clk, .rst_n, .reseed, .en, .state(st[i]));
  end
  sc_lfsr #(.W(16), .TAPS(16'hD008), .SEED(16'hACE1)) dut16 (.clk, .rst_n, .reseed, .en, .state(st16));

  function automatic logic [7:0] nxt(logic [7:0] s, int taps_list_id);
    // feedback = XOR of bits (t-1) for the taps t of the polynomial
    int t[4];
    case (taps_list_id)
      0: t = '{8,6,5,4};
      1: t = '{8,6,5,3};
      2: t = '{8,6,5,2};
      3: t = '{8,7,3,2};
      default: t = '{8,7,6,1};
    endcase
    return {s[6:0], s[t[0]-1] ^ s[t[1]-1] ^ s[t[2]-1] ^ s[t[3]-1]};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [NL][256];
  logic [7:0] prev [NL];
  int period [NL];
  bit first_return [NL];
  int p16;
  logic [15:0] s16_start;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (st[i] !== SEEDS[i]) begin failures++; $display("FAIL seed %0d", i); end
      seen[i][st[i]] = 1;
      period[i] = 0;
      first_return[i] = 0;
    end
    en = 1;
    for (int c = 1; c <= 255; c++) begin
      for (int i = 0; i < NL; i++) prev[i] = st[i];
      @(negedge clk);
      for (int i = 0; i < NL; i++) begin
        checks++;
        if (st[i] !== nxt(prev[i], i)) begin failures++; $display("FAIL step lfsr %0d", i); end
        if (st[i] == 0) begin failures++; $display("FAIL zero state %0d", i); end
        if (st[i] == SEEDS[i] && !first_return[i]) begin first_return[i] = 1; period[i] = c; end
        if (!first_return[i]) begin
          if (seen[i][st[i]]) begin failures++; $display("FAIL repeat %0d", i); end
          seen[i][st[i]] = 1;
        end
      end
    end
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (period[i] != 255) begin failures++; $display("FAIL period lfsr %0d = %0d", i, period[i]); end
    end
    // hold when disabled
    en = 0;
    for (int i = 0; i < NL; i++) prev[i] = st[i];
    repeat (3) @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (st[i] !== prev[i]) begin failures++; $display("FAIL hold %0d", i); end
    end
    // reseed
    en = 1; repeat (7) @(negedge clk);
    reseed = 1; @(negedge clk); reseed = 0;
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (st[i] !== SEEDS[i]) begin failures++; $display("FAIL reseed %0d", i); end
    end
    // 16-bit period
    s16_start = st16;
    p16 = 0;
    do begin @(negedge clk); p16++; end while (st16 != s16_start && p16 < 70000);
    checks++;
    if (p16 != 65535) begin failures++; $display("FAIL period16 = %0d", p16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
