// sc_rgb2ycbcr: stochastic RGB to YCbCr colour converter for one pixel.
//
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.169 R - 0.331 G + 0.500 B + half scale
//   Cr =  0.500 R - 0.419 G - 0.081 B + half scale
//
// How it works: R, G and B are expanded to SN_W-bit fractions of full scale
// and turned into bit-streams by three SNGs on one 8-bit LFSR; the nine
// coefficient magnitudes get SNGs on the top byte of a 16-bit LFSR, so each
// AND gate (sc_mult) sees two independent streams and outputs their
// product. For
// every output component a 4-input scaled MUX adder (sc_mux_add) picks one
// of its three products, or a half-scale offset stream for Cb and Cr (zero
// for Y), under two random select bits from a second 16-bit LFSR. A signed
// accumulator (sc_accum) counts the picked bit up, or down when the picked
// term has a negative coefficient. After L = 2^LEN_LOG2 cycles the count is
// C ~ L/4 * (value / full scale), so the result in pixel units is
// round(4 * (2^PIX_W-1) * C / L), clamped to the pixel range.
//
// Interface and timing: `start` latches r, g, b, reseeds the LFSRs and
// clears the counters; the stream then runs for L cycles; y, cb, cr are
// registered and `done` pulses L+1 cycles after the start edge. Outputs hold
// until the next start. `busy` is high from the start edge until done.
//
// The structure (SNGs, AND multipliers, 2-input MUX adders, accumulators)
// and the equations follow the design's description. Signed terms counted
// by an up/down accumulator, the half-scale offset as a fourth adder input
// (2^(PIX_W-1), the 4-bit counterpart of 128), the stream length and the
// SNG width are this design's choices.
module sc_rgb2ycbcr
  import sc_pkg::*;
#(
  parameter int unsigned PIX_W    = 4,
  parameter int unsigned SN_W     = 8,
  parameter int unsigned LEN_LOG2 = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PIX_W-1:0] r,
  input  logic [PIX_W-1:0] g,
  input  logic [PIX_W-1:0] b,
  output logic             busy,
  output logic             done,
  output logic [PIX_W-1:0] y,
  output logic [PIX_W-1:0] cb,
  output logic [PIX_W-1:0] cr
);

  localparam int unsigned CW      = LEN_LOG2 + 2;        // counter width, |C| <= L
  localparam int unsigned FULL    = (1 << PIX_W) - 1;    // pixel full scale
  localparam logic [SN_W-1:0] OFFSET_SN = SN_W'(pix_to_sn(16'(1 << (PIX_W - 1)), PIX_W, SN_W));

  initial begin
    assert (SN_W == 8) else $error("sc_rgb2ycbcr: the LFSR tap masks are for SN_W = 8");
    assert (SN_W % PIX_W == 0) else $error("sc_rgb2ycbcr: SN_W must be a multiple of PIX_W");
  end

  // ------------------------------------------------------------------ control
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_t;
  state_t state;
  logic [LEN_LOG2-1:0] cyc;
  logic run;

  assign run  = (state == S_RUN);
  assign busy = (state != S_IDLE);

  logic [PIX_W-1:0] r_q, g_q, b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
      done  <= 1'b0;
      r_q   <= '0;
      g_q   <= '0;
      b_q   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r_q   <= r;
          g_q   <= g;
          b_q   <= b;
          cyc   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          cyc <= cyc + LEN_LOG2'(1);
          if (cyc == '1) state <= S_FIN;
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- random sources
  logic [SN_W-1:0] rnd_pix;
  logic [15:0]     rnd_coef, rnd_sel;
  logic            go;
  assign go = (state == S_IDLE) && start;

  sc_lfsr #(.W(SN_W), .TAPS(TAPS8_A), .SEED(SN_W'(8'h01))) u_lfsr_pix
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_pix));
  sc_lfsr #(.W(16), .TAPS(TAPS16_B), .SEED(16'h5A5A)) u_lfsr_coef
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_coef));
  sc_lfsr #(.W(16), .TAPS(TAPS16_A), .SEED(16'hACE1)) u_lfsr_sel
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_sel));

  // ------------------------------------------------ stochastic number streams
  // Pixel streams: index 0 R, 1 G, 2 B, 3 half-scale offset.
  logic [SN_W-1:0] pix_sn [4];
  logic [3:0]      pix_bit;
  assign pix_sn[0] = SN_W'(pix_to_sn(16'(r_q), PIX_W, SN_W));
  assign pix_sn[1] = SN_W'(pix_to_sn(16'(g_q), PIX_W, SN_W));
  assign pix_sn[2] = SN_W'(pix_to_sn(16'(b_q), PIX_W, SN_W));
  assign pix_sn[3] = OFFSET_SN;

  for (genvar i = 0; i < 4; i++) begin : g_pix_sng
    sc_sng #(.W(SN_W)) u_sng (.x(pix_sn[i]), .rnd(rnd_pix), .bit_out(pix_bit[i]));
  end

  // Coefficient magnitudes [component][colour], component 0 Y, 1 Cb, 2 Cr.
  localparam int unsigned COEF_Q16 [3][3] = '{'{C_Y_R,  C_Y_G,  C_Y_B},
                                              '{C_CB_R, C_CB_G, C_CB_B},
                                              '{C_CR_R, C_CR_G, C_CR_B}};
  // Sign of each term: bit [colour], 1 = negative. Offset (index 3) positive.
  localparam logic [3:0] NEG [3] = '{4'b0000, 4'b0011, 4'b0110};

  logic [2:0] coef_bit [3];
  logic [2:0] prod     [3];

  for (genvar c = 0; c < 3; c++) begin : g_comp
    for (genvar k = 0; k < 3; k++) begin : g_coef
      sc_sng #(.W(SN_W)) u_sng (
        .x      (SN_W'(q16_to_sn(COEF_Q16[c][k], SN_W))),
        .rnd    (rnd_coef[15 -: SN_W]),
        .bit_out(coef_bit[c][k])
      );
    end

    sc_mult #(.N(3)) u_mult (.a(pix_bit[2:0]), .b(coef_bit[c]), .p(prod[c]));

    // Fourth adder input: offset for Cb and Cr, nothing for Y.
    logic       add_bit;
    logic [1:0] add_idx;
    sc_mux_add #(.N(4)) u_add (
      .in_bits({(c != 0) ? pix_bit[3] : 1'b0, prod[c]}),
      .sel    (rnd_sel[1:0]),
      .out_bit(add_bit),
      .out_idx(add_idx)
    );

    logic signed [CW-1:0] count;
    sc_accum #(.CW(CW)) u_acc (
      .clk, .rst_n,
      .clr   (go),
      .en    (run),
      .bit_in(add_bit),
      .neg   (NEG[c][add_idx]),
      .count (count)
    );

    // Rescale: round(4*FULL*C / L), clamp to 0..FULL.
    logic signed [CW+PIX_W+3:0] scaled;
    logic [PIX_W-1:0] result;
    always_comb begin
      scaled = ((CW+PIX_W+4)'(count) * (CW+PIX_W+4)'(4 * FULL)
                + (CW+PIX_W+4)'(1 << (LEN_LOG2 - 1))) >>> LEN_LOG2;
      if (scaled < 0)                              result = '0;
      else if (scaled > (CW+PIX_W+4)'(FULL))       result = PIX_W'(FULL);
      else                                          result = PIX_W'(scaled);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y  <= '0;
      cb <= '0;
      cr <= '0;
    end else if (state == S_FIN) begin
      y  <= g_comp[0].result;
      cb <= g_comp[1].result;
      cr <= g_comp[2].result;
    end
  end

endmodule
