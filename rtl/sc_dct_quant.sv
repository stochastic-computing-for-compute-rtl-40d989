// sc_dct_quant: stochastic 8x8 two-dimensional DCT with quantization.
//
//   X(u,v) = alpha(u) alpha(v) sum_{m,n} x(m,n) cos((2m+1)u pi/16) cos((2n+1)v pi/16)
//   Q(u,v) = round(X(u,v) / QF),   alpha(0) = 1/sqrt(2), alpha(k>0) = 1
//
// How it works: all 64 coefficients are accumulated in parallel over one
// stream of L = 2^LEN_LOG2 cycles. Each cycle a 64-way scaled MUX adder
// (random 6-bit select s = (m,n) from a 16-bit LFSR) picks one term of the
// double sum. Because every pixel stream would come from the same LFSR,
// picking the pixel word first and running it through one SNG gives the
// same bit as picking among 64 pixel streams, so a single pixel SNG serves
// the whole block. The factors alpha(u)|cos((2m+1)u pi/16)| take only the
// values cos(k pi/16), k = 0..7 (alpha(0) = cos(4 pi/16)), so eight SNGs on a
// row LFSR and eight on a column LFSR supply every basis factor, and a
// ninth SNG on a fourth LFSR supplies the 1/QF stream. The pixel LFSR is
// 8 bits wide (a full period gives exact pixel streams); the others are
// 16 bits wide, their top byte feeding the SNGs. For each (u,v) an AND
// gate (sc_mult) multiplies pixel, row factor, column factor and 1/QF
// streams, and a signed accumulator (sc_accum) counts the product up or
// down by the sign of the two cosines. After L cycles
//   C(u,v) ~ L/64 * X(u,v) / (QF * (2^PIX_W-1)),
// so Q(u,v) = round(64 * (2^PIX_W-1) * C / L), a constant multiply and shift.
//
// Interface and timing: load the 64 samples through load/load_idx
// (index m*8+n, m the row) at any time while not busy; `quant_recip` is
// 1/QF as a fraction of 2^SN_W-1 and must be stable from start to done.
// `start` reseeds the LFSRs and clears the counters, the stream runs L
// cycles and `done` pulses L+1 cycles after the start edge. rd_coef is the
// coefficient u*8+v = rd_idx, read combinationally from the counters; it is
// valid from done until the next start.
//
// Taken from the design's description: the DCT and quantization equations,
// AND multipliers, MUX accumulation, quantization as a further stochastic
// multiplication and the final shift. This design's own choices: the
// parallel accumulation of all 64 outputs, signed up/down counting for
// negative cosines, quantization by multiplying with a supplied reciprocal,
// the absence of level shifting, the stream length and the SNG width.
module sc_dct_quant
  import sc_pkg::*;
#(
  parameter int unsigned PIX_W    = 4,
  parameter int unsigned SN_W     = 8,
  parameter int unsigned LEN_LOG2 = 16,
  localparam int unsigned N       = 8,
  localparam int unsigned COEF_W  = PIX_W + 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [5:0]               load_idx,
  input  logic [PIX_W-1:0]         load_data,
  input  logic [SN_W-1:0]          quant_recip,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  input  logic [5:0]               rd_idx,
  output logic signed [COEF_W-1:0] rd_coef
);

  localparam int unsigned CW   = LEN_LOG2 + 2;
  localparam int unsigned FULL = (1 << PIX_W) - 1;
  localparam int unsigned SW   = CW + PIX_W + 8;      // rescale width

  initial begin
    assert (SN_W == 8) else $error("sc_dct_quant: the LFSR tap masks are for SN_W = 8");
    assert (SN_W % PIX_W == 0) else $error("sc_dct_quant: SN_W must be a multiple of PIX_W");
  end

  // Basis table: entry u*8+m = {negative, cos index} of alpha(u)cos((2m+1)u pi/16).
  function automatic logic [64*5-1:0] build_basis();
    logic [64*5-1:0] t;
    for (int u = 0; u < N; u++)
      for (int m = 0; m < N; m++)
        t[(u*N+m)*5 +: 5] = dct_basis(u, m);
    return t;
  endfunction
  localparam logic [64*5-1:0] BASIS = build_basis();

  // ------------------------------------------------------------ block buffer
  logic [PIX_W-1:0] blk [64];

  always_ff @(posedge clk) begin
    if (load && !busy) blk[load_idx] <= load_data;
  end

  // ------------------------------------------------------------------ control
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_t;
  state_t state;
  logic [LEN_LOG2-1:0] cyc;
  logic run, go;

  assign run  = (state == S_RUN);
  assign go   = (state == S_IDLE) && start;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
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
  logic [15:0]     rnd_row, rnd_col, rnd_q, rnd_sel;

  sc_lfsr #(.W(SN_W), .TAPS(TAPS8_A), .SEED(SN_W'(8'h01))) u_lfsr_pix
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_pix));
  sc_lfsr #(.W(16), .TAPS(TAPS16_B), .SEED(16'h5A5A)) u_lfsr_row
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_row));
  sc_lfsr #(.W(16), .TAPS(TAPS16_C), .SEED(16'hC3C3)) u_lfsr_col
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_col));
  sc_lfsr #(.W(16), .TAPS(TAPS16_D), .SEED(16'h2727)) u_lfsr_q
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_q));
  sc_lfsr #(.W(16), .TAPS(TAPS16_A), .SEED(16'hACE1)) u_lfsr_sel
    (.clk, .rst_n, .reseed(go), .en(run), .state(rnd_sel));

  // ------------------------------------------------ scaled MUX adder + SNGs
  logic [2:0] sel_m, sel_n;
  assign sel_m = rnd_sel[5:3];
  assign sel_n = rnd_sel[2:0];

  logic pix_bit, q_bit;
  sc_sng #(.W(SN_W)) u_sng_pix (
    .x      (SN_W'(pix_to_sn(16'(blk[{sel_m, sel_n}]), PIX_W, SN_W))),
    .rnd    (rnd_pix),
    .bit_out(pix_bit)
  );
  sc_sng #(.W(SN_W)) u_sng_q (.x(quant_recip), .rnd(rnd_q[15 -: SN_W]), .bit_out(q_bit));

  // Cosine-factor streams, index k = cos(k pi/16); index 8 (zero) is tied low.
  logic [8:0] row_bit, col_bit;
  assign row_bit[8] = 1'b0;
  assign col_bit[8] = 1'b0;
  for (genvar k = 0; k < 8; k++) begin : g_cos
    sc_sng #(.W(SN_W)) u_row (.x(SN_W'(q16_to_sn(COS_Q16[k], SN_W))), .rnd(rnd_row[15 -: SN_W]), .bit_out(row_bit[k]));
    sc_sng #(.W(SN_W)) u_col (.x(SN_W'(q16_to_sn(COS_Q16[k], SN_W))), .rnd(rnd_col[15 -: SN_W]), .bit_out(col_bit[k]));
  end

  // Per-frequency factors for the selected (m,n): pixel x 1/QF x row(u) x col(v).
  logic       pq_bit;
  logic [7:0] ru_bit, ru_neg, cv_bit, cv_neg;
  sc_mult #(.N(1)) u_mult_pq (.a(pix_bit), .b(q_bit), .p(pq_bit));

  always_comb begin
    for (int u = 0; u < N; u++) begin
      logic [4:0] e_row, e_col;
      e_row     = BASIS[(u*N + int'(sel_m))*5 +: 5];
      e_col     = BASIS[(u*N + int'(sel_n))*5 +: 5];
      ru_bit[u] = row_bit[e_row[3:0]];
      ru_neg[u] = e_row[4];
      cv_bit[u] = col_bit[e_col[3:0]];
      cv_neg[u] = e_col[4];
    end
  end

  logic signed [CW-1:0] count [64];

  for (genvar u = 0; u < N; u++) begin : g_u
    logic [7:0] a_bits, p1, p2;
    assign a_bits = {8{ru_bit[u]}};
    sc_mult #(.N(8)) u_mult_rc (.a(a_bits), .b(cv_bit), .p(p1));
    sc_mult #(.N(8)) u_mult_x  (.a(p1), .b({8{pq_bit}}), .p(p2));
    for (genvar v = 0; v < N; v++) begin : g_v
      sc_accum #(.CW(CW)) u_acc (
        .clk, .rst_n,
        .clr   (go),
        .en    (run),
        .bit_in(p2[v]),
        .neg   (ru_neg[u] ^ cv_neg[v]),
        .count (count[u*N+v])
      );
    end
  end

  // ------------------------------------------------------------------ rescale
  logic signed [SW-1:0] scaled;
  assign scaled  = (SW'(count[rd_idx]) * SW'(64 * FULL) + SW'(1 << (LEN_LOG2 - 1))) >>> LEN_LOG2;
  assign rd_coef = COEF_W'(scaled);

endmodule
