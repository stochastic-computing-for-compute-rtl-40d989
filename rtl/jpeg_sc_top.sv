// jpeg_sc_top: stochastic-computing front end of baseline JPEG compression.
//
// A frame of IMG_W x IMG_H RGB pixels (4 bits per colour, packed {R,G,B})
// sits in an image block RAM, written through the load port beforehand (or
// initialised from the hex file IMG_INIT); writes while busy are ignored.
// `start` processes the whole frame in two passes:
//   1. Colour pass: the raster counters (sync_counter) address the image RAM
//      pixel by pixel; each pixel goes through the stochastic colour
//      converter (sc_rgb2ycbcr) and the {Y,Cb,Cr} result is written to a
//      component RAM at the same address and shown on ycc_*. hsync_out and
//      vsync_out pulse when the last pixel of a line / of the frame has been
//      converted.
//   2. Transform pass: for Y, then Cb, then Cr, every 8x8 block (blocks in
//      raster order) is read from the component RAM into the stochastic
//      DCT-quantization unit (sc_dct_quant), transformed, and its 64
//      quantized coefficients are streamed out on coef_* in index order
//      u*8+v, one per cycle.
// `done` pulses after the last coefficient of the Cr plane. quant_recip
// (1/QF, 255 = 1.0) must stay stable during the frame.
//
// Timing: from the start edge to the done pulse a frame takes exactly
//   IMG_W*IMG_H*(2^CC_LOG2 + 6) + 3*(IMG_W*IMG_H/64)*(2^DCT_LOG2 + 132) + 1
// cycles: per pixel a RAM read (2), the converter start (1), its run
// (2^CC_LOG2 + 2) and the write (1); per block 65 load cycles, the start,
// the run (2^DCT_LOG2 + 2) and 64 output cycles. At the defaults (256x256,
// 2^10 and 2^16) that is about 269 million cycles.
//
// The chain of block RAM, sync counts, colour conversion, DCT and
// quantization follows the design's processing flow. Buffering the converted
// frame, processing the three planes in turn, the output stream format and
// the frame size are this design's own.
module jpeg_sc_top #(
  parameter int unsigned IMG_W    = 256,
  parameter int unsigned IMG_H    = 256,
  parameter int unsigned CC_LOG2  = 10,
  parameter int unsigned DCT_LOG2 = 16,
  parameter string       IMG_INIT = "",
  localparam int unsigned PIX_W   = 4,
  localparam int unsigned AW      = $clog2(IMG_W * IMG_H),
  localparam int unsigned BW      = (IMG_W * IMG_H > 64) ? $clog2(IMG_W * IMG_H / 64) : 1,
  localparam int unsigned HW      = $clog2(IMG_W),
  localparam int unsigned VW      = $clog2(IMG_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // image load port
  input  logic                     load_we,
  input  logic [AW-1:0]            load_addr,
  input  logic [3*PIX_W-1:0]       load_data,
  // control
  input  logic                     start,
  input  logic [7:0]               quant_recip,
  output logic                     busy,
  output logic                     done,
  // raster sync
  output logic                     hsync_out,
  output logic                     vsync_out,
  // converted pixels
  output logic                     ycc_valid,
  output logic [AW-1:0]            ycc_addr,
  output logic [3*PIX_W-1:0]       ycc_data,
  // quantized coefficients
  output logic                     coef_valid,
  output logic [1:0]               coef_comp,
  output logic [BW-1:0]            coef_block,
  output logic [5:0]               coef_index,
  output logic signed [PIX_W+7:0]  coef_data
);

  initial begin
    assert (IMG_W % 8 == 0 && IMG_H % 8 == 0 && IMG_W >= 8 && IMG_H >= 8)
      else $error("jpeg_sc_top: frame must be a whole number of 8x8 blocks");
    assert ((1 << HW) == IMG_W) else $error("jpeg_sc_top: IMG_W must be a power of two");
  end

  typedef enum logic [3:0] {
    T_IDLE, T_CC_READ, T_CC_WAIT, T_CC_START, T_CC_RUN, T_CC_WRITE,
    T_DC_LOAD, T_DC_START, T_DC_RUN, T_DC_OUT, T_DONE
  } state_t;
  state_t state;

  // ---------------------------------------------------------- image RAM
  logic [AW-1:0]        img_raddr;
  logic [3*PIX_W-1:0]   img_rdata;

  pixel_bram #(.DATA_W(3*PIX_W), .DEPTH(IMG_W * IMG_H), .INIT_FILE(IMG_INIT)) u_img (
    .clk, .we(load_we && !busy), .waddr(load_addr), .wdata(load_data),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  // ---------------------------------------------------------- raster counters
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          hsync, vsync, sc_step, sc_clr;

  sync_counter #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_sync (
    .clk, .rst_n, .clr(sc_clr), .step(sc_step),
    .hcount, .vcount, .hsync, .vsync
  );

  assign img_raddr = {vcount, hcount};

  // ---------------------------------------------------------- colour converter
  logic             cc_start, cc_busy, cc_done;
  logic [PIX_W-1:0] cc_y, cc_cb, cc_cr;

  sc_rgb2ycbcr #(.PIX_W(PIX_W), .LEN_LOG2(CC_LOG2)) u_cc (
    .clk, .rst_n, .start(cc_start),
    .r(img_rdata[3*PIX_W-1 -: PIX_W]), .g(img_rdata[2*PIX_W-1 -: PIX_W]), .b(img_rdata[PIX_W-1:0]),
    .busy(cc_busy), .done(cc_done), .y(cc_y), .cb(cc_cb), .cr(cc_cr)
  );

  // ---------------------------------------------------------- component RAM
  logic [AW-1:0]      ycc_raddr;
  logic [3*PIX_W-1:0] ycc_rdata;

  pixel_bram #(.DATA_W(3*PIX_W), .DEPTH(IMG_W * IMG_H)) u_ycc (
    .clk, .we(ycc_valid), .waddr(ycc_addr), .wdata(ycc_data),
    .raddr(ycc_raddr), .rdata(ycc_rdata)
  );

  // ---------------------------------------------------------- DCT + quantizer
  logic [1:0]    comp;          // 0 Y, 1 Cb, 2 Cr
  logic [BW-1:0] blk_idx;       // block index, raster order of blocks
  logic [6:0]    k;             // sample / coefficient counter
  logic          ld_valid;
  logic [5:0]    ld_idx;
  logic          dc_start, dc_busy, dc_done;
  logic [PIX_W-1:0] ld_sample;
  logic signed [PIX_W+7:0] dc_coef;

  always_comb begin
    unique case (comp)
      2'd0:    ld_sample = ycc_rdata[3*PIX_W-1 -: PIX_W];
      2'd1:    ld_sample = ycc_rdata[2*PIX_W-1 -: PIX_W];
      default: ld_sample = ycc_rdata[PIX_W-1:0];
    endcase
  end

  sc_dct_quant #(.PIX_W(PIX_W), .LEN_LOG2(DCT_LOG2)) u_dct (
    .clk, .rst_n,
    .load(ld_valid), .load_idx(ld_idx), .load_data(ld_sample),
    .quant_recip, .start(dc_start), .busy(dc_busy), .done(dc_done),
    .rd_idx(k[5:0]), .rd_coef(dc_coef)
  );

  // Address of sample k[5:0] = (m,n) of block blk_idx.
  localparam int unsigned BXW = HW - 3;   // bits of the block column
  logic [VW-4:0]  blk_row;
  logic [BXW-1:0] blk_col;
  assign blk_row   = blk_idx[BW-1 -: (VW-3)];
  assign blk_col   = blk_idx[BXW-1:0];
  assign ycc_raddr = {blk_row, k[5:3], blk_col, k[2:0]};

  // ---------------------------------------------------------- sequencer
  assign busy       = (state != T_IDLE);
  assign sc_clr     = (state == T_IDLE);
  assign sc_step    = (state == T_CC_WRITE);
  assign cc_start   = (state == T_CC_START);
  assign dc_start   = (state == T_DC_START);
  assign ycc_valid  = (state == T_CC_WRITE);
  assign ycc_addr   = {vcount, hcount};
  assign ycc_data   = {cc_y, cc_cb, cc_cr};
  assign hsync_out  = (state == T_CC_WRITE) && hsync;
  assign vsync_out  = (state == T_CC_WRITE) && vsync;
  assign coef_valid = (state == T_DC_OUT);
  assign coef_comp  = comp;
  assign coef_block = blk_idx;
  assign coef_index = k[5:0];
  assign coef_data  = dc_coef;
  assign done       = (state == T_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      comp     <= '0;
      blk_idx  <= '0;
      k        <= '0;
      ld_valid <= 1'b0;
      ld_idx   <= '0;
    end else begin
      ld_valid <= 1'b0;
      unique case (state)
        T_IDLE:     if (start) state <= T_CC_READ;
        T_CC_READ:  state <= T_CC_WAIT;        // address presented to image RAM
        T_CC_WAIT:  state <= T_CC_START;       // RAM data registered
        T_CC_START: state <= T_CC_RUN;
        T_CC_RUN:   if (cc_done) state <= T_CC_WRITE;
        T_CC_WRITE: begin
          if (vsync) begin
            state   <= T_DC_LOAD;
            comp    <= 2'd0;
            blk_idx <= '0;
            k       <= '0;
          end else begin
            state <= T_CC_READ;
          end
        end
        T_DC_LOAD: begin
          // address k in flight; sample k-1 arrives and is written
          ld_valid <= (k < 7'd64);
          ld_idx   <= k[5:0];
          if (k == 7'd64) begin
            state <= T_DC_START;
            k     <= '0;
          end else begin
            k <= k + 7'd1;
          end
        end
        T_DC_START: state <= T_DC_RUN;
        T_DC_RUN:   if (dc_done) state <= T_DC_OUT;
        T_DC_OUT: begin
          k <= k + 7'd1;
          if (k == 7'd63) begin
            k <= '0;
            if (blk_idx == '1) begin
              blk_idx <= '0;
              if (comp == 2'd2) state <= T_DONE;
              else begin
                comp  <= comp + 2'd1;
                state <= T_DC_LOAD;
              end
            end else begin
              blk_idx <= blk_idx + BW'(1);
              state   <= T_DC_LOAD;
            end
          end
        end
        T_DONE:  state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  // The units are only started when idle and their results are only used
  // after their done pulse.
  property p_cc_start_idle;
    @(posedge clk) disable iff (!rst_n) cc_start |-> !cc_busy;
  endproperty
  assert property (p_cc_start_idle);

  property p_dc_start_idle;
    @(posedge clk) disable iff (!rst_n) dc_start |-> !dc_busy;
  endproperty
  assert property (p_dc_start_idle);

endmodule
