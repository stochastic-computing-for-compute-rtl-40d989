// sync_counter: raster scan counters for reading the image.
//
// hcount runs over the columns 0..IMG_W-1 and vcount over the rows
// 0..IMG_H-1; each `step` advances one pixel, wrapping at the end of a line
// and at the end of the frame. hsync is high while the last pixel of a line
// is addressed and vsync while the last pixel of the frame is, so a consumer
// sees both on the step that ends a line or frame. `clr` restarts at (0,0).
// Horizontal and vertical counts with sync outputs follow the design's
// description of pixel reading; their exact timing is this design's choice.
module sync_counter #(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  localparam int unsigned HW = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned VW = (IMG_H > 1) ? $clog2(IMG_H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          step,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync,
  output logic          vsync
);

  assign hsync = (hcount == HW'(IMG_W - 1));
  assign vsync = hsync && (vcount == VW'(IMG_H - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      hcount <= '0;
      vcount <= '0;
    end else if (step) begin
      if (hsync) begin
        hcount <= '0;
        vcount <= vsync ? '0 : vcount + VW'(1);
      end else begin
        hcount <= hcount + HW'(1);
      end
    end
  end

endmodule
