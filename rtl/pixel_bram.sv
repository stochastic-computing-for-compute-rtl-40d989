// pixel_bram: block RAM for image data.
//
// One write port and one read port on the same clock; reads are
// synchronous (data one cycle after the address), as an FPGA block RAM.
// Used for the RGB frame (12-bit words, 4 bits per colour) and for the
// converted YCbCr planes. If INIT_FILE is set, the contents are loaded from a
// hex file at start-up, the counterpart of a memory initialisation (.coe)
// file; otherwise the memory is written through the port. The word width
// follows the 4-bit colour resolution of the design; the depth (a 256x256
// frame) and the port arrangement are this design's choice.
module pixel_bram #(
  parameter int unsigned DATA_W    = 12,
  parameter int unsigned DEPTH     = 65536,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
