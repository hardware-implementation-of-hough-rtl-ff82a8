// sync_rom: read-only lookup table with a registered read.
//
// 2**AW words of DW bits, loaded at start-up from a hex file (one word per
// line, read by $readmemh). The Hough engine uses two of them, 8x256 as on
// the design's block diagram, for the X and Y coordinates of the edge
// pixels: x_pixel.hex / y_pixel.hex hold the 6x6 test image, pixel i at
// word i, unused words 0. Loading the image from a file is this design's
// choice; the original loads it from memory initialization files too.
// The read is registered, as in FPGA block memory: data shows the word at
// the address presented on the previous rising edge.
module sync_rom #(
  parameter int unsigned DW        = 8,
  parameter int unsigned AW        = 8,
  parameter string       INIT_FILE = "rtl/x_pixel.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  logic [DW-1:0] mem [2**AW];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
