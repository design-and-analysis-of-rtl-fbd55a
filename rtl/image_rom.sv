// image_rom: read-only memory holding the input image, one 8-bit pixel per
// address (DEPTH = 16384 pixels of a 128 x 128 image).
//
// The read is synchronous: douta shows the pixel at addra one clock after the
// address is applied, as in an FPGA block RAM. The content is set at start-up:
// every address first gets the placeholder pattern
//   pixel(a) = 8'h80 + ((a[6:0] ^ a[13:7]) & 8'h3f)
// (a = r*128 + c, a smooth mid-grey test picture), and the hex file INIT_FILE
// (one pixel per line, may be shorter than DEPTH) then overwrites the leading
// addresses. The default file holds the first 19 pixels of the reference
// image. Replace INIT_FILE with a full image to run a real picture.
// Port names, depth and width follow the published ROM; the placeholder
// pattern is this design's own.
module image_rom #(
  parameter int unsigned DEPTH     = 16384,
  parameter int unsigned DATA_W    = sa_pkg::DATA_W,
  parameter string       INIT_FILE = "rtl/image_pixels.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clka,
  input  logic [AW-1:0]     addra,
  output logic [DATA_W-1:0] douta
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++)
      mem[a] = DATA_W'(8'h80 + ({1'b0, a[6:0] ^ 7'(a >> 7)} & 8'h3f));
    if (INIT_FILE != "")
      $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clka)
    douta <= mem[addra];

endmodule
