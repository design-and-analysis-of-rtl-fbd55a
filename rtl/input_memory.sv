// input_memory: the main memory of the accelerator, the source of the input
// image.
//
// A 14-bit counter (counter_14) addresses the image ROM (image_rom) and steps
// through all 16384 pixels, one per clock, starting at address 0 when the
// active-low reset rst is released and wrapping around after the last pixel.
// memory_out carries the pixel of address a on the clock after the counter
// held a, i.e. pixel a is on memory_out from the (a+1)-th rising edge after
// reset until the next. Structure, names and the active-low reset follow the
// published main memory.
module input_memory #(
  parameter int unsigned DEPTH     = 16384,
  parameter string       INIT_FILE = "rtl/image_pixels.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic [sa_pkg::DATA_W-1:0] memory_out
);

  logic [AW-1:0] addr;

  counter_14 #(.WIDTH(AW)) ADDR (
    .clk(clk),
    .rst(rst),
    .out(addr)
  );

  image_rom #(.DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) IMAGE (
    .clka (clk),
    .addra(addr),
    .douta(memory_out)
  );

endmodule
