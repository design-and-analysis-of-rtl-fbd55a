// counter_14: free-running address counter of the main memory.
//
// A WIDTH-bit up counter (14 bits by default, enough for the 16384 pixels of a
// 128 x 128 image) that increments on every clock edge and wraps to 0. rst is
// active low and clears it. The width, the active-low reset and the counter
// driving the ROM address follow the published main memory; wrapping around is
// this design's own choice.
module counter_14 #(
  parameter int unsigned WIDTH = 14
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] out
);

  always_ff @(posedge clk or negedge rst)
    if (!rst) out <= '0;
    else      out <= out + 1'b1;

endmodule
