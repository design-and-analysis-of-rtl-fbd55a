// activation_cache: on-chip static RAM holding the activations of a layer.
//
// BYTES bytes are organised as BYTES/N words of N bytes, one word being one
// input vector of the array. One write port with a byte-enable mask (a single
// pixel from main memory or a whole result vector) and one read port with a
// registered output (rdata is valid one clock after re). The size, 16 KB for a
// 128 x 128 image of 8-bit pixels, follows the published design; the word
// organisation and the two ports are this design's own. The RAM is not reset.
module activation_cache #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = sa_pkg::DATA_W,
  parameter int unsigned BYTES  = 16384,
  localparam int unsigned WORDS = BYTES / N,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [N-1:0]             wbe,
  input  logic [N-1:0][DATA_W-1:0] wdata,
  input  logic                     re,
  input  logic [AW-1:0]            raddr,
  output logic [N-1:0][DATA_W-1:0] rdata
);

  logic [N-1:0][DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < N; i++)
        if (wbe[i]) mem[waddr][i] <= wdata[i];
    if (re)
      rdata <= mem[raddr];
  end

endmodule
