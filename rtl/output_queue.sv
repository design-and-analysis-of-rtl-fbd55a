// output_queue: queue of finished activation vectors at the end of the
// pipeline, drained towards the activation cache and the output port.
//
// A vector is pushed when in_valid and advance are both high; the head is shown
// on out_data with out_valid and leaves on a clock where out_ready is high.
// advance is the pipeline enable of the whole compute path: it is low only
// while the queue is full and nothing leaves it, which stalls the array, the
// skew and alignment networks, the accumulator and the ReLU stage together, so
// no result in flight is lost. The queue itself follows the published
// architecture; its depth and the stall rule are this design's own.
module output_queue #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = sa_pkg::DATA_W,
  parameter int unsigned DEPTH  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0][DATA_W-1:0] in_data,
  input  logic                     in_valid,
  output logic                     advance,
  output logic [N-1:0][DATA_W-1:0] out_data,
  output logic                     out_valid,
  input  logic                     out_ready
);

  logic full, empty;

  assign advance = !full || out_ready;

  vec_fifo #(.W(N*DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (in_valid && advance),
    .in_data (in_data),
    .pop     (out_ready),
    .out_data(out_data),
    .full    (full),
    .empty   (empty),
    .count   ()
  );

  assign out_valid = !empty;

endmodule
