// input_queue: queue at the left edge of the systolic array.
//
// Whole input vectors (N elements of 8 bits) are pushed into a DEPTH-entry
// queue. On each clock with advance high the head vector, or an empty bubble
// if the queue is empty, enters a skew network in which row r is delayed r
// clocks more than row 0, so that element r reaches row r of the array just in
// time to meet the partial sum coming down from row r-1. Every row carries a
// valid bit next to its data; bubbles enter as zero data with the bit clear.
// Outputs are registered: row 0 shows the popped vector one clock after the pop.
// The per-row queues and valid bits follow the published array; the vector
// queue followed by one shared skew network and the depth are this design's.
module input_queue #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = sa_pkg::DATA_W,
  parameter int unsigned DEPTH  = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  logic [N-1:0][DATA_W-1:0]     push_data,
  output logic                         full,
  output logic [$clog2(DEPTH+1)-1:0]   count,
  input  logic                         advance,
  output logic [N-1:0][DATA_W-1:0]     row_data,
  output logic [N-1:0]                 row_valid
);

  logic [N*DATA_W-1:0]             head;
  logic                            empty;

  vec_fifo #(.W(N*DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (push),
    .in_data (push_data),
    .pop     (advance),
    .out_data(head),
    .full    (full),
    .empty   (empty),
    .count   (count)
  );

  // Row r passes through a shift register of r+1 stages (data and valid bit).
  for (genvar r = 0; r < N; r++) begin : g_skew
    logic [DATA_W-1:0] sk_d [r+1];
    logic              sk_v [r+1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k <= r; k++) begin
          sk_d[k] <= '0;
          sk_v[k] <= 1'b0;
        end
      end else if (advance) begin
        sk_d[0] <= empty ? '0 : head[r*DATA_W +: DATA_W];
        sk_v[0] <= !empty;
        for (int k = 1; k <= r; k++) begin
          sk_d[k] <= sk_d[k-1];
          sk_v[k] <= sk_v[k-1];
        end
      end
    end
    assign row_data[r]  = sk_d[r];
    assign row_valid[r] = sk_v[r];
  end

endmodule
