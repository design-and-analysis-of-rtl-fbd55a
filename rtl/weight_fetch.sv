// weight_fetch: weight queue at the top edge of the systolic array.
//
// Weight rows (N weights of 8 bits) are pushed into an N-entry queue. A pulse on
// load starts a transfer once the queue holds N rows: for N clocks wg_set is
// high and the head row is shown on w_top and popped, so that every cell of the
// array hands its weight to the cell below. After the transfer the first row
// pushed sits in the bottom row of the array and the last one in the top row;
// rows are therefore pushed bottom row first. busy is high from the load pulse
// until the last step; done pulses one clock after the last step.
// Loading through a queue at the array edge with neighbour-to-neighbour
// passing follows the published design; the handshake is this design's own.
module weight_fetch #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = sa_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [N-1:0][DATA_W-1:0] push_row,
  output logic                     full,
  input  logic                     load,
  output logic                     busy,
  output logic                     done,
  output logic                     wg_set,
  output logic [N-1:0][DATA_W-1:0] w_top
);

  localparam int unsigned CW = $clog2(N+1);

  logic [N*DATA_W-1:0] head;
  logic [CW-1:0]       count, steps;
  logic                pending, shifting;

  vec_fifo #(.W(N*DATA_W), .DEPTH(N)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (push && !shifting),
    .in_data (push_row),
    .pop     (shifting),
    .out_data(head),
    .full    (full),
    .empty   (),
    .count   (count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      shifting <= 1'b0;
      steps    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !shifting)
        pending <= 1'b1;
      if ((pending || load) && !shifting && count == CW'(N)) begin
        pending  <= 1'b0;
        shifting <= 1'b1;
        steps    <= '0;
      end else if (shifting) begin
        steps <= steps + 1'b1;
        if (steps == CW'(N - 1)) begin
          shifting <= 1'b0;
          done     <= 1'b1;
        end
      end
    end
  end

  assign busy   = pending || shifting;
  assign wg_set = shifting;
  assign w_top  = head;

endmodule
