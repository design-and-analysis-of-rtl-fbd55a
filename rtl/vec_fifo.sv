// vec_fifo: synchronous first-in first-out queue of W-bit words, DEPTH entries.
//
// push writes in_data at the tail, pop removes the head; out_data always shows
// the head (first-word fall-through). Pushing when full or popping when empty is
// ignored; both at once on a full queue are allowed. count gives the fill level.
// Used for the input, weight and output queues of the accelerator. rst_n is
// active low and empties the queue.
module vec_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               in_data,
  input  logic                       pop,
  output logic [W-1:0]               out_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty    = (count == '0);
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign out_data = mem[rd_ptr];

  function automatic logic [AW-1:0] bump(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= bump(wr_ptr);
      if (do_pop)  rd_ptr <= bump(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= in_data;

endmodule
