// mac_cell: one processing element of the systolic array.
//
// The cell holds one weight. With wg_set high the weight register takes w_in on
// the clock edge; the stored weight is also presented on w_out so that the cell
// below can take it on the next load step (weights shift down a column, one row
// per clock). With en high the cell performs one multiply-accumulate per clock:
//   acc_out <= acc_in + din * weight     (modulo 2**ACC_W)
//   dout    <= din                       (data moves one cell to the right)
// With en low both outputs hold. rst is active low and clears all registers.
//
// The port list, the 8-bit data/weight and 16-bit accumulator widths and the
// MAC function follow the published cell; w_out, the unsigned default and the
// optional two's-complement mode (SIGNED = 1) are this design's own choices.
// Timing: one clock from din/acc_in to dout/acc_out.
module mac_cell #(
  parameter int unsigned DATA_W = sa_pkg::DATA_W,
  parameter int unsigned ACC_W  = sa_pkg::ACC_W,
  parameter bit          SIGNED = 1'b0
) (
  input  logic              clk,
  input  logic              rst,      // active low
  input  logic              en,
  input  logic              wg_set,
  input  logic [DATA_W-1:0] w_in,
  input  logic [DATA_W-1:0] din,
  input  logic [ACC_W-1:0]  acc_in,
  output logic [ACC_W-1:0]  acc_out,
  output logic [DATA_W-1:0] dout,
  output logic [DATA_W-1:0] w_out
);

  logic [DATA_W-1:0] weight;
  logic [ACC_W-1:0]  din_x, w_x, product;

  // Operands extended to the accumulator width (sign-extended in SIGNED mode),
  // so that the product is formed at full accumulator width.
  always_comb begin
    din_x   = SIGNED ? ACC_W'($signed(din))    : ACC_W'(din);
    w_x     = SIGNED ? ACC_W'($signed(weight)) : ACC_W'(weight);
    product = din_x * w_x;
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      weight  <= '0;
      acc_out <= '0;
      dout    <= '0;
    end else begin
      if (wg_set)
        weight <= w_in;
      if (en) begin
        acc_out <= acc_in + product;
        dout    <= din;
      end
    end
  end

  assign w_out = weight;

endmodule
