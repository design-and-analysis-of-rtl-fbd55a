// relu: rectified-linear activation and requantisation of one result vector.
//
// For each of the N accumulator values x: in SIGNED mode a negative x becomes 0
// (the ReLU clamp); in unsigned mode every value is already non-negative. The
// result is shifted right by SHIFT bits and saturated to the largest 8-bit
// activation (255, or 127 in SIGNED mode), giving the 8-bit activations that
// the next layer reads. The stage is registered and moves when advance is high.
// The ReLU stage after the accumulator and the 8-bit activations follow the
// published design; the shift and saturation are this design's own.
module relu #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = sa_pkg::DATA_W,
  parameter int unsigned ACC_W  = sa_pkg::ACC_W,
  parameter int unsigned SHIFT  = 8,
  parameter bit          SIGNED = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     advance,
  input  logic [N-1:0][ACC_W-1:0]  in_data,
  input  logic                     in_valid,
  output logic [N-1:0][DATA_W-1:0] out_data,
  output logic                     out_valid,
  output logic [N-1:0]             clamped,    // element was negative
  output logic [N-1:0]             saturated   // element exceeded the 8-bit range
);

  localparam logic [ACC_W-1:0] MAXV = SIGNED ? ACC_W'((1 << (DATA_W - 1)) - 1)
                                             : ACC_W'((1 << DATA_W) - 1);

  logic [N-1:0][DATA_W-1:0] act;
  logic [N-1:0]             neg, sat;

  always_comb
    for (int i = 0; i < N; i++) begin
      logic [ACC_W-1:0] sh;
      neg[i] = SIGNED && in_data[i][ACC_W-1];
      sh     = in_data[i] >> SHIFT;
      sat[i] = !neg[i] && (sh > MAXV);
      if (neg[i])      act[i] = '0;
      else if (sat[i]) act[i] = DATA_W'(MAXV);
      else             act[i] = DATA_W'(sh);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
      clamped   <= '0;
      saturated <= '0;
    end else if (advance) begin
      out_valid <= in_valid;
      out_data  <= act;
      clamped   <= in_valid ? neg : '0;
      saturated <= in_valid ? sat : '0;
    end
  end

endmodule
