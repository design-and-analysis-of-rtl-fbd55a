// systolic_array: N x N grid of mac_cell processing elements, weight stationary.
//
// Data enter from the left, one 8-bit value per row, and move one cell to the
// right per enabled clock. Partial sums start at zero in the top row and move
// one cell down per enabled clock, so that column c delivers at its bottom
//   col_out[c] = sum over r of d_in[r] * W[r][c]
// for the input vector whose element r entered row r r clocks after element 0
// entered row 0 (the input queue provides that skew). Column c of a vector
// appears N + c clocks after its element 0 entered row 0; the last column of a
// vector is therefore complete 2N-1 clocks after the first column started.
//
// Weight loading: with wg_set high, the row w_top enters the top row and every
// cell passes its current weight to the cell below, so N loading clocks place
// the first row presented in the bottom row and the last one in the top row.
//
// A valid bit travels along the bottom row next to the data, so col_valid[c]
// marks the clock at which col_out[c] holds a real result. rst_n is active low.
// Grid, dataflow directions and per-cell MAC follow the published array; the
// valid tracking along the bottom row is this design's own.
module systolic_array #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = sa_pkg::DATA_W,
  parameter int unsigned ACC_W  = sa_pkg::ACC_W,
  parameter bit          SIGNED = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,        // advance the array one step
  input  logic                         wg_set,    // weight shift step
  input  logic [N-1:0][DATA_W-1:0]     w_top,     // weight row entering row 0
  input  logic [N-1:0][DATA_W-1:0]     d_in,      // skewed data, one per row
  input  logic                         v_last,    // valid bit of d_in[N-1]
  output logic [N-1:0][ACC_W-1:0]      col_out,   // partial sums leaving the bottom
  output logic [N-1:0]                 col_valid
);

  logic [N-1:0][N-1:0][DATA_W-1:0] dout_g, wout_g;
  logic [N-1:0][N-1:0][ACC_W-1:0]  acc_g;
  logic [N-1:0]                    vpipe;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic [DATA_W-1:0] din_c, win_c;
      logic [ACC_W-1:0]  accin_c;
      assign din_c   = (c == 0) ? d_in[r]  : dout_g[r][c-1];
      assign win_c   = (r == 0) ? w_top[c] : wout_g[r-1][c];
      assign accin_c = (r == 0) ? '0       : acc_g[r-1][c];
      mac_cell #(.DATA_W(DATA_W), .ACC_W(ACC_W), .SIGNED(SIGNED)) u_pe (
        .clk    (clk),
        .rst    (rst_n),
        .en     (en),
        .wg_set (wg_set),
        .w_in   (win_c),
        .din    (din_c),
        .acc_in (accin_c),
        .acc_out(acc_g[r][c]),
        .dout   (dout_g[r][c]),
        .w_out  (wout_g[r][c])
      );
    end
  end

  // Valid bit alongside the bottom row: vpipe[c] is set when the bottom-row
  // cell of column c has just produced a result from valid data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      vpipe <= '0;
    else if (en)
      for (int c = 0; c < N; c++)
        vpipe[c] <= (c == 0) ? v_last : vpipe[c-1];
  end

  assign col_out   = acc_g[N-1];
  assign col_valid = vpipe;

endmodule
