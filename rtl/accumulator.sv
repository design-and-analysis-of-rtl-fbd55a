// accumulator: aligns the column outputs of the systolic array and keeps a bank
// of partial-sum vectors.
//
// Column c of the array delivers its result c clocks after column 0; a delay of
// N-1-c clocks on column c lines all N sums of one input vector up again. Each
// aligned vector is numbered in arrival order since the last start pulse. With
// accumulate low it is stored in bank entry k (k = its number) and passed on;
// with accumulate high bank entry k is added to it first (modulo 2**ACC_W), so
// that a product whose inner dimension exceeds N can be built from several
// passes, one per block of N weight rows. All registers move only when advance
// is high. Output is registered: one clock after the aligned vector.
// The block's place after the array follows the published architecture; its
// insides (alignment, bank of DEPTH vectors, accumulate control) are this
// design's own.
module accumulator #(
  parameter int unsigned N      = 64,
  parameter int unsigned ACC_W  = sa_pkg::ACC_W,
  parameter int unsigned DEPTH  = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    advance,
  input  logic                    start,       // restart vector numbering at 0
  input  logic                    accumulate,
  input  logic [N-1:0][ACC_W-1:0] col_in,
  input  logic [N-1:0]            col_valid,
  output logic [N-1:0][ACC_W-1:0] sum_out,
  output logic                    sum_valid
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [N-1:0][ACC_W-1:0]        aligned;
  logic                           aligned_v;
  logic [N*ACC_W-1:0]             bank [DEPTH];
  logic [N*ACC_W-1:0]             prev, total;
  logic [IW-1:0]                  idx;

  // Column c passes through a shift register of N-1-c stages.
  for (genvar c = 0; c < N; c++) begin : g_align
    localparam int unsigned STAGES = N - 1 - c;
    if (STAGES == 0) begin : g_direct
      assign aligned[c] = col_in[c];
    end else begin : g_delay
      logic [ACC_W-1:0] dl [STAGES];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < int'(STAGES); k++) dl[k] <= '0;
        end else if (advance) begin
          dl[0] <= col_in[c];
          for (int k = 1; k < int'(STAGES); k++) dl[k] <= dl[k-1];
        end
      end
      assign aligned[c] = dl[STAGES-1];
    end
  end

  assign aligned_v = col_valid[N-1];

  assign prev = bank[idx];
  always_comb
    for (int c = 0; c < N; c++)
      total[c*ACC_W +: ACC_W] = aligned[c] + (accumulate ? prev[c*ACC_W +: ACC_W] : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      sum_out   <= '0;
      sum_valid <= 1'b0;
    end else begin
      if (start)
        idx <= '0;
      if (advance) begin
        sum_valid <= aligned_v;
        if (aligned_v) begin
          sum_out <= total;
          if (!start)
            idx <= (idx == IW'(DEPTH - 1)) ? '0 : idx + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (advance && aligned_v)
      bank[idx] <= total;

endmodule
