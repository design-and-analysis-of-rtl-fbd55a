// tb_systolic_array: self-checking test of the N x N array (N = 4, 8 and 64).
// Weights are shifted in over N clocks (bottom row first); then K random input
// vectors are applied with the row skew, and every column output is compared at
// the clock it must appear with the product X * W computed here. Also checks
// that the last column of the first vector is complete 2N-1 clocks after the
// vector started, and that col_valid is low outside the result window.
module tb_systolic_array;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  for (genvar g = 0; g < 3; g++) begin : g_n
    localparam int N = (g == 0) ? 4 : (g == 1) ? 8 : 64;
    localparam int K = 6;
    logic en, wg_set, v_last;
    logic [N-1:0][7:0]  w_top, d_in;
    logic [N-1:0][15:0] col_out;
    logic [N-1:0]       col_valid;
    logic [7:0]  W [N][N];
    logic [7:0]  X [K][N];
    logic [15:0] Y [K][N];
    int first_done;

    systolic_array #(.N(N)) dut (.clk, .rst_n, .en, .wg_set, .w_top, .d_in, .v_last,
                                 .col_out, .col_valid);

    initial begin
      en = 0; wg_set = 0; v_last = 0; w_top = '0; d_in = '0; first_done = -1;
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) W[r][c] = 8'($urandom);
      for (int k = 0; k < K; k++) for (int r = 0; r < N; r++) X[k][r] = 8'($urandom);
      for (int k = 0; k < K; k++)
        for (int c = 0; c < N; c++) begin
          Y[k][c] = 0;
          for (int r = 0; r < N; r++) Y[k][c] += 16'(X[k][r]) * 16'(W[r][c]);
        end
      @(posedge rst_n);
      // weight load: present row N-1 first
      for (int s = 0; s < N; s++) begin
        @(negedge clk); wg_set = 1'b1;
        for (int c = 0; c < N; c++) w_top[c] = W[N-1-s][c];
      end
      @(negedge clk); wg_set = 1'b0;
      // stream: cycle t drives element r of vector k = t - r
      for (int t = 0; t < K + 2 * N + 2; t++) begin
        en = 1'b1;
        for (int r = 0; r < N; r++) begin
          int k; k = t - r;
          d_in[r] = (k >= 0 && k < K) ? X[k][r] : 8'($urandom);
          if (r == N - 1) v_last = (k >= 0 && k < K);
        end
        @(negedge clk);
        // after edge t+1: column c holds vector k = t + 1 - N - c
        for (int c = 0; c < N; c++) begin
          int k; k = t + 1 - N - c;
          if (k >= 0 && k < K) begin
            chk($sformatf("N=%0d valid k=%0d c=%0d", N, k, c), int'(col_valid[c]), 1);
            chk($sformatf("N=%0d y[%0d][%0d]", N, k, c), int'(col_out[c]), int'(Y[k][c]));
            if (k == 0 && c == N - 1) first_done = t + 1;
          end else
            chk($sformatf("N=%0d idle c=%0d", N, c), int'(col_valid[c]), 0);
        end
      end
      chk($sformatf("N=%0d latency 2N-1", N), first_done, 2 * N - 1);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
