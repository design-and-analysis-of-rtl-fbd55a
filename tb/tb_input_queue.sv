// tb_input_queue: self-checking test of the input queue and row skew (N = 4,
// DEPTH = 4). Fills the queue with advance low (checks full and count), then
// advances every clock and checks that vector k appears on row r exactly
// k + r + 1 clocks after the first pop, with its valid bit, and that bubbles
// carry a clear valid bit. A clock with advance low must hold every row.
module tb_input_queue;
  localparam int N = 4, D = 4, K = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push, full, advance;
  logic [N-1:0][7:0] push_data, row_data;
  logic [N-1:0]      row_valid;
  logic [2:0]        count;
  logic [7:0]        X [K][N];

  input_queue #(.N(N), .DEPTH(D)) dut (.clk, .rst_n, .push, .push_data, .full, .count,
                                       .advance, .row_data, .row_valid);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    push = 0; advance = 0; push_data = '0;
    for (int k = 0; k < K; k++) for (int r = 0; r < N; r++) X[k][r] = 8'($urandom_range(1, 255));
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < D; k++) begin
      push = 1'b1; push_data = {X[k][3], X[k][2], X[k][1], X[k][0]};
      @(negedge clk);
      chk("count", int'(count), k + 1);
    end
    chk("full", int'(full), 1);
    // push into a full queue is ignored
    push_data = '1; @(negedge clk); push = 1'b0;
    chk("count full", int'(count), D);
    // advance: pops at cycles 0..; push the remaining vectors behind
    for (int t = 0; t < K + N + 3; t++) begin
      advance = 1'b1;
      push = (t < K - D);
      if (t < K - D) push_data = {X[D+t][3], X[D+t][2], X[D+t][1], X[D+t][0]};
      @(negedge clk);
      // after t+1 advancing edges: row r shows vector k = t - r
      for (int r = 0; r < N; r++) begin
        int k; k = t - r;
        if (k >= 0 && k < K) begin
          chk($sformatf("valid k%0d r%0d", k, r), int'(row_valid[r]), 1);
          chk($sformatf("data k%0d r%0d", k, r), int'(row_data[r]), int'(X[k][r]));
        end else begin
          chk($sformatf("bubble valid t%0d r%0d", t, r), int'(row_valid[r]), 0);
          chk($sformatf("bubble data t%0d r%0d", t, r), int'(row_data[r]), 0);
        end
      end
      if (t == 2) begin
        logic [N-1:0][7:0] held; held = row_data;
        advance = 1'b0; push = 1'b0;
        @(negedge clk);
        chk("stall hold", int'(row_data == held), 1);
      end
    end
    chk("empty at end", int'(count), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
