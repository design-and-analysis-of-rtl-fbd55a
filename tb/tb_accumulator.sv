// tb_accumulator: self-checking test of column alignment and the partial-sum
// bank (N = 4, DEPTH = 8). Column c of vector k is presented at clock k + c, as
// the array delivers it. A first pass (accumulate low) must return each vector
// unchanged one clock after its last column; a second pass (accumulate high)
// must return the element-wise sum of both passes modulo 2**16. A stall clock
// (advance low) in the second pass must not disturb the result.
module tb_accumulator;
  localparam int N = 4, D = 8, K = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic advance, start, accumulate, sum_valid;
  logic [N-1:0][15:0] col_in, sum_out;
  logic [N-1:0]       col_valid;
  logic [15:0] A [K][N];
  logic [15:0] B [K][N];

  accumulator #(.N(N), .DEPTH(D)) dut (.clk, .rst_n, .advance, .start, .accumulate,
                                      .col_in, .col_valid, .sum_out, .sum_valid);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic pass(bit acc, bit with_stall);
    int got;
    @(negedge clk); start = 1'b1; accumulate = acc;
    @(negedge clk); start = 1'b0;
    got = 0;
    for (int t = 0; t < K + N + 2; t++) begin
      for (int c = 0; c < N; c++) begin
        int k; k = t - c;
        col_valid[c] = (k >= 0 && k < K);
        col_in[c]    = col_valid[c] ? (acc ? B[k][c] : A[k][c]) : 16'($urandom);
      end
      advance = 1'b1;
      @(negedge clk);
      if (with_stall && t == 3) begin
        advance = 1'b0; col_in = '1; col_valid = '1;
        @(negedge clk);
      end
      if (sum_valid) begin
        // vector got finished its last column at clock got + N - 1
        chk("timing", t, got + N - 1);
        for (int c = 0; c < N; c++)
          chk($sformatf("sum k%0d c%0d", got, c), int'(sum_out[c]),
              int'(acc ? 16'(A[got][c] + B[got][c]) : A[got][c]));
        got++;
      end
    end
    chk("vector count", got, K);
  endtask

  initial begin
    advance = 0; start = 0; accumulate = 0; col_in = '0; col_valid = '0;
    for (int k = 0; k < K; k++) for (int c = 0; c < N; c++) begin
      A[k][c] = 16'($urandom); B[k][c] = 16'($urandom);
    end
    repeat (2) @(negedge clk); rst_n = 1'b1;
    pass(1'b0, 1'b0);
    pass(1'b1, 1'b1);
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
