// tb_weight_fetch: self-checking test of the weight queue (N = 4). A load
// request made before the queue holds N rows must wait; once N rows are in, wg_set
// must be high for exactly N clocks with the rows on w_top in push order, and
// done must pulse once right after. The test is repeated twice.
module tb_weight_fetch;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push, full, load, busy, done, wg_set;
  logic [N-1:0][7:0] push_row, w_top;
  logic [N-1:0][7:0] R [N];

  weight_fetch #(.N(N)) dut (.clk, .rst_n, .push, .push_row, .full, .load, .busy,
                             .done, .wg_set, .w_top);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    push = 0; load = 0; push_row = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      int seen, dones;
      for (int i = 0; i < N; i++) R[i] = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      // early load request
      push = 1'b1; push_row = R[0]; load = 1'b1;
      @(negedge clk); load = 1'b0;
      chk("waits for rows", int'(wg_set), 0);
      chk("busy while pending", int'(busy), 1);
      for (int i = 1; i < N; i++) begin
        push_row = R[i];
        @(negedge clk);
      end
      push = 1'b0;
      seen = 0; dones = 0;
      for (int t = 0; t < 3 * N; t++) begin
        if (wg_set) begin
          if (seen < N) chk($sformatf("row %0d", seen), int'(w_top == R[seen]), 1);
          seen++;
        end
        if (done) dones++;
        @(negedge clk);
      end
      chk("shift clocks", seen, N);
      chk("one done", dones, 1);
      chk("idle after", int'(busy), 0);
    end
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
