// tb_output_queue: self-checking test of the output queue (N = 2, DEPTH = 3).
// Random vectors are offered every clock while the consumer is ready at random;
// vectors must leave in order, none lost or duplicated, and advance must be low
// exactly when the queue is full and the consumer not ready.
module tb_output_queue;
  localparam int N = 2, D = 3, K = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, advance, out_valid, out_ready;
  logic [N-1:0][7:0] in_data, out_data;
  logic [15:0] sent, recv;
  int level, stalls;

  output_queue #(.N(N), .DEPTH(D)) dut (.clk, .rst_n, .in_data, .in_valid, .advance,
                                        .out_data, .out_valid, .out_ready);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; sent = 0; recv = 0; level = 0; stalls = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    while (recv < K) begin
      in_valid  = (sent < K) && ($urandom_range(0, 3) != 0);
      in_data   = sent;
      out_ready = ($urandom_range(0, 2) == 0);
      #1;
      chk("advance rule", int'(advance), int'(!(level == D) || out_ready));
      chk("out_valid", int'(out_valid), int'(level > 0));
      if (!advance) stalls++;
      if (out_valid && out_ready) begin
        chk("order", int'(out_data), int'(recv));
        recv++; level--;
      end
      if (in_valid && advance) begin sent++; level++; end
      @(negedge clk);
    end
    chk("stall seen", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
