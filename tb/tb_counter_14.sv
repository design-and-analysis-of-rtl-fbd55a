// tb_counter_14: self-checking test of the 14-bit address counter: zero while
// the active-low reset is held, +1 per clock, wrap from 16383 to 0, and an
// asynchronous reset in the middle of counting.
module tb_counter_14;
  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [13:0] out;

  counter_14 dut (.clk, .rst, .out);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    chk("reset", int'(out), 0);
    rst = 1'b1;
    for (int t = 1; t <= 16384 + 10; t++) begin
      @(negedge clk);
      if (t % 97 == 0 || t > 16380) chk($sformatf("count %0d", t), int'(out), t % 16384);
    end
    rst = 1'b0; #1;
    chk("async reset", int'(out), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
