// tb_input_memory: self-checking test of the main memory. After the active-low
// reset is released, pixel a must be on memory_out after the (a+1)-th rising
// edge, for all 16384 pixels and again after the address wraps around. The
// expected pixels are the reference image head and the placeholder pattern.
module tb_input_memory;
  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] memory_out;
  localparam logic [7:0] HEAD [19] = '{8'h9e, 8'h9d, 8'h9b, 8'h9d, 8'h9d, 8'h99, 8'h9a,
      8'h9d, 8'h9a, 8'h99, 8'h9a, 8'h97, 8'h9a, 8'h9e, 8'h9e, 8'h9a, 8'h9c, 8'h9d, 8'h9b};

  input_memory dut (.clk, .rst, .memory_out);

  function automatic int expected(int a);
    if (a < 19) return int'(HEAD[a]);
    return (8'h80 + (((a % 128) ^ (a / 128)) & 8'h3f)) & 8'hff;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b1;
    for (int e = 1; e <= 16384 + 40; e++) begin
      @(negedge clk);
      chk($sformatf("edge %0d", e), int'(memory_out), expected((e - 1) % 16384));
    end
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
