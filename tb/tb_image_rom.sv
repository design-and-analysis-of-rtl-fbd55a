// tb_image_rom: self-checking test of the image ROM. The first 19 pixels must
// be those of the reference image (9e 9d 9b 9d 9d 99 9a 9d 9a 99 9a 97 9a 9e 9e
// 9a 9c 9d 9b); the others the placeholder pattern
// 8'h80 + ((a[6:0] ^ a[13:7]) & 8'h3f). The read latency must be one clock.
module tb_image_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [13:0] addra;
  logic [7:0]  douta;
  localparam logic [7:0] HEAD [19] = '{8'h9e, 8'h9d, 8'h9b, 8'h9d, 8'h9d, 8'h99, 8'h9a,
      8'h9d, 8'h9a, 8'h99, 8'h9a, 8'h97, 8'h9a, 8'h9e, 8'h9e, 8'h9a, 8'h9c, 8'h9d, 8'h9b};

  image_rom dut (.clka(clk), .addra, .douta);

  function automatic int expected(int a);
    if (a < 19) return int'(HEAD[a]);
    return (8'h80 + (((a % 128) ^ (a / 128)) & 8'h3f)) & 8'hff;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < 16384; a++) begin
      logic [7:0] prev_q;
      @(negedge clk); addra = 14'(a); prev_q = douta;
      #1 if (a % 1000 == 1) chk("no early read", int'(douta), int'(prev_q));
      @(negedge clk);
      chk($sformatf("pixel %0d", a), int'(douta), expected(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
