// tb_activation_cache: self-checking test of the activation RAM (N = 4,
// BYTES = 64, 16 words). Writes single bytes and whole words with random byte
// masks, keeps a reference copy here and reads every word back, checking the
// one-clock read latency.
module tb_activation_cache;
  localparam int N = 4, BYTES = 64, WORDS = BYTES / N;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re;
  logic [3:0] waddr, raddr;
  logic [N-1:0] wbe;
  logic [N-1:0][7:0] wdata, rdata;
  logic [N-1:0][7:0] ref_mem [WORDS];

  activation_cache #(.N(N), .BYTES(BYTES)) dut (.clk, .we, .waddr, .wbe, .wdata, .re, .raddr, .rdata);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wbe = '0; wdata = '0;
    // fill every word
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); we = 1; waddr = 4'(w); wbe = '1; wdata = 32'($urandom);
      ref_mem[w] = wdata;
    end
    // random masked writes
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); we = 1; waddr = 4'($urandom); wbe = 4'($urandom); wdata = 32'($urandom);
      for (int b = 0; b < N; b++) if (wbe[b]) ref_mem[waddr][b] = wdata[b];
    end
    @(negedge clk); we = 0;
    for (int w = 0; w < WORDS; w++) begin
      logic [N-1:0][7:0] prev_q;
      re = 1; raddr = 4'(w); prev_q = rdata;
      #1 chk("no early read", int'(rdata), int'(prev_q));
      @(negedge clk);
      chk($sformatf("word %0d", w), int'(rdata), int'(ref_mem[w]));
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
