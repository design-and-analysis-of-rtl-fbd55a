// tb_mac_cell: self-checking test of the processing element.
// Replays the three operations of the reference waveform (weight 100, data 50,
// sum in 200 -> 5200; 30/70/1500 -> 3600; 250/150/15550 -> 53050), then random
// operands against a reference computed here, in unsigned and in signed mode.
// Checks the one-clock latency, hold with en low and weight load with wg_set.
module tb_mac_cell;
  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;

  logic        en, wg_set;
  logic [7:0]  w_in, din;
  logic [15:0] acc_in;
  logic [15:0] acc_u, acc_s;
  logic [7:0]  dout_u, dout_s, wout_u, wout_s;
  int checks = 0, failures = 0;

  mac_cell dut_u (.clk, .rst, .en, .wg_set, .w_in, .din, .acc_in,
                  .acc_out(acc_u), .dout(dout_u), .w_out(wout_u));
  mac_cell #(.SIGNED(1'b1)) dut_s (.clk, .rst, .en, .wg_set, .w_in, .din, .acc_in,
                  .acc_out(acc_s), .dout(dout_s), .w_out(wout_s));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic set_weight(logic [7:0] w);
    @(negedge clk); wg_set = 1'b1; en = 1'b0; w_in = w;
    @(negedge clk); wg_set = 1'b0;
    check("w_out", 16'(wout_u), 16'(w));
  endtask

  // one MAC with both instances; returns after the result is visible
  task automatic mac(logic [7:0] d, logic [15:0] a);
    @(negedge clk); en = 1'b1; din = d; acc_in = a;
    @(negedge clk); en = 1'b0;
  endtask

  initial begin
    en = 0; wg_set = 0; w_in = 0; din = 0; acc_in = 0;
    repeat (2) @(negedge clk);
    check("reset acc", acc_u, 16'd0);
    rst = 1'b1;
    // reference waveform operations
    set_weight(8'd100); mac(8'd50, 16'd200);    check("fig 5200", acc_u, 16'd5200);
    check("dout", 16'(dout_u), 16'd50);
    set_weight(8'd30);  mac(8'd70, 16'd1500);   check("fig 3600", acc_u, 16'd3600);
    set_weight(8'd250); mac(8'd150, 16'd15550); check("fig 53050", acc_u, 16'd53050);
    // en low: outputs hold
    @(negedge clk); din = 8'd1; acc_in = 16'd1; en = 1'b0;
    @(negedge clk);
    check("hold acc", acc_u, 16'd53050);
    check("hold dout", 16'(dout_u), 16'd150);
    // latency: result must not be visible before the clock edge
    @(negedge clk); en = 1'b1; din = 8'd2; acc_in = 16'd7;
    #1 check("no early update", acc_u, 16'd53050);
    @(negedge clk); en = 1'b0;
    check("one clock", acc_u, 16'(16'd7 + 16'd2 * 16'd250));
    // random operands
    for (int i = 0; i < 200; i++) begin
      logic [7:0] w, d; logic [15:0] a;
      w = 8'($urandom); d = 8'($urandom); a = 16'($urandom);
      set_weight(w);
      mac(d, a);
      check("rand unsigned", acc_u, 16'(a + 16'(d) * 16'(w)));
      check("rand signed", acc_s, 16'(int'(a) + int'($signed(d)) * int'($signed(w))));
      check("rand dout", 16'(dout_s), 16'(d));
    end
    // reset clears
    rst = 1'b0; #1;
    check("async reset", acc_u, 16'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
