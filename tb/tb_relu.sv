// tb_relu: self-checking test of the activation stage (N = 4, SHIFT = 4) in
// unsigned and in signed mode. Random and corner values are compared with
// max(0, x) >> SHIFT saturated to 255 (unsigned) or 127 (signed); the clamp and
// saturation flags and the one-clock latency are checked as well.
module tb_relu;
  localparam int N = 4, SH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic advance, in_valid, ov_u, ov_s;
  logic [N-1:0][15:0] in_data;
  logic [N-1:0][7:0]  od_u, od_s;
  logic [N-1:0]       cl_u, cl_s, sa_u, sa_s;

  relu #(.N(N), .SHIFT(SH)) dut_u (.clk, .rst_n, .advance, .in_data, .in_valid,
      .out_data(od_u), .out_valid(ov_u), .clamped(cl_u), .saturated(sa_u));
  relu #(.N(N), .SHIFT(SH), .SIGNED(1'b1)) dut_s (.clk, .rst_n, .advance, .in_data, .in_valid,
      .out_data(od_s), .out_valid(ov_s), .clamped(cl_s), .saturated(sa_s));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    advance = 1; in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      for (int c = 0; c < N; c++)
        case (i)
          0: in_data[c] = 16'h8000;  1: in_data[c] = 16'h7fff;
          2: in_data[c] = 16'h0000;  3: in_data[c] = 16'h0ff0;
          default: in_data[c] = (i % 2) ? 16'($urandom) : 16'($urandom_range(0, 4095));
        endcase
      in_valid = 1'b1;
      #1 chk("latency", int'(ov_u), (i == 0) ? 0 : 1);
      @(negedge clk);
      chk("valid", int'(ov_u & ov_s), 1);
      for (int c = 0; c < N; c++) begin
        int xu, xs, eu, es;
        xu = int'(in_data[c]);
        xs = int'($signed(in_data[c]));
        eu = xu >> SH; if (eu > 255) eu = 255;
        es = (xs < 0) ? 0 : (xs >> SH); if (es > 127) es = 127;
        chk("unsigned", int'(od_u[c]), eu);
        chk("signed", int'(od_s[c]), es);
        chk("clamp flag", int'(cl_s[c]), int'(xs < 0));
        chk("sat flag", int'(sa_s[c]), int'(xs >= 0 && (xs >> SH) > 127));
        chk("unsigned no clamp", int'(cl_u[c]), 0);
      end
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
