// tb_cnn_full: the end-to-end test of tb_cnn_accelerator with the accelerator
// at its default configuration: 64 x 64 array, unsigned 8-bit data, 16 KB
// activation cache, the whole 128 x 128 image. The 128 image rows are the input
// vectors: the left halves (even cache words) against W1, the right halves (odd
// words) against W2 accumulated on top, the results written back over the
// image, and a second layer W3 run on them. Checks every result against the
// reference model kept here, the 2N+5 clock first-result latency and that the
// image load, weight loads, stalls, accumulation and reuse all happen.
module tb_cnn_full;
  import sa_pkg::*;
  localparam int  N = 64, IQ = 8, OQ = 8, ACCD = 128, CB = 16384, IMG = 16384, SH = 8;
  localparam bit  SG = 1'b0;
  localparam int  NV = 128;
  localparam int  WORDS = CB / N;
  localparam int  MAXWAIT = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic wt_valid, wt_ready, cmd_valid, cmd_ready, out_valid, out_ready;
  logic img_loaded, busy, ev_stall, ev_relu_clamp, ev_relu_sat;
  logic [N-1:0][7:0] wt_row, out_data;
  cmd_t cmd;

  cnn_accelerator dut (.*);

  // ---------------- reference model ----------------
  localparam logic [7:0] HEAD [19] = '{8'h9e, 8'h9d, 8'h9b, 8'h9d, 8'h9d, 8'h99, 8'h9a,
      8'h9d, 8'h9a, 8'h99, 8'h9a, 8'h97, 8'h9a, 8'h9e, 8'h9e, 8'h9a, 8'h9c, 8'h9d, 8'h9b};
  logic [7:0]  cache_ref [CB];
  logic [7:0]  W [N][N];
  logic [15:0] bank [ACCD][N];
  logic [N-1:0][7:0] expq [$];
  int n_img = 0, n_wload = 0, n_stall = 0, n_clamp = 0, n_sat = 0, n_acc = 0, n_reuse = 0;

  function automatic int pixel(int a);
    if (a < 19) return int'(HEAD[a]);
    return (8'h80 + (((a % 128) ^ (a / 128)) & 8'h3f)) & 8'hff;
  endfunction

  function automatic int ext(logic [7:0] v);
    return SG ? int'($signed(v)) : int'(v);
  endfunction

  function automatic logic [7:0] act(logic [15:0] s);
    int v;
    v = SG ? int'($signed(s)) : int'(s);
    if (v < 0) return 8'd0;
    v = v >> SH;
    if (v > (SG ? 127 : 255)) v = SG ? 127 : 255;
    return 8'(v);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // ---------------- stimulus ----------------
  task automatic load_weights(int lo, int hi);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) W[r][c] = 8'($urandom_range(hi - lo) + lo);
    for (int i = 0; i < N; i++) begin     // bottom row first
      @(negedge clk);
      while (!wt_ready) @(negedge clk);
      wt_valid = 1'b1;
      for (int c = 0; c < N; c++) wt_row[c] = W[N-1-i][c];
      @(negedge clk); wt_valid = 1'b0;
    end
    while (!cmd_ready) @(negedge clk);
    cmd = '0; cmd.op = OP_LOAD_W; cmd_valid = 1'b1;
    @(negedge clk); cmd_valid = 1'b0;
    while (!cmd_ready) @(negedge clk);
    n_wload++;
  endtask

  // expected results of a RUN, computed from the reference cache
  task automatic model_run(int src, int sstr, int nv, bit acc, bit wb, int dst, int dstr);
    for (int k = 0; k < nv; k++) begin
      logic [N-1:0][7:0] y;
      int sw; sw = (src + k * sstr) % WORDS;
      for (int c = 0; c < N; c++) begin
        logic [15:0] s;
        s = acc ? bank[k][c] : 16'd0;
        for (int r = 0; r < N; r++) s += 16'(ext(cache_ref[sw * N + r]) * ext(W[r][c]));
        bank[k][c] = s;
        y[c] = act(s);
      end
      expq.push_back(y);
    end
    // results reach the cache only after all inputs of the run have been read
    if (wb)
      for (int k = 0; k < nv; k++) begin
        int dw; dw = (dst + k * dstr) % WORDS;
        for (int c = 0; c < N; c++) cache_ref[dw * N + c] = expq[expq.size() - nv + k][c];
      end
  endtask

  int first_lat;
  task automatic run(int src, int sstr, int nv, bit acc, bit wb, int dst, int dstr, bit stalls);
    longint t0;
    int got;
    model_run(src, sstr, nv, acc, wb, dst, dstr);
    while (!cmd_ready) @(negedge clk);
    cmd = '0; cmd.op = OP_RUN; cmd.src_base = 16'(src); cmd.src_stride = 16'(sstr);
    cmd.nvec = 16'(nv); cmd.accumulate = acc; cmd.write_back = wb;
    cmd.dst_base = 16'(dst); cmd.dst_stride = 16'(dstr);
    cmd_valid = 1'b1;
    @(posedge clk); t0 = cyc + 1;
    @(negedge clk); cmd_valid = 1'b0;
    got = 0; first_lat = -1;
    while (got < nv) begin
      out_ready = stalls ? ($urandom_range(0, 3) == 0) : 1'b1;
      #1;
      if (ev_stall) n_stall++;
      if (ev_relu_clamp) n_clamp++;
      if (ev_relu_sat) n_sat++;
      if (out_valid && first_lat < 0) first_lat = int'(cyc - t0);
      if (out_valid && out_ready) begin
        logic [N-1:0][7:0] e;
        e = expq.pop_front();
        for (int c = 0; c < N; c++)
          chk($sformatf("result %0d col %0d", got, c), longint'(out_data[c]), longint'(e[c]));
        got++;
      end
      @(negedge clk);
      if (cyc > MAXWAIT) break;
    end
    out_ready = 1'b0;
    while (!cmd_ready) @(negedge clk);
    chk("all results", got, nv);
    if (acc) n_acc++;
  endtask

  initial begin
    wt_valid = 0; wt_row = '0; cmd_valid = 0; cmd = '0; out_ready = 0;
    for (int a = 0; a < CB; a++) cache_ref[a] = (a < IMG) ? 8'(pixel(a)) : 8'h00;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!img_loaded) @(negedge clk);
    chk("image load clocks", cyc, IMG + 4);
    n_img++;
    load_weights(SG ? -4 : 0, 3);
    run(0, 2, NV, 1'b0, 1'b0, 0, 0, 1'b0);
    chk("first result latency", first_lat, 2 * N + 5);
    load_weights(SG ? -4 : 0, 3);
    run(1, 2, NV, 1'b1, 1'b1, 0, 2, 1'b1);
    load_weights(SG ? -4 : 0, 3);
    run(0, 2, NV, 1'b0, 1'b0, 0, 0, 1'b1);
    n_reuse++;
    $display("mechanisms: image_load=%0d weight_load=%0d stall_clocks=%0d relu_clamp=%0d saturate=%0d accumulate_runs=%0d reuse_runs=%0d",
             n_img, n_wload, n_stall, n_clamp, n_sat, n_acc, n_reuse);
    chk("image load happened", longint'(n_img > 0), 1);
    chk("weight load happened", longint'(n_wload > 0), 1);
    chk("stall happened", longint'(n_stall > 0), 1);
    if (SG) chk("relu clamp happened", longint'(n_clamp > 0), 1);
    if (SG) chk("saturation happened", longint'(n_sat > 0), 1);
    chk("accumulation happened", longint'(n_acc > 0), 1);
    chk("write-back reuse happened", longint'(n_reuse > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXWAIT) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
