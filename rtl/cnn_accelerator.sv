// cnn_accelerator: a weight-stationary systolic-array accelerator for the
// matrix products of a CNN layer, with 8-bit data and weights.
//
// Dataflow (one layer step, Y = act(X * W)):
//   main memory --> activation cache --> input queue --> N x N systolic array
//   --> accumulator --> ReLU --> output queue --> out port / activation cache
//   weight rows --> weight queue (weight_fetch) --> top edge of the array
//
// After reset the main memory streams the 16384-pixel input image, one pixel
// per clock, into the activation cache (bytes 0..16383, N pixels per cache
// word); img_loaded then goes high and commands (sa_pkg::cmd_t) are accepted
// with a cmd_valid/cmd_ready handshake:
//   OP_LOAD_W  once N weight rows have been pushed on wt_* (bottom row first),
//              shift them into the array (N clocks).
//   OP_RUN     read nvec words from the cache (src_base + k*src_stride), stream
//              them through the array, accumulate or overwrite the accumulator
//              bank entry k, apply ReLU/requantisation and deliver each result
//              on out_* (valid/ready). With write_back set, each result that
//              leaves on out_* is also written to cache word dst_base +
//              k*dst_stride, so a result can be the input of the next step.
// The result of input vector k leaves the array 2N-1 clocks after the vector
// entered it, then passes the accumulator (1 clock) and ReLU (1 clock) stages.
// When out_ready stays low and the output queue fills, the whole compute path
// stalls (ev_stall) without losing data. The block chain follows the published
// architecture; the command set, the handshakes, the stall rule and the
// automatic image load are this design's own. rst_n is active low.
module cnn_accelerator
  import sa_pkg::*;
#(
  parameter int unsigned N           = 64,
  parameter int unsigned IQ_DEPTH    = 8,
  parameter int unsigned OQ_DEPTH    = 8,
  parameter int unsigned ACC_DEPTH   = 128,
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned IMG_PIXELS  = 16384,
  parameter int unsigned SHIFT       = 8,
  parameter bit          SIGNED      = 1'b0,
  parameter string       INIT_FILE   = "rtl/image_pixels.hex"
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // weight rows into the weight queue
  input  logic                     wt_valid,
  input  logic [N-1:0][DATA_W-1:0] wt_row,
  output logic                     wt_ready,
  // commands
  input  logic                     cmd_valid,
  input  cmd_t                     cmd,
  output logic                     cmd_ready,
  // results
  output logic                     out_valid,
  output logic [N-1:0][DATA_W-1:0] out_data,
  input  logic                     out_ready,
  // status and events
  output logic                     img_loaded,
  output logic                     busy,
  output logic                     ev_stall,      // compute path held this clock
  output logic                     ev_relu_clamp, // a negative sum was clamped to 0
  output logic                     ev_relu_sat    // a sum was saturated to 8 bits
);

  localparam int unsigned WORDS = CACHE_BYTES / N;
  localparam int unsigned CAW   = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned BW    = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW    = $clog2(IMG_PIXELS + 1);
  localparam int unsigned IQW   = $clog2(IQ_DEPTH + 1);

  typedef enum logic [1:0] {S_IMG, S_IDLE, S_LOADW, S_RUN} state_e;

  state_e     state;
  cmd_t       cur;

  // ---------------- main memory and image load ----------------
  data_t             pixel;
  logic              primed;
  logic [PW-1:0]     pix_cnt;
  logic [CAW-1:0]    img_word;
  logic [BW-1:0]     img_byte;

  input_memory #(.DEPTH(IMG_PIXELS), .INIT_FILE(INIT_FILE)) u_main_memory (
    .clk       (clk),
    .rst       (rst_n),
    .memory_out(pixel)
  );

  // ---------------- activation cache ----------------
  logic                     c_we, c_re;
  logic [CAW-1:0]           c_waddr, c_raddr;
  logic [N-1:0]             c_wbe;
  logic [N-1:0][DATA_W-1:0] c_wdata, c_rdata;

  activation_cache #(.N(N), .BYTES(CACHE_BYTES)) u_cache (
    .clk  (clk),
    .we   (c_we),
    .waddr(c_waddr),
    .wbe  (c_wbe),
    .wdata(c_wdata),
    .re   (c_re),
    .raddr(c_raddr),
    .rdata(c_rdata)
  );

  // ---------------- weight queue ----------------
  logic                     wf_full, wf_load, wf_busy, wf_done, wg_set;
  logic [N-1:0][DATA_W-1:0] w_top;

  weight_fetch #(.N(N)) u_weight_fetch (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (wt_valid && wt_ready),
    .push_row(wt_row),
    .full    (wf_full),
    .load    (wf_load),
    .busy    (wf_busy),
    .done    (wf_done),
    .wg_set  (wg_set),
    .w_top   (w_top)
  );

  assign wt_ready = !wf_full && !wf_busy;

  // ---------------- input queue ----------------
  logic                     advance;
  logic                     rd_pending;
  logic                     iq_full;
  logic [IQW-1:0]           iq_count;
  logic [N-1:0][DATA_W-1:0] row_data;
  logic [N-1:0]             row_valid;

  input_queue #(.N(N), .DEPTH(IQ_DEPTH)) u_input_queue (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (rd_pending),
    .push_data(c_rdata),
    .full     (iq_full),
    .count    (iq_count),
    .advance  (advance),
    .row_data (row_data),
    .row_valid(row_valid)
  );

  // ---------------- systolic array ----------------
  logic [N-1:0][ACC_W-1:0] col_out;
  logic [N-1:0]            col_valid;

  systolic_array #(.N(N), .SIGNED(SIGNED)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (advance),
    .wg_set   (wg_set),
    .w_top    (w_top),
    .d_in     (row_data),
    .v_last   (row_valid[N-1]),
    .col_out  (col_out),
    .col_valid(col_valid)
  );

  // ---------------- accumulator and ReLU ----------------
  logic                     acc_start;
  logic [N-1:0][ACC_W-1:0]  sum;
  logic                     sum_valid;
  logic [N-1:0][DATA_W-1:0] act;
  logic                     act_valid;
  logic [N-1:0]             clamped, saturated;

  accumulator #(.N(N), .DEPTH(ACC_DEPTH)) u_accumulator (
    .clk       (clk),
    .rst_n     (rst_n),
    .advance   (advance),
    .start     (acc_start),
    .accumulate(cur.accumulate),
    .col_in    (col_out),
    .col_valid (col_valid),
    .sum_out   (sum),
    .sum_valid (sum_valid)
  );

  relu #(.N(N), .SHIFT(SHIFT), .SIGNED(SIGNED)) u_relu (
    .clk      (clk),
    .rst_n    (rst_n),
    .advance  (advance),
    .in_data  (sum),
    .in_valid (sum_valid),
    .out_data (act),
    .out_valid(act_valid),
    .clamped  (clamped),
    .saturated(saturated)
  );

  // ---------------- output queue ----------------
  output_queue #(.N(N), .DEPTH(OQ_DEPTH)) u_output_queue (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (act),
    .in_valid (act_valid),
    .advance  (advance),
    .out_data (out_data),
    .out_valid(out_valid),
    .out_ready(out_ready)
  );

  // ---------------- controller ----------------
  logic [CMD_W-1:0] rd_cnt, out_cnt;
  logic [CAW-1:0]   rd_addr, wr_addr;
  logic             out_fire, issue;

  assign out_fire = out_valid && out_ready;
  assign issue    = (state == S_RUN) && (rd_cnt != cur.nvec) &&
                    ((32'(iq_count) + 32'(rd_pending) + 1) <= IQ_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IMG;
      cur        <= '0;
      primed     <= 1'b0;
      pix_cnt    <= '0;
      img_word   <= '0;
      img_byte   <= '0;
      rd_pending <= 1'b0;
      rd_cnt     <= '0;
      out_cnt    <= '0;
      rd_addr    <= '0;
      wr_addr    <= '0;
    end else begin
      rd_pending <= issue;
      case (state)
        S_IMG: begin
          primed <= 1'b1;                 // ROM read latency: first pixel next clock
          if (primed) begin
            pix_cnt  <= pix_cnt + 1'b1;
            img_byte <= (img_byte == BW'(N - 1)) ? '0 : img_byte + 1'b1;
            if (img_byte == BW'(N - 1))
              img_word <= img_word + 1'b1;
            if (pix_cnt == PW'(IMG_PIXELS - 1))
              state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (cmd_valid) begin
            cur <= cmd;
            if (cmd.op == OP_LOAD_W) begin
              state <= S_LOADW;
            end else begin
              state   <= S_RUN;
              rd_cnt  <= '0;
              out_cnt <= '0;
              rd_addr <= CAW'(cmd.src_base);
              wr_addr <= CAW'(cmd.dst_base);
            end
          end
        end
        S_LOADW: begin
          if (wf_done)
            state <= S_IDLE;
        end
        S_RUN: begin
          if (issue) begin
            rd_cnt  <= rd_cnt + 1'b1;
            rd_addr <= rd_addr + CAW'(cur.src_stride);
          end
          if (out_fire) begin
            out_cnt <= out_cnt + 1'b1;
            wr_addr <= wr_addr + CAW'(cur.dst_stride);
            if (out_cnt == cur.nvec - 1'b1)
              state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign wf_load   = (state == S_IDLE) && cmd_valid && (cmd.op == OP_LOAD_W);
  assign acc_start = (state == S_IDLE) && cmd_valid && (cmd.op == OP_RUN);
  assign cmd_ready = (state == S_IDLE);

  // Cache ports: image bytes during the load, result words on write-back.
  always_comb begin
    c_re    = issue;
    c_raddr = rd_addr;
    if (state == S_IMG) begin
      c_we    = primed;
      c_waddr = img_word;
      c_wbe   = N'(1) << img_byte;
      c_wdata = {N{pixel}};
    end else begin
      c_we    = (state == S_RUN) && out_fire && cur.write_back;
      c_waddr = wr_addr;
      c_wbe   = '1;
      c_wdata = out_data;
    end
  end

  assign img_loaded    = (state != S_IMG);
  assign busy          = (state != S_IDLE);
  assign ev_stall      = !advance;
  assign ev_relu_clamp = |clamped;
  assign ev_relu_sat   = |saturated;

  // A RUN command needs at least one vector and must fit the accumulator bank.
  property p_cmd_ok;
    @(posedge clk) disable iff (!rst_n)
      (state == S_IDLE && cmd_valid && cmd.op == OP_RUN) |->
        (cmd.nvec != 0 && (!cmd.accumulate || 32'(cmd.nvec) <= ACC_DEPTH));
  endproperty
  a_cmd_ok: assert property (p_cmd_ok);

  // The input queue never receives a vector it cannot hold.
  a_iq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                     rd_pending |-> !iq_full);

endmodule
