// cnn_accel_top: AlexNet inference accelerator built around one 12x14 matrix
// of processing elements that serves every CONV and FC layer.
//
// Blocks: the PE matrix (pe_array) and its control unit (layer_ctrl); the
// global buffers - filter buffer, PSUM buffer and two swapping buffers that
// take turns holding a layer's input and output; the max-pooling unit
// (maxpool_unit), the LRN engine (lrn_engine) and the class estimation unit
// (estimation_unit). Weights, biases and the image live off chip; a host moves
// them into the buffers through the load port and reads results back through
// the read port, as the external memory traffic the design describes.
//
// Operation: the host issues one command at a time (cmd_valid while
// cmd_ready). A command is one pass of one engine:
//   OP_CONV  layer_ctrl: part of a CONV layer (rows x filter batch x depths),
//            accumulated in the PSUM buffer
//   OP_FC    layer_ctrl: a batch of FC neurons, written to a swapping buffer
//   OP_POOL  maxpool_unit: PSUM buffer -> swapping buffer (3x3/2 or copy)
//   OP_LRN   lrn_engine: swapping buffer -> other swapping buffer
//   OP_EST   estimation_unit: arg-max over the class scores
// done pulses when the command has finished. A whole layer, and the whole
// network, is a command list computed offline (the design's mapper).
//
// Buffers have one read and one write port each. Only the engine running a
// command uses them, so each port is simply routed to whichever requester
// addresses it. The host ports must only be used while cmd_ready is high.
// pool_partial / pool_merged count partial and merged pooling windows, and
// 'events' gives one-cycle pulses of the datapath's mechanisms for statistics.
//
// The block set, the PE matrix shape, the buffer sizes, the dataflow and the
// layer sequence follow the design. The command interface, the host ports
// standing in for the external memory, the buffer port routing and the event
// port are this implementation's own.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned FILTER_DEPTH = FILTER_BUF_DEPTH,
  parameter int unsigned PSUM_DEPTH   = PSUM_BUF_DEPTH,
  parameter int unsigned SWAP_DEPTH   = SWAP_BUF_DEPTH
) (
  input  logic        clk,
  input  logic        rst_n,
  // command interface
  input  logic        cmd_valid,
  input  cmd_t        cmd,
  output logic        cmd_ready,
  output logic        done,
  // host / external-memory load port
  input  logic        ld_we,
  input  buf_sel_e    ld_buf,
  input  baddr_t      ld_addr,
  input  data_t       ld_data,
  // host read port (data one cycle after the address)
  input  logic        hr_re,
  input  buf_sel_e    hr_buf,
  input  baddr_t      hr_addr,
  output data_t       hr_rdata,
  // class estimation result
  output logic [12:0] est_cls,
  output data_t       est_score,
  // pooling statistics
  output logic [15:0] pool_partial,
  output logic [15:0] pool_merged,
  // event pulses
  output event_t      events
);

  // ------------------------------------------------------------- commands
  cmd_t cmd_q;
  logic busy_q;
  logic start_q;
  logic lc_busy, mp_busy, lr_busy, es_busy;
  logic lc_done, mp_done, lr_done, es_done;

  assign cmd_ready = !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q   <= '0;
      busy_q  <= 1'b0;
      start_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      start_q <= 1'b0;
      done    <= 1'b0;
      if (!busy_q && cmd_valid) begin
        cmd_q   <= cmd;
        busy_q  <= 1'b1;
        start_q <= 1'b1;
      end else if (busy_q && !start_q && (lc_done || mp_done || lr_done || es_done)) begin
        busy_q <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  logic st_layer, st_pool, st_lrn, st_est;
  assign st_layer = start_q && (cmd_q.op == OP_CONV || cmd_q.op == OP_FC);
  assign st_pool  = start_q && (cmd_q.op == OP_POOL);
  assign st_lrn   = start_q && (cmd_q.op == OP_LRN);
  assign st_est   = start_q && (cmd_q.op == OP_EST);

  layer_cfg_t lcfg;
  always_comb begin
    lcfg    = cmd_q.layer;
    lcfg.fc = (cmd_q.op == OP_FC);
  end

  // -------------------------------------------------------------- engines
  logic       lc_in_re, lc_w_re, lc_ps_we, lc_ps_acc, lc_ps_relu, lc_out_we;
  baddr_t     lc_in_raddr, lc_w_raddr, lc_ps_waddr, lc_out_waddr;
  data_t      lc_in_rdata, lc_w_rdata, lc_out_wdata;
  psum_t      lc_ps_wdata;
  array_cfg_t acfg;
  rf_wr_t     rf_wr;
  mac_cmd_t   mac;
  psum_t      col_sum [PE_COLS];

  layer_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (st_layer),
    .cfg       (lcfg),
    .busy      (lc_busy),
    .done      (lc_done),
    .in_re     (lc_in_re),
    .in_raddr  (lc_in_raddr),
    .in_rdata  (lc_in_rdata),
    .w_re      (lc_w_re),
    .w_raddr   (lc_w_raddr),
    .w_rdata   (lc_w_rdata),
    .acfg      (acfg),
    .rf_wr     (rf_wr),
    .mac       (mac),
    .col_sum   (col_sum),
    .ps_we     (lc_ps_we),
    .ps_waddr  (lc_ps_waddr),
    .ps_wdata  (lc_ps_wdata),
    .ps_acc    (lc_ps_acc),
    .ps_relu   (lc_ps_relu),
    .out_we    (lc_out_we),
    .out_waddr (lc_out_waddr),
    .out_wdata (lc_out_wdata)
  );

  pe_array u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg     (acfg),
    .wr      (rf_wr),
    .mac     (mac),
    .col_sum (col_sum)
  );

  logic   mp_ps_re, mp_dst_re, mp_dst_we;
  baddr_t mp_ps_raddr, mp_dst_raddr, mp_dst_waddr;
  psum_t  mp_ps_rdata;
  data_t  mp_dst_rdata, mp_dst_wdata;

  maxpool_unit u_pool (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (st_pool),
    .cfg       (cmd_q.pool),
    .busy      (mp_busy),
    .done      (mp_done),
    .ps_re     (mp_ps_re),
    .ps_raddr  (mp_ps_raddr),
    .ps_rdata  (mp_ps_rdata),
    .dst_re    (mp_dst_re),
    .dst_raddr (mp_dst_raddr),
    .dst_rdata (mp_dst_rdata),
    .dst_we    (mp_dst_we),
    .dst_waddr (mp_dst_waddr),
    .dst_wdata (mp_dst_wdata),
    .n_partial (pool_partial),
    .n_merge   (pool_merged)
  );

  logic   lr_re, lr_we;
  baddr_t lr_raddr, lr_waddr;
  data_t  lr_rdata, lr_wdata;

  lrn_engine u_lrn (
    .clk   (clk),
    .rst_n (rst_n),
    .start (st_lrn),
    .cfg   (cmd_q.lrn),
    .busy  (lr_busy),
    .done  (lr_done),
    .re    (lr_re),
    .raddr (lr_raddr),
    .rdata (lr_rdata),
    .we    (lr_we),
    .waddr (lr_waddr),
    .wdata (lr_wdata)
  );

  logic   es_re;
  baddr_t es_raddr;
  data_t  es_rdata;

  estimation_unit u_est (
    .clk   (clk),
    .rst_n (rst_n),
    .start (st_est),
    .cfg   (cmd_q.est),
    .busy  (es_busy),
    .done  (es_done),
    .re    (es_re),
    .raddr (es_raddr),
    .rdata (es_rdata),
    .cls   (est_cls),
    .score (est_score)
  );

  // ------------------------------------------------------- global buffers
  logic   b_we [3];
  baddr_t b_waddr [3];
  data_t  b_wdata [3];
  logic   b_re [3];
  baddr_t b_raddr [3];
  data_t  b_rdata [3];

  always_comb begin
    for (int b = 0; b < 3; b++) begin
      buf_sel_e sel;
      sel = buf_sel_e'(b);
      // write port
      b_we[b]    = 1'b0;
      b_waddr[b] = '0;
      b_wdata[b] = '0;
      if (ld_we && ld_buf == sel) begin
        b_we[b] = 1'b1; b_waddr[b] = ld_addr; b_wdata[b] = ld_data;
      end else if (lc_out_we && cmd_q.layer.dst == sel) begin
        b_we[b] = 1'b1; b_waddr[b] = lc_out_waddr; b_wdata[b] = lc_out_wdata;
      end else if (mp_dst_we && cmd_q.pool.dst == sel) begin
        b_we[b] = 1'b1; b_waddr[b] = mp_dst_waddr; b_wdata[b] = mp_dst_wdata;
      end else if (lr_we && cmd_q.lrn.dst == sel) begin
        b_we[b] = 1'b1; b_waddr[b] = lr_waddr; b_wdata[b] = lr_wdata;
      end
      // read port
      b_re[b]    = 1'b0;
      b_raddr[b] = '0;
      if (hr_re && hr_buf == sel) begin
        b_re[b] = 1'b1; b_raddr[b] = hr_addr;
      end else if (lc_in_re && cmd_q.layer.src == sel) begin
        b_re[b] = 1'b1; b_raddr[b] = lc_in_raddr;
      end else if (lc_w_re && cmd_q.layer.wsrc == sel) begin
        b_re[b] = 1'b1; b_raddr[b] = lc_w_raddr;
      end else if (mp_dst_re && cmd_q.pool.dst == sel) begin
        b_re[b] = 1'b1; b_raddr[b] = mp_dst_raddr;
      end else if (lr_re && cmd_q.lrn.src == sel) begin
        b_re[b] = 1'b1; b_raddr[b] = lr_raddr;
      end else if (es_re && cmd_q.est.src == sel) begin
        b_re[b] = 1'b1; b_raddr[b] = es_raddr;
      end
    end
  end

  global_buffer #(.DEPTH(FILTER_DEPTH)) u_filter_buf (
    .clk (clk), .we (b_we[0]), .waddr (b_waddr[0]), .wdata (b_wdata[0]),
    .re (b_re[0]), .raddr (b_raddr[0]), .rdata (b_rdata[0])
  );
  global_buffer #(.DEPTH(SWAP_DEPTH)) u_swap1 (
    .clk (clk), .we (b_we[1]), .waddr (b_waddr[1]), .wdata (b_wdata[1]),
    .re (b_re[1]), .raddr (b_raddr[1]), .rdata (b_rdata[1])
  );
  global_buffer #(.DEPTH(SWAP_DEPTH)) u_swap2 (
    .clk (clk), .we (b_we[2]), .waddr (b_waddr[2]), .wdata (b_wdata[2]),
    .re (b_re[2]), .raddr (b_raddr[2]), .rdata (b_rdata[2])
  );

  // Read data back to each requester (selects are stable during a command;
  // the host's select is registered with its read).
  buf_sel_e hr_buf_q;
  always_ff @(posedge clk) hr_buf_q <= hr_buf;

  function automatic data_t pick(input buf_sel_e s, input data_t d0, input data_t d1, input data_t d2);
    unique case (s)
      BUF_FILTER: return d0;
      BUF_SWAP1:  return d1;
      default:    return d2;
    endcase
  endfunction

  assign hr_rdata     = pick(hr_buf_q,         b_rdata[0], b_rdata[1], b_rdata[2]);
  assign lc_in_rdata  = pick(cmd_q.layer.src,  b_rdata[0], b_rdata[1], b_rdata[2]);
  assign lc_w_rdata   = pick(cmd_q.layer.wsrc, b_rdata[0], b_rdata[1], b_rdata[2]);
  assign mp_dst_rdata = pick(cmd_q.pool.dst,   b_rdata[0], b_rdata[1], b_rdata[2]);
  assign lr_rdata     = pick(cmd_q.lrn.src,    b_rdata[0], b_rdata[1], b_rdata[2]);
  assign es_rdata     = pick(cmd_q.est.src,    b_rdata[0], b_rdata[1], b_rdata[2]);

  psum_buffer #(.DEPTH(PSUM_DEPTH)) u_psum_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (lc_ps_we),
    .wr_addr (lc_ps_waddr),
    .wr_data (lc_ps_wdata),
    .wr_acc  (lc_ps_acc),
    .wr_relu (lc_ps_relu),
    .re      (mp_ps_re),
    .raddr   (mp_ps_raddr),
    .rdata   (mp_ps_rdata)
  );

  // ------------------------------------------------------------ events
  // An ifmap register-file write whose element was not read from a buffer
  // the cycle before is a padding zero.
  logic lc_in_re_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lc_in_re_q <= 1'b0;
    else        lc_in_re_q <= lc_in_re;
  end

  always_comb begin
    events.ps_store   = lc_ps_we && !lc_ps_acc;
    events.ps_accum   = lc_ps_we && lc_ps_acc;
    events.ps_last    = lc_ps_we && lc_ps_relu;
    events.pad_zero   = rf_wr.en && !rf_wr.to_filter && rf_wr.tag == TAG_DIAG && !lc_in_re_q;
    events.flt_load   = rf_wr.en && rf_wr.to_filter && rf_wr.addr == '0 && rf_wr.row == '0;
    events.gated_step = mac.en && (acfg.rows_used < 4'(PE_ROWS) || acfg.cols_used < 4'(PE_COLS));
    events.copy_wr    = mp_dst_we && cmd_q.pool.win == 2'd1;
    events.lrn_wr     = lr_we;
    events.fc_wr      = lc_out_we;
    events.est_done   = es_done;
  end

  // Engines only run one at a time.
  always_ff @(posedge clk) begin
    if (rst_n) assert (3'(lc_busy) + 3'(mp_busy) + 3'(lr_busy) + 3'(es_busy) <= 3'd1)
      else $error("two engines busy at once");
  end

endmodule
