// layer_ctrl: control unit of one CONV or FC pass on the PE matrix.
//
// CONV pass (cfg.fc = 0). A pass computes ncol output rows of nf filters over
// ngrp*nd input depths:
//   1. LD_IN  (if load_input) streams the needed input rows of every depth
//      from the ifmap buffer into the ifmap register files, inserting zeros
//      for padding. Padded row r of depth group g is broadcast once and taken
//      by every PE it belongs to (diagonal placement, see pe_array). Inside a
//      PE, depth ds of the group occupies words ds*Wp .. ds*Wp+Wp-1, with Wp
//      the padded row length.
//      Channel c, row y, column x is read from in_base + (c*in_h + y)*in_w + x.
//   2. For each batch of nf_rf filters, LD_W copies their rows for the pass'
//      depths from the weight buffer into the filter register files: filter i
//      of the batch, depth ds, column j at word (i*nd+ds)*K+j of PE row g*K+kr.
//      Weight (f, c, kr, j) is read from w_base + ((f*flt_c + c)*K + kr)*K + j.
//   3. For each filter of the batch and each output pixel x, MAC broadcasts
//      nd*K steps (weight (i*nd+ds)*K+j against pixel ds*Wp+x*S+j), WAIT lets
//      the last product settle, and DRAIN writes the 'ncol' column sums to the
//      PSUM buffer, rows psum_row0.., one per cycle: stored on the first depth
//      pass, added on the others, and with bias and ReLU on the last.
// FC pass (cfg.fc = 1). nf neurons are computed side by side. Neuron s uses
// fc_rows x fc_cols PEs: chunk q = qc*fc_rows+qr of the input vector (fc_chunk
// words, zero past fc_len) goes to PE (qr, s*fc_cols+qc), together with the
// same chunk of the neuron's weights. One MAC run of fc_chunk steps, then the
// neuron's column sums are added with the bias, ReLU'd if asked, converted to
// a pixel and written to the output buffer at out_base+f0+s.
//
// Memories: every buffer read returns data one cycle after its address; the
// register-file write that uses it is issued that next cycle. The PSUM buffer
// accepts one accumulate-write per cycle.
// acfg tells the PE matrix the pass' shape: fc, k, stride and ngrp are copied
// straight from cfg, rows_used and cols_used are derived from it.
// Handshake: pulse start with cfg stable until done; busy is high in between;
// done pulses for one cycle at the end.
//
// The loop order (input loaded once per pass, filters loaded in batches,
// filters computed one after another, PSUM accumulation over depth passes,
// bias on the last pass, FC neurons side by side across PE columns) follows
// the design. The one-pixel-at-a-time MAC schedule, the serial PSUM drain and
// the FC column reduction adder are this implementation's choices.
module layer_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned COLS = PE_COLS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  layer_cfg_t    cfg,
  output logic          busy,
  output logic          done,
  // ifmap / FC input buffer
  output logic          in_re,
  output baddr_t        in_raddr,
  input  data_t         in_rdata,
  // weight buffer
  output logic          w_re,
  output baddr_t        w_raddr,
  input  data_t         w_rdata,
  // PE matrix
  output array_cfg_t    acfg,
  output rf_wr_t        rf_wr,
  output mac_cmd_t      mac,
  input  psum_t         col_sum [COLS],
  // PSUM buffer
  output logic          ps_we,
  output baddr_t        ps_waddr,
  output psum_t         ps_wdata,
  output logic          ps_acc,
  output logic          ps_relu,
  // FC output
  output logic          out_we,
  output baddr_t        out_waddr,
  output data_t         out_wdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_LD_IN, S_LD_W, S_BIAS, S_BIAS_W, S_MAC, S_WAIT, S_DRAIN, S_FCOUT, S_DONE
  } state_e;

  state_e state;

  // Loop counters. Their meaning depends on the state (see below).
  logic [7:0]  c_a, c_b, c_c, c_d, c_e;   // outer .. inner
  logic [4:0]  fb;                        // filter batch (CONV)
  logic [4:0]  fi;                        // filter within the batch (CONV)
  logic [7:0]  px;                        // output pixel (CONV)
  logic [1:0]  wcnt;
  psum_t       col_r  [COLS];
  data_t       bias_r [COLS];

  // ---------------------------------------------------------------- shape
  logic [8:0]  wp;          // padded row length
  logic [7:0]  rp;          // padded rows per pass
  logic [7:0]  kk;          // K*K
  logic [4:0]  filt;        // filter index inside the batch buffer

  always_comb begin
    wp   = 9'(cfg.in_w) + 9'(cfg.pad) * 9'd2;
    rp   = 8'((32'(cfg.ncol) - 1) * 32'(cfg.stride) + 32'(cfg.k));
    kk   = 8'(cfg.k) * 8'(cfg.k);
    filt = 5'(fb * cfg.nf_rf + fi);
  end

  always_comb begin
    acfg.fc        = cfg.fc;
    acfg.k         = cfg.k;
    acfg.stride    = cfg.stride;
    acfg.ngrp      = cfg.ngrp;
    acfg.rows_used = cfg.fc ? cfg.fc_rows : 4'(4'(cfg.ngrp) * cfg.k);
    acfg.cols_used = cfg.fc ? 4'(cfg.nf * cfg.fc_cols) : cfg.ncol;
  end

  // ------------------------------------------------- per-state addressing
  // LD_IN CONV: a=g b=ds c=r d=p      LD_IN FC: a=s b=qc c=qr d=p
  // LD_W  CONV: a=i b=g c=ds d=kr e=j LD_W  FC: a=s b=qc c=qr d=p
  // MAC   CONV: a=ds b=j              MAC   FC: a=j
  // DRAIN / FCOUT / BIAS(FC): a = column / slot
  logic           rd_valid;      // the element exists (not padding, not past the vector)
  baddr_t         rd_addr;
  rf_wr_t         wr_next;       // write that the read will feed
  logic signed [15:0] srow, scol;
  logic [15:0]    fc_idx;

  always_comb begin
    rd_valid = 1'b0;
    rd_addr  = '0;
    wr_next  = '0;
    srow     = '0;
    scol     = '0;
    fc_idx   = 16'((16'(c_b) * 16'(cfg.fc_rows) + 16'(c_c)) * 16'(cfg.fc_chunk) + 16'(c_d));
    if (state == S_LD_IN) begin
      wr_next.en        = 1'b1;
      wr_next.to_filter = 1'b0;
      if (!cfg.fc) begin
        srow = 16'(cfg.out_row0) * 16'(cfg.stride) + 16'(c_c) - 16'(cfg.pad);
        scol = 16'(c_d) - 16'(cfg.pad);
        rd_valid = (srow >= 0) && (srow < 16'(cfg.in_h)) && (scol >= 0) && (scol < 16'(cfg.in_w));
        rd_addr  = baddr_t'(32'(cfg.in_base) +
                            (32'(cfg.ch_base) + 32'(c_a) * 32'(cfg.nd) + 32'(c_b)) *
                            32'(cfg.in_h) * 32'(cfg.in_w) +
                            32'(srow) * 32'(cfg.in_w) + 32'(scol));
        wr_next.tag  = TAG_DIAG;
        wr_next.r    = 6'(c_c);
        wr_next.g    = 3'(c_a);
        wr_next.addr = RF_AW'(32'(c_b) * 32'(wp) + 32'(c_d));
      end else begin
        rd_valid     = fc_idx < 16'(cfg.fc_len);
        rd_addr      = baddr_t'(cfg.in_base + baddr_t'(fc_idx));
        wr_next.tag  = TAG_POINT;
        wr_next.row  = 4'(c_c);
        wr_next.col  = 4'(32'(c_a) * 32'(cfg.fc_cols) + 32'(c_b));
        wr_next.addr = RF_AW'(c_d);
      end
    end else if (state == S_LD_W) begin
      wr_next.en        = 1'b1;
      wr_next.to_filter = 1'b1;
      if (!cfg.fc) begin
        rd_valid     = 1'b1;
        rd_addr      = baddr_t'(32'(cfg.w_base) +
                                32'(fb * cfg.nf_rf + 5'(c_a)) * 32'(cfg.flt_c) * 32'(kk) +
                                (32'(cfg.flt_ch_base) + 32'(c_b) * 32'(cfg.nd) + 32'(c_c)) * 32'(kk) +
                                32'(c_d) * 32'(cfg.k) + 32'(c_e));
        wr_next.tag  = TAG_ROW;
        wr_next.row  = 4'(32'(c_b) * 32'(cfg.k) + 32'(c_d));
        wr_next.addr = RF_AW'((32'(c_a) * 32'(cfg.nd) + 32'(c_c)) * 32'(cfg.k) + 32'(c_e));
      end else begin
        rd_valid     = fc_idx < 16'(cfg.fc_len);
        rd_addr      = baddr_t'(32'(cfg.w_base) + 32'(c_a) * 32'(cfg.fc_len) + 32'(fc_idx));
        wr_next.tag  = TAG_POINT;
        wr_next.row  = 4'(c_c);
        wr_next.col  = 4'(32'(c_a) * 32'(cfg.fc_cols) + 32'(c_b));
        wr_next.addr = RF_AW'(c_d);
      end
    end else if (state == S_BIAS) begin
      rd_valid = 1'b1;
      rd_addr  = cfg.fc ? baddr_t'(32'(cfg.bias_base) + 32'(cfg.f0) + 32'(c_a))
                        : baddr_t'(32'(cfg.bias_base) + 32'(filt));
    end
  end

  // Reads.
  always_comb begin
    in_re    = (state == S_LD_IN) && rd_valid;
    in_raddr = rd_addr;
    w_re     = (state == S_LD_W || state == S_BIAS) && rd_valid;
    w_raddr  = rd_addr;
  end

  // Register-file write one cycle after the read.
  rf_wr_t pend;
  logic   pend_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= '0;
      pend_zero <= 1'b0;
    end else begin
      pend      <= wr_next;
      pend_zero <= !rd_valid;
    end
  end

  always_comb begin
    rf_wr      = pend;
    rf_wr.data = pend_zero ? data_t'(0) : (pend.to_filter ? w_rdata : in_rdata);
  end

  // MAC broadcast.
  always_comb begin
    mac = '0;
    if (state == S_MAC) begin
      mac.en = 1'b1;
      if (!cfg.fc) begin
        mac.first = (c_a == 0) && (c_b == 0);
        mac.faddr = RF_AW'((32'(fi) * 32'(cfg.nd) + 32'(c_a)) * 32'(cfg.k) + 32'(c_b));
        mac.iaddr = RF_AW'(32'(c_a) * 32'(wp) + 32'(px) * 32'(cfg.stride) + 32'(c_b));
      end else begin
        mac.first = (c_a == 0);
        mac.faddr = RF_AW'(c_a);
        mac.iaddr = RF_AW'(c_a);
      end
    end
  end

  // PSUM drain (CONV).
  always_comb begin
    ps_we    = (state == S_DRAIN);
    ps_waddr = baddr_t'((32'(filt) * 32'(cfg.psum_h) + 32'(cfg.psum_row0) + 32'(c_a)) *
                        32'(cfg.out_w) + 32'(px));
    ps_wdata = col_r[4'(c_a)] + (cfg.last ? bias_align(bias_r[0]) : psum_t'(0));
    ps_acc   = !cfg.first;
    ps_relu  = cfg.last && cfg.relu;
  end

  // FC output: sum of the slot's columns plus its bias.
  psum_t fc_sum;
  always_comb begin
    fc_sum = bias_align(bias_r[4'(c_a)]);
    for (int q = 0; q < int'(COLS); q++)
      if (q >= int'(32'(c_a) * 32'(cfg.fc_cols)) && q < int'((32'(c_a) + 1) * 32'(cfg.fc_cols)))
        fc_sum = fc_sum + col_r[q];
    if (cfg.relu && fc_sum < 0) fc_sum = '0;
    out_we    = (state == S_FCOUT);
    out_waddr = baddr_t'(32'(cfg.out_base) + 32'(cfg.f0) + 32'(c_a));
    out_wdata = requant(fc_sum);
  end

  // ---------------------------------------------------------- sequencing
  // One five-level loop nest (a outermost .. e innermost) serves every state;
  // a level a state does not use has limit 1.
  logic [8:0] lim_a, lim_b, lim_c, lim_d, lim_e;

  always_comb begin
    {lim_a, lim_b, lim_c, lim_d, lim_e} = {5{9'd1}};
    unique case (state)
      S_LD_IN: if (!cfg.fc) begin
                 lim_a = 9'(cfg.ngrp); lim_b = 9'(cfg.nd); lim_c = 9'(rp); lim_d = wp;
               end else begin
                 lim_a = 9'(cfg.nf); lim_b = 9'(cfg.fc_cols); lim_c = 9'(cfg.fc_rows);
                 lim_d = cfg.fc_chunk;
               end
      S_LD_W:  if (!cfg.fc) begin
                 lim_a = 9'(cfg.nf_rf); lim_b = 9'(cfg.ngrp); lim_c = 9'(cfg.nd);
                 lim_d = 9'(cfg.k); lim_e = 9'(cfg.k);
               end else begin
                 lim_a = 9'(cfg.nf); lim_b = 9'(cfg.fc_cols); lim_c = 9'(cfg.fc_rows);
                 lim_d = cfg.fc_chunk;
               end
      S_BIAS:  lim_a = cfg.fc ? 9'(cfg.nf) : 9'd1;
      S_MAC:   if (!cfg.fc) begin lim_a = 9'(cfg.nd); lim_b = 9'(cfg.k); end
               else               lim_a = cfg.fc_chunk;
      S_DRAIN: lim_a = 9'(cfg.ncol);
      S_FCOUT: lim_a = 9'(cfg.nf);
      default: ;
    endcase
  end

  logic w_e, w_d, w_c, w_b, w_a;   // level wraps this cycle
  always_comb begin
    w_e = 9'(c_e) + 9'd1 >= lim_e;
    w_d = w_e && (9'(c_d) + 9'd1 >= lim_d);
    w_c = w_d && (9'(c_c) + 9'd1 >= lim_c);
    w_b = w_c && (9'(c_b) + 9'd1 >= lim_b);
    w_a = w_b && (9'(c_a) + 9'd1 >= lim_a);
  end

  logic       bias_pend;
  logic [3:0] bias_slot;

  // Captured column sums and biases (no reset needed: written before use).
  always_ff @(posedge clk) begin
    if (bias_pend) bias_r[bias_slot] <= w_rdata;
    if (state == S_WAIT && wcnt == 2'd1)
      for (int q = 0; q < int'(COLS); q++) col_r[q] <= col_sum[q];
  end

  logic counting;
  assign counting = (state == S_LD_IN) || (state == S_LD_W) || (state == S_BIAS) ||
                    (state == S_MAC) || (state == S_DRAIN) || (state == S_FCOUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_a <= '0; c_b <= '0; c_c <= '0; c_d <= '0; c_e <= '0;
    end else if (state == S_IDLE) begin
      c_a <= '0; c_b <= '0; c_c <= '0; c_d <= '0; c_e <= '0;
    end else if (counting) begin
      c_e <= w_e ? '0 : c_e + 8'd1;
      if (w_e) c_d <= w_d ? '0 : c_d + 8'd1;
      if (w_d) c_c <= w_c ? '0 : c_c + 8'd1;
      if (w_c) c_b <= w_b ? '0 : c_b + 8'd1;
      if (w_b) c_a <= w_a ? '0 : c_a + 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      fb <= '0; fi <= '0; px <= '0; wcnt <= '0;
      done      <= 1'b0;
      bias_pend <= 1'b0;
      bias_slot <= '0;
    end else begin
      done      <= 1'b0;
      bias_pend <= (state == S_BIAS);
      bias_slot <= cfg.fc ? 4'(c_a) : 4'd0;
      unique case (state)
        S_IDLE: if (start) begin
          fb <= '0; fi <= '0; px <= '0;
          state <= cfg.load_input ? S_LD_IN : S_LD_W;
        end
        S_LD_IN:  if (w_a) state <= S_LD_W;
        S_LD_W:   if (w_a) begin
                    fi    <= '0;
                    state <= S_BIAS;
                  end
        S_BIAS:   if (w_a) begin
                    px    <= '0;
                    state <= S_BIAS_W;
                  end
        S_BIAS_W: state <= S_MAC;
        S_MAC:    if (w_a) begin
                    wcnt  <= '0;
                    state <= S_WAIT;
                  end
        S_WAIT: begin
          wcnt <= wcnt + 2'd1;
          if (wcnt == 2'd1) state <= cfg.fc ? S_FCOUT : S_DRAIN;
        end
        S_DRAIN: if (w_a) begin
          if (32'(px) + 1 < 32'(cfg.out_w)) begin
            px    <= px + 8'd1;
            state <= S_MAC;
          end else if (32'(fi) + 1 < 32'(cfg.nf_rf) && 32'(filt) + 1 < 32'(cfg.nf)) begin
            fi    <= fi + 5'd1;
            state <= S_BIAS;
          end else if (32'(filt) + 1 < 32'(cfg.nf)) begin
            fb    <= fb + 5'd1;
            fi    <= '0;
            state <= S_LD_W;
          end else begin
            state <= S_DONE;
          end
        end
        S_FCOUT: if (w_a) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
