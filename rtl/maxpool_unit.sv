// maxpool_unit: max pooling from the PSUM buffer into a swapping buffer.
//
// AlexNet pools with a 3x3 window and stride 2 after layers 1, 2 and 5. The
// unit reads the maps a CONV pass left in the PSUM buffer (after bias and
// ReLU), takes the maximum of every window, converts it to a pixel and writes
// it to the destination buffer at map (dst_ch_base+m), row oy, column ox.
//
// Partial pooling (dynamic window). Layer 1 is computed in parts of 14 output
// rows (13 for the last), so a window can straddle two parts: with rows
// 0..13 present, the window of output row 6 needs rows 12..14. The unit then
// pools the rows it has (a 2x3 window) and stores that maximum in the output
// location; when the next part arrives (row0 = 14) the remaining 1x3 of the
// window is pooled and combined with the stored value by a read-modify-write
// of the output. cfg.row0 is the global row number of PSUM row 0, and only
// windows that touch rows row0 .. row0+src_rows-1 are visited.
// With win = 1 and st = 1 the unit copies the PSUM maps to the buffer as
// pixels: layers 3 and 4 store their outputs that way, with no pooling.
//
// Timing: one PSUM read per cycle for the present window cells, then one
// write (three more cycles when the stored partial maximum is read back).
// n_partial / n_merge count the windows left incomplete / completed across
// parts since reset. Handshake: start pulse, busy, one-cycle done.
//
// Window, stride, the partial-pooling scheme and the PSUM-to-swapping-buffer
// path follow the design; keeping the partial maximum in the output location
// and the conversion to pixels at this point are this implementation's.
module maxpool_unit
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pool_cfg_t   cfg,
  output logic        busy,
  output logic        done,
  output logic        ps_re,
  output baddr_t      ps_raddr,
  input  psum_t       ps_rdata,
  output logic        dst_re,
  output baddr_t      dst_raddr,
  input  data_t       dst_rdata,
  output logic        dst_we,
  output baddr_t      dst_waddr,
  output data_t       dst_wdata,
  output logic [15:0] n_partial,
  output logic [15:0] n_merge
);

  typedef enum logic [2:0] {P_IDLE, P_SCAN, P_RD, P_LAST, P_MRD, P_MWAIT, P_WR, P_DONE} pstate_e;
  pstate_e state;

  logic [4:0] m;
  logic [7:0] oy, ox;
  logic [1:0] rr, cc;
  psum_t      mx;
  logic       rd_v;        // a PSUM read was issued last cycle
  data_t      q_max;

  // Window geometry.
  logic [8:0] w_top, w_bot, p_top, p_bot, g_row;
  logic       touches, merge, partial_w, row_ok;

  always_comb begin
    w_top     = 9'(oy) * 9'(cfg.st);
    w_bot     = w_top + 9'(cfg.win) - 9'd1;
    p_top     = 9'(cfg.row0);
    p_bot     = 9'(cfg.row0) + 9'(cfg.src_rows) - 9'd1;
    touches   = (w_bot >= p_top) && (w_top <= p_bot);
    merge     = w_top < p_top;
    partial_w = w_bot > p_bot;
    g_row     = w_top + 9'(rr);
    row_ok    = (g_row >= p_top) && (g_row <= p_bot);
  end

  always_comb begin
    ps_re    = (state == P_RD) && row_ok;
    ps_raddr = baddr_t'((32'(m) * 32'(cfg.psum_h) + 32'(g_row - p_top)) * 32'(cfg.src_w) +
                        32'(ox) * 32'(cfg.st) + 32'(cc));
    dst_re    = (state == P_MRD);
    dst_raddr = baddr_t'((32'(cfg.dst_ch_base) + 32'(m)) * 32'(cfg.out_h) * 32'(cfg.out_w) +
                         32'(oy) * 32'(cfg.out_w) + 32'(ox));
    dst_waddr = dst_raddr;
    dst_we    = (state == P_WR);
    dst_wdata = q_max;
  end

  logic last_cell;
  assign last_cell = (rr == cfg.win - 2'd1) && (cc == cfg.win - 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      m <= '0; oy <= '0; ox <= '0; rr <= '0; cc <= '0;
      mx        <= '0;
      rd_v      <= 1'b0;
      q_max     <= '0;
      done      <= 1'b0;
      n_partial <= '0;
      n_merge   <= '0;
    end else begin
      done <= 1'b0;
      rd_v <= ps_re;
      if (rd_v && ps_rdata > mx) mx <= ps_rdata;
      unique case (state)
        P_IDLE: if (start) begin
          m <= '0; oy <= '0; ox <= '0;
          state <= P_SCAN;
        end
        P_SCAN: begin
          rr <= '0; cc <= '0;
          mx <= {1'b1, {(PSUM_W-1){1'b0}}};
          if (touches) state <= P_RD;
          else begin
            // Whole output row untouched by this part: skip it.
            ox <= '0;
            if (32'(oy) + 1 < 32'(cfg.out_h)) oy <= oy + 8'd1;
            else if (32'(m) + 1 < 32'(cfg.nmaps)) begin
              oy <= '0; m <= m + 5'd1;
            end else state <= P_DONE;
          end
        end
        P_RD: begin
          if (last_cell) state <= P_LAST;
          else if (cc == cfg.win - 2'd1) begin cc <= '0; rr <= rr + 2'd1; end
          else cc <= cc + 2'd1;
        end
        P_LAST: begin
          if (!rd_v) begin
            q_max <= requant(mx);
            state <= merge ? P_MRD : P_WR;
          end
        end
        P_MRD:   state <= P_MWAIT;
        P_MWAIT: begin
          if (dst_rdata > q_max) q_max <= dst_rdata;
          state <= P_WR;
        end
        P_WR: begin
          if (merge)     n_merge   <= n_merge + 16'd1;
          if (partial_w) n_partial <= n_partial + 16'd1;
          state <= P_SCAN;
          if (32'(ox) + 1 < 32'(cfg.out_w)) ox <= ox + 8'd1;
          else begin
            ox <= '0;
            if (32'(oy) + 1 < 32'(cfg.out_h)) oy <= oy + 8'd1;
            else if (32'(m) + 1 < 32'(cfg.nmaps)) begin
              oy <= '0; m <= m + 5'd1;
            end else state <= P_DONE;
          end
        end
        P_DONE: begin
          done  <= 1'b1;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign busy = (state != P_IDLE);

endmodule
