// lrn_engine: runs local response normalisation over a whole volume.
//
// The volume (nch maps of hw pixels, map-major: word ch*hw + pos) is read
// from the source swapping buffer and the normalised volume written to the
// destination buffer at the same addresses. For each pixel position the
// engine reads the nch depths in order, one per cycle, followed by two zero
// steps, and shifts them through a five-entry window. Once the window holds
// depths i-2 .. i+2 (zeros outside the volume) it hands depth i to lrn_unit
// with its four neighbours. A position costs nch+2 cycles; results leave
// lrn_unit 18 cycles after they enter and are written as they come out.
// Handshake: start pulse with cfg stable, busy, one-cycle done once the last
// result is written.
// The normalisation across five neighbouring maps follows the design; the
// streaming order and the window register are this implementation's choices.
module lrn_engine
  import cnn_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  lrn_cfg_t  cfg,
  output logic      busy,
  output logic      done,
  output logic      re,
  output baddr_t    raddr,
  input  data_t     rdata,
  output logic      we,
  output baddr_t    waddr,
  output data_t     wdata
);

  logic        running;
  logic [15:0] pos, d_pos;
  logic [10:0] ch, d_ch;       // depth step, 0 .. nch+1
  logic        d_v, d_real;
  data_t       win [5];
  logic [31:0] n_out, n_total;

  assign n_total = 32'(cfg.nch) * 32'(cfg.hw);
  assign re      = running && (ch < 11'(cfg.nch));
  assign raddr   = baddr_t'(32'(ch) * 32'(cfg.hw) + 32'(pos));

  // Window after this cycle's value shifts in.
  data_t v_in;
  data_t nwin [5];
  always_comb begin
    v_in = d_real ? rdata : data_t'(0);
    if (d_ch == 0) begin
      for (int i = 0; i < 4; i++) nwin[i] = '0;
    end else begin
      for (int i = 0; i < 4; i++) nwin[i] = win[i+1];
    end
    nwin[4] = v_in;
  end

  logic   feed;
  baddr_t feed_addr;
  data_t  nbs [4];
  assign feed      = d_v && (d_ch >= 11'd2);
  assign feed_addr = baddr_t'(32'(d_ch - 11'd2) * 32'(cfg.hw) + 32'(d_pos));
  assign nbs[0] = nwin[0];
  assign nbs[1] = nwin[1];
  assign nbs[2] = nwin[3];
  assign nbs[3] = nwin[4];

  logic   ov;
  data_t  ob;
  baddr_t otag;

  lrn_unit #(.TW(BUF_AW)) u_lrn (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (feed),
    .a         (nwin[2]),
    .nb        (nbs),
    .in_tag    (feed_addr),
    .out_valid (ov),
    .b         (ob),
    .out_tag   (otag)
  );

  assign we    = ov;
  assign waddr = otag;
  assign wdata = ob;

  always_ff @(posedge clk) begin
    if (d_v) for (int i = 0; i < 5; i++) win[i] <= nwin[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      pos     <= '0;
      ch      <= '0;
      d_pos   <= '0;
      d_ch    <= '0;
      d_v     <= 1'b0;
      d_real  <= 1'b0;
      n_out   <= '0;
    end else begin
      done   <= 1'b0;
      d_v    <= running;
      d_real <= re;
      d_ch   <= ch;
      d_pos  <= pos;
      if (ov) n_out <= n_out + 32'd1;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          running <= (cfg.nch != 0) && (cfg.hw != 0);
          pos     <= '0;
          ch      <= '0;
          n_out   <= '0;
        end
      end else begin
        if (running) begin
          if (ch == 11'(cfg.nch) + 11'd1) begin
            ch <= '0;
            if (32'(pos) + 1 >= 32'(cfg.hw)) running <= 1'b0;
            else                             pos <= pos + 16'd1;
          end else begin
            ch <= ch + 11'd1;
          end
        end
        if (!running && !d_v && (n_out + (ov ? 32'd1 : 32'd0)) >= n_total) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
