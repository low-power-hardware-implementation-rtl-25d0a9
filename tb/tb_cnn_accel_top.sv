// tb_cnn_accel_top: end-to-end test of the accelerator at its default sizes.
// A host model loads a small network into the buffers and issues commands:
//   CONV1  3x15x15 input, four 3x3 filters, 13x13 output, computed in two
//          strips of output rows (7 + 6) and two depth passes per strip
//          (channels 0-1 on two depth groups, then channel 2), filters loaded
//          in batches of two; bias and ReLU on the last pass
//   POOL1  3x3 / stride 2 after each strip, so the windows of pooled row 3
//          straddle the strips (partial window, then merge)
//   LRN    across the four pooled 6x6 maps
//   CONV2  4x6x6, four 3x3 filters, padding 1, all four depth groups in use
//   COPY   pooling unit in copy mode (1x1 window) to turn CONV2 into pixels
//   FC     144 inputs -> 10 neurons, three neurons per pass (12 PEs each)
//   EST    arg-max over the 10 scores
// Each stage's result is read back through the host port and compared with a
// reference computed from the previous stage's (already checked) result: exact
// for CONV/POOL/FC/EST, within one pixel LSB for LRN. Every mechanism (store,
// accumulate and bias/ReLU PSUM writes, padding, filter batch loads, unused
// PEs, partial and merged pooling windows, copy mode, LRN, FC, estimation) is
// counted, and one that never happens counts as a failure.
module tb_cnn_accel_top;
  import cnn_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic cmd_valid, cmd_ready, done;
  cmd_t cmd;
  logic ld_we, hr_re;
  buf_sel_e ld_buf, hr_buf;
  baddr_t ld_addr, hr_addr;
  data_t ld_data, hr_rdata, est_score;
  logic [12:0] est_cls;
  logic [15:0] pool_partial, pool_merged;
  event_t events;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cnn_accel_top dut (.*);

  // ------------------------------------------------------ mechanism counters
  int n_store = 0, n_accum = 0, n_last = 0, n_pad = 0, n_fload = 0, n_gated = 0;
  int n_copy = 0, n_lrn = 0, n_fc = 0, n_est = 0;
  always @(posedge clk) if (rst_n) begin
    if (events.ps_store)   n_store++;
    if (events.ps_accum)   n_accum++;
    if (events.ps_last)    n_last++;
    if (events.pad_zero)   n_pad++;
    if (events.flt_load)   n_fload++;
    if (events.gated_step) n_gated++;
    if (events.copy_wr)    n_copy++;
    if (events.lrn_wr)     n_lrn++;
    if (events.fc_wr)      n_fc++;
    if (events.est_done)   n_est++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- host model
  task automatic load(input buf_sel_e b, input int a, input data_t d);
    @(negedge clk); ld_we = 1; ld_buf = b; ld_addr = baddr_t'(a); ld_data = d;
    @(negedge clk); ld_we = 0;
  endtask

  task automatic hread(input buf_sel_e b, input int a, output data_t d);
    @(negedge clk); hr_re = 1; hr_buf = b; hr_addr = baddr_t'(a);
    @(negedge clk); hr_re = 0; d = hr_rdata;
  endtask

  task automatic issue(input cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic data_t to_pixel(psum_t p);
    psum_t s;
    s = p >>> 11;
    if (s > 32767) return 16'sd32767;
    if (s < -32768) return -16'sd32768;
    return data_t'(s);
  endfunction

  function automatic cmd_t conv(int cin, int hin, int k, int pad, int eo, int row0, int ncol,
                                int ng, int nd, int ch, bit first, bit last, int wb, int bb,
                                int nf, int nfrf, int psh);
    cmd_t c;
    c = '0;
    c.op = OP_CONV;
    c.layer.load_input = 1; c.layer.first = first; c.layer.last = last; c.layer.relu = 1;
    c.layer.src = BUF_SWAP1; c.layer.wsrc = BUF_FILTER;
    c.layer.k = 4'(k); c.layer.stride = 3'd1; c.layer.pad = 2'(pad);
    c.layer.in_h = 8'(hin); c.layer.in_w = 8'(hin); c.layer.out_w = 8'(eo);
    c.layer.ncol = 4'(ncol); c.layer.out_row0 = 8'(row0); c.layer.psum_row0 = 8'd0;
    c.layer.psum_h = 8'(psh); c.layer.ngrp = 3'(ng); c.layer.nd = 5'(nd);
    c.layer.ch_base = 10'(ch); c.layer.flt_ch_base = 10'(ch); c.layer.flt_c = 10'(cin);
    c.layer.nf = 5'(nf); c.layer.nf_rf = 5'(nfrf); c.layer.w_base = baddr_t'(wb);
    c.layer.bias_base = baddr_t'(bb);
    return c;
  endfunction

  function automatic cmd_t pool(int rows, int w, int psh, int row0, int win, int st, int oh, int ow);
    cmd_t c;
    c = '0;
    c.op = OP_POOL;
    c.pool.dst = BUF_SWAP2; c.pool.nmaps = 5'd4; c.pool.src_rows = 8'(rows); c.pool.src_w = 8'(w);
    c.pool.psum_h = 8'(psh); c.pool.row0 = 8'(row0); c.pool.win = 2'(win); c.pool.st = 2'(st);
    c.pool.out_h = 8'(oh); c.pool.out_w = 8'(ow);
    return c;
  endfunction

  // --------------------------------------------------------------- network
  localparam int H1 = 15, E1 = 13, P1 = 6;
  data_t x1 [3][H1][H1];
  data_t w1 [4][3][3][3];
  data_t b1 [4];
  data_t w2 [4][4][3][3];
  data_t b2 [4];
  data_t wf [10][144];
  data_t bf [10];
  data_t got_pool [4][P1][P1];
  data_t got_lrn  [4][P1][P1];
  data_t got_conv2 [144];
  data_t got_fc [10];

  initial begin
    cmd_t c;
    rst_n = 0; cmd_valid = 0; cmd = '0; ld_we = 0; ld_buf = BUF_FILTER; ld_addr = 0; ld_data = 0;
    hr_re = 0; hr_buf = BUF_FILTER; hr_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- load
    for (int ch = 0; ch < 3; ch++)
      for (int y = 0; y < H1; y++)
        for (int x = 0; x < H1; x++) begin
          x1[ch][y][x] = data_t'($signed($urandom % 2048) - 1024);
          load(BUF_SWAP1, (ch * H1 + y) * H1 + x, x1[ch][y][x]);
        end
    for (int f = 0; f < 4; f++) begin
      for (int ch = 0; ch < 3; ch++)
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) begin
            w1[f][ch][a][b] = data_t'($signed($urandom % 2048) - 1024);
            load(BUF_FILTER, ((f * 3 + ch) * 3 + a) * 3 + b, w1[f][ch][a][b]);
          end
      b1[f] = data_t'($signed($urandom % 8192) - 2048);
      load(BUF_FILTER, 200 + f, b1[f]);
      for (int ch = 0; ch < 4; ch++)
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) begin
            w2[f][ch][a][b] = data_t'($signed($urandom % 2048) - 1024);
            load(BUF_FILTER, 300 + ((f * 4 + ch) * 3 + a) * 3 + b, w2[f][ch][a][b]);
          end
      b2[f] = data_t'($signed($urandom % 8192) - 2048);
      load(BUF_FILTER, 500 + f, b2[f]);
    end
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 144; i++) begin
        wf[n][i] = data_t'($signed($urandom % 512) - 256);
        load(BUF_FILTER, 1000 + n * 144 + i, wf[n][i]);
      end
      bf[n] = data_t'($signed($urandom % 8192) - 4096);
      load(BUF_FILTER, 3000 + n, bf[n]);
    end

    // ---- CONV1 + POOL1, two strips of output rows, two depth passes each
    for (int s = 0; s < 2; s++) begin
      int r0, nc;
      r0 = 7 * s; nc = (s == 0) ? 7 : 6;
      issue(conv(3, H1, 3, 0, E1, r0, nc, 2, 1, 0, 1, 0, 0, 200, 4, 2, 7));
      issue(conv(3, H1, 3, 0, E1, r0, nc, 1, 1, 2, 0, 1, 0, 200, 4, 2, 7));
      issue(pool(nc, E1, 7, r0, 3, 2, P1, P1));
    end
    for (int f = 0; f < 4; f++)
      for (int oy = 0; oy < P1; oy++)
        for (int ox = 0; ox < P1; ox++) begin
          psum_t mx;
          mx = 0;
          for (int dy = 0; dy < 3; dy++)
            for (int dx = 0; dx < 3; dx++) begin
              psum_t s;
              s = psum_t'(b1[f]) <<< 5;
              for (int ch = 0; ch < 3; ch++)
                for (int a = 0; a < 3; a++)
                  for (int b = 0; b < 3; b++)
                    s += psum_t'(w1[f][ch][a][b]) * psum_t'(x1[ch][2 * oy + dy + a][2 * ox + dx + b]);
              if (s < 0) s = 0;
              if (s > mx) mx = s;
            end
          hread(BUF_SWAP2, (f * P1 + oy) * P1 + ox, got_pool[f][oy][ox]);
          checks++;
          if (got_pool[f][oy][ox] !== to_pixel(mx)) begin
            failures++;
            $display("POOL1 f%0d (%0d,%0d): %0d expected %0d", f, oy, ox, got_pool[f][oy][ox], to_pixel(mx));
          end
        end

    // ---- LRN: swap2 -> swap1
    c = '0; c.op = OP_LRN; c.lrn.src = BUF_SWAP2; c.lrn.dst = BUF_SWAP1; c.lrn.nch = 10'd4;
    c.lrn.hw = 16'(P1 * P1);
    issue(c);
    for (int f = 0; f < 4; f++)
      for (int y = 0; y < P1; y++)
        for (int x = 0; x < P1; x++) begin
          real sq, a, e, g;
          sq = 0.0;
          for (int d = -2; d <= 2; d++)
            if (f + d >= 0 && f + d < 4) begin
              real v;
              v = real'(got_pool[f + d][y][x]) / 32.0;
              sq += v * v;
            end
          a = real'(got_pool[f][y][x]) / 32.0;
          e = a / (1.0 + 2.0e-5 * sq);
          hread(BUF_SWAP1, (f * P1 + y) * P1 + x, got_lrn[f][y][x]);
          g = real'(got_lrn[f][y][x]) / 32.0;
          checks++;
          if (g - e > 1.0 / 32.0 || e - g > 1.0 / 32.0) begin
            failures++;
            $display("LRN f%0d (%0d,%0d): %f expected %f", f, y, x, g, e);
          end
        end

    // ---- CONV2 (padding 1, four depth groups) + copy into pixels
    issue(conv(4, P1, 3, 1, P1, 0, P1, 4, 1, 0, 1, 1, 300, 500, 4, 2, P1));
    issue(pool(P1, P1, P1, 0, 1, 1, P1, P1));
    for (int f = 0; f < 4; f++)
      for (int y = 0; y < P1; y++)
        for (int x = 0; x < P1; x++) begin
          psum_t s;
          s = psum_t'(b2[f]) <<< 5;
          for (int ch = 0; ch < 4; ch++)
            for (int a = 0; a < 3; a++)
              for (int b = 0; b < 3; b++) begin
                int yy, xx;
                yy = y + a - 1; xx = x + b - 1;
                if (yy >= 0 && yy < P1 && xx >= 0 && xx < P1)
                  s += psum_t'(w2[f][ch][a][b]) * psum_t'(got_lrn[ch][yy][xx]);
              end
          if (s < 0) s = 0;
          hread(BUF_SWAP2, (f * P1 + y) * P1 + x, got_conv2[(f * P1 + y) * P1 + x]);
          checks++;
          if (got_conv2[(f * P1 + y) * P1 + x] !== to_pixel(s)) begin
            failures++;
            $display("CONV2 f%0d (%0d,%0d): %0d expected %0d", f, y, x,
                     got_conv2[(f * P1 + y) * P1 + x], to_pixel(s));
          end
        end

    // ---- FC: 144 -> 10, three neurons per pass, scores to swap1 at 500
    for (int f0 = 0; f0 < 10; f0 += 3) begin
      c = '0; c.op = OP_FC;
      c.layer.load_input = 1; c.layer.src = BUF_SWAP2; c.layer.wsrc = BUF_FILTER; c.layer.dst = BUF_SWAP1;
      c.layer.fc_len = 14'd144; c.layer.fc_chunk = 9'd12; c.layer.fc_rows = 4'd3; c.layer.fc_cols = 4'd4;
      c.layer.nf = 5'((10 - f0 < 3) ? 10 - f0 : 3); c.layer.f0 = 13'(f0);
      c.layer.in_base = '0; c.layer.w_base = baddr_t'(1000 + f0 * 144);
      c.layer.bias_base = 17'd3000; c.layer.out_base = 17'd500;
      issue(c);
    end
    for (int n = 0; n < 10; n++) begin
      psum_t s;
      s = psum_t'(bf[n]) <<< 5;
      for (int i = 0; i < 144; i++) s += psum_t'(wf[n][i]) * psum_t'(got_conv2[i]);
      hread(BUF_SWAP1, 500 + n, got_fc[n]);
      checks++;
      if (got_fc[n] !== to_pixel(s)) begin
        failures++;
        $display("FC neuron %0d: %0d expected %0d", n, got_fc[n], to_pixel(s));
      end
    end

    // ---- estimation
    c = '0; c.op = OP_EST; c.est.src = BUF_SWAP1; c.est.base = 17'd500; c.est.count = 13'd10;
    issue(c);
    begin
      int best;
      best = 0;
      for (int n = 1; n < 10; n++) if (got_fc[n] > got_fc[best]) best = n;
      checks++;
      if (int'(est_cls) != best || est_score !== got_fc[best]) begin
        failures++;
        $display("estimation: class %0d score %0d, expected %0d %0d", est_cls, est_score, best, got_fc[best]);
      end
    end

    // ---- every mechanism happened
    $display("store %0d accumulate %0d bias+relu %0d padding %0d filter-loads %0d gated-steps %0d",
             n_store, n_accum, n_last, n_pad, n_fload, n_gated);
    $display("partial %0d merged %0d copy %0d lrn %0d fc %0d est %0d",
             pool_partial, pool_merged, n_copy, n_lrn, n_fc, n_est);
    checks++; if (n_store == 0) begin failures++; $display("no PSUM store"); end
    checks++; if (n_accum == 0) begin failures++; $display("no PSUM accumulation"); end
    checks++; if (n_last == 0) begin failures++; $display("no bias/ReLU pass"); end
    checks++; if (n_pad == 0) begin failures++; $display("no padding"); end
    checks++; if (n_fload < 2) begin failures++; $display("no filter batch reload"); end
    checks++; if (n_gated == 0) begin failures++; $display("no unused PEs"); end
    checks++; if (pool_partial != 16'd24) begin failures++; $display("partial windows %0d, expected 24", pool_partial); end
    checks++; if (pool_merged != 16'd24) begin failures++; $display("merged windows %0d, expected 24", pool_merged); end
    checks++; if (n_copy != 144) begin failures++; $display("copy writes %0d", n_copy); end
    checks++; if (n_lrn != 144) begin failures++; $display("LRN writes %0d", n_lrn); end
    checks++; if (n_fc != 10) begin failures++; $display("FC outputs %0d", n_fc); end
    checks++; if (n_est != 1) begin failures++; $display("estimations %0d", n_est); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
