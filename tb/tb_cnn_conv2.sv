// tb_cnn_conv2: AlexNet layer 2 and its pooling on the accelerator at the
// full default sizes.
// Layer 2 takes a 27x27x96 volume (kept in swapping buffer 2) and applies 256
// filters of 5x5x48 with padding 2 and stride 1, in two groups: filters
// 0..127 see input depths 0..47, filters 128..255 depths 48..95. ReLU and a
// 3x3 / stride 2 max pool follow, giving 13x13x256 in swapping buffer 1.
// Mapping used by the host model:
//   * per group, filters in 9 batches: eight of 15 and one of 8, each stored
//     with its biases in the filter buffer (5x5x48x15 + 15 = 18015 words) and
//     accumulated in the PSUM buffer as 15 maps of 27x27 (10935 words);
//   * PE matrix: 2 depth groups of K = 5 rows (10 PE rows); 8 depths per PE
//     (8 x 31 padded pixels = 248 register-file words), so a pass covers 16
//     depths and three depth passes cover the 48;
//   * the 27 output rows take two column passes, 14 rows then 13;
//   * filter register files hold 6 filters at a time (6 x 8 x 5 = 240).
// All 13x13x256 pooled outputs are read back and compared with a reference
// convolution + bias + ReLU + max pool + conversion to pixels. The cycle
// count of the layer is printed. Data come from a fixed hash.
module tb_cnn_conv2;
  import cnn_pkg::*;

  localparam int H = 27, C = 96, CG = 48, K = 5, NF = 256, P = 13, ND = 8, NG = 2;

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
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cnn_accel_top dut (.*);

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t hash16(int a, int b, int c, int salt, int range);
    int unsigned h;
    h = (32'(a) * 32'd73856093) ^ (32'(b) * 32'd19349663) ^ (32'(c) * 32'd83492791) ^ 32'(salt);
    h = h * 32'd2654435761;
    h = h ^ (h >> 15);
    return data_t'(int'(h % 32'(2 * range)) - range);
  endfunction

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

  data_t img  [C][H][H];
  data_t wgt  [NF][CG][K][K];
  data_t bias [NF];
  psum_t conv_ref [H][H];
  // loop bounds set at run time (keeps the compiler from unrolling the loops)
  int nk, nc, ncg, nf, nh, np, one;

  initial begin
    cmd_t c;
    int t0;
    rst_n = 0; cmd_valid = 0; cmd = '0; ld_we = 0; ld_buf = BUF_FILTER; ld_addr = 0; ld_data = 0;
    hr_re = 0; hr_buf = BUF_FILTER; hr_addr = 0;
    nk = K; nc = C; ncg = CG; nf = NF; nh = H; np = P; one = 1;
    for (int ch = 0; ch < nc; ch++)
      for (int y = 0; y < nh; y++)
        for (int x = 0; x < nh; x++) img[ch][y][x] = hash16(ch, y, x, 21, 1024);
    for (int f = 0; f < nf; f++) begin
      for (int ch = 0; ch < ncg; ch++)
        for (int a = 0; a < nk; a++)
          for (int b = 0; b < nk; b++) wgt[f][ch][a][b] = hash16(f, ch, a * 5 + b, 22, 512);
      bias[f] = hash16(f, 0, 0, 23, 4096);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = cycle;

    for (int ch = 0; ch < nc; ch++)
      for (int y = 0; y < nh; y++)
        for (int x = 0; x < nh; x++) begin
          @(negedge clk);
          ld_we = 1; ld_buf = BUF_SWAP2; ld_addr = baddr_t'((ch * H + y) * H + x); ld_data = img[ch][y][x];
        end
    @(negedge clk); ld_we = 0;
    for (int grp = 0; grp < 2 * one; grp++)
      for (int bt = 0; bt < 9 * one; bt++) begin
        int f0, nb;
        f0 = 128 * grp + 15 * bt;
        nb = (bt == 8) ? 8 : 15;
        for (int f = 0; f < nb; f++)
          for (int ch = 0; ch < ncg; ch++)
            for (int a = 0; a < nk; a++)
              for (int b = 0; b < nk; b++) begin
                @(negedge clk);
                ld_we = 1; ld_buf = BUF_FILTER; ld_addr = baddr_t'(((f * CG + ch) * K + a) * K + b);
                ld_data = wgt[f0 + f][ch][a][b];
              end
        for (int f = 0; f < nb; f++) begin
          @(negedge clk); ld_we = 1; ld_addr = baddr_t'(15 * CG * K * K + f); ld_data = bias[f0 + f];
        end
        @(negedge clk); ld_we = 0;
        for (int cp = 0; cp < 2 * one; cp++)
          for (int dp = 0; dp < 3 * one; dp++) begin
            c = '0;
            c.op = OP_CONV;
            c.layer.load_input = 1; c.layer.first = (dp == 0); c.layer.last = (dp == 2);
            c.layer.relu = 1; c.layer.src = BUF_SWAP2; c.layer.wsrc = BUF_FILTER;
            c.layer.k = 4'(K); c.layer.stride = 3'd1; c.layer.pad = 2'd2;
            c.layer.in_h = 8'(H); c.layer.in_w = 8'(H); c.layer.out_w = 8'(H);
            c.layer.ncol = (cp == 0) ? 4'd14 : 4'd13;
            c.layer.out_row0 = 8'(14 * cp); c.layer.psum_row0 = 8'(14 * cp); c.layer.psum_h = 8'(H);
            c.layer.ngrp = 3'(NG); c.layer.nd = 5'(ND);
            c.layer.ch_base = 10'(CG * grp + 16 * dp); c.layer.flt_ch_base = 10'(16 * dp);
            c.layer.flt_c = 10'(CG);
            c.layer.nf = 5'(nb); c.layer.nf_rf = 5'd6;
            c.layer.w_base = '0; c.layer.bias_base = baddr_t'(15 * CG * K * K);
            issue(c);
          end
        c = '0;
        c.op = OP_POOL;
        c.pool.dst = BUF_SWAP1; c.pool.nmaps = 5'(nb); c.pool.src_rows = 8'(H); c.pool.src_w = 8'(H);
        c.pool.psum_h = 8'(H); c.pool.row0 = 8'd0; c.pool.win = 2'd3; c.pool.st = 2'd2;
        c.pool.out_h = 8'(P); c.pool.out_w = 8'(P); c.pool.dst_ch_base = 10'(f0);
        issue(c);
      end
    $display("layer 2 + pool 2: %0d cycles, host loads included", cycle - t0);

    for (int f = 0; f < nf; f++) begin
      int cb;
      cb = (f < 128) ? 0 : CG;
      for (int oy = 0; oy < nh; oy++)
        for (int ox = 0; ox < nh; ox++) begin
          psum_t s;
          s = psum_t'(bias[f]) <<< 5;
          for (int ch = 0; ch < ncg; ch++)
            for (int a = 0; a < nk; a++)
              for (int b = 0; b < nk; b++) begin
                int yy, xx;
                yy = oy + a - 2; xx = ox + b - 2;
                if (yy >= 0 && yy < nh && xx >= 0 && xx < nh)
                  s += psum_t'(wgt[f][ch][a][b]) * psum_t'(img[cb + ch][yy][xx]);
              end
          conv_ref[oy][ox] = (s < 0) ? psum_t'(0) : s;
        end
      for (int oy = 0; oy < np; oy++)
        for (int ox = 0; ox < np; ox++) begin
          psum_t mx; data_t got;
          mx = 0;
          for (int dy = 0; dy < 3 * one; dy++)
            for (int dx = 0; dx < 3 * one; dx++)
              if (conv_ref[2 * oy + dy][2 * ox + dx] > mx) mx = conv_ref[2 * oy + dy][2 * ox + dx];
          @(negedge clk); hr_re = 1; hr_buf = BUF_SWAP1; hr_addr = baddr_t'((f * P + oy) * P + ox);
          @(negedge clk); hr_re = 0; got = hr_rdata;
          checks++;
          if (got !== to_pixel(mx)) begin
            failures++;
            if (failures < 20) $display("map %0d (%0d,%0d): %0d expected %0d", f, oy, ox, got, to_pixel(mx));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
