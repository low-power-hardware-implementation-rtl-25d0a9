// tb_cnn_conv3: AlexNet layer 3 on the accelerator at its full default sizes.
// Layer 3 takes the 13x13x256 output of the second LRN (kept in swapping
// buffer 2) and applies 384 filters of 3x3x256 with padding 1 and stride 1,
// followed by ReLU; there is no pooling, so the pooling unit copies each
// finished batch of maps into swapping buffer 1 as pixels (13x13x384).
// Mapping used by the host model:
//   * filters in 24 batches of 16: 3x3x256x16 weights + 16 biases = 36880
//     words, exactly the filter buffer;
//   * PE matrix: 4 depth groups of K = 3 rows (12 PE rows), 13 PE columns for
//     the 13 output rows; 16 depths per PE (16 x 15 padded pixels = 240
//     register-file words), so one pass covers 64 depths and four depth
//     passes accumulate in the PSUM buffer (13x13x16 words);
//   * filter register files hold 5 filters at a time (5 x 16 x 3 = 240).
// All 13x13x384 outputs are read back and compared with a reference
// convolution + bias + ReLU + conversion to pixels. The cycle count of the
// layer is printed. Data come from a fixed hash, so no files are needed.
module tb_cnn_conv3;
  import cnn_pkg::*;

  localparam int H = 13, C = 256, K = 3, NF = 384, NB = 16, ND = 16, NG = 4;

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
  int n_pad = 0, n_accum = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (events.pad_zero) n_pad <= n_pad + 1;
    if (events.ps_accum) n_accum <= n_accum + 1;
  end

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
  data_t wgt  [NF][C][K][K];
  data_t bias [NF];
  // loop bounds set at run time (keeps the compiler from unrolling the loops)
  int nk, nc, nf, nh, one;

  initial begin
    cmd_t c;
    int t0;
    rst_n = 0; cmd_valid = 0; cmd = '0; ld_we = 0; ld_buf = BUF_FILTER; ld_addr = 0; ld_data = 0;
    hr_re = 0; hr_buf = BUF_FILTER; hr_addr = 0;
    nk = K; nc = C; nf = NF; nh = H; one = 1;
    for (int ch = 0; ch < nc; ch++)
      for (int y = 0; y < nh; y++)
        for (int x = 0; x < nh; x++) img[ch][y][x] = hash16(ch, y, x, 11, 1024);
    for (int f = 0; f < nf; f++) begin
      for (int ch = 0; ch < nc; ch++)
        for (int a = 0; a < nk; a++)
          for (int b = 0; b < nk; b++) wgt[f][ch][a][b] = hash16(f, ch, a * 3 + b, 12, 512);
      bias[f] = hash16(f, 0, 0, 13, 4096);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = cycle;

    // input volume, map-major, into swapping buffer 2
    for (int ch = 0; ch < nc; ch++)
      for (int y = 0; y < nh; y++)
        for (int x = 0; x < nh; x++) begin
          @(negedge clk);
          ld_we = 1; ld_buf = BUF_SWAP2; ld_addr = baddr_t'((ch * H + y) * H + x); ld_data = img[ch][y][x];
        end
    @(negedge clk); ld_we = 0;
    for (int bt = 0; bt < (NF / NB) * one; bt++) begin
      for (int f = 0; f < NB * one; f++)
        for (int ch = 0; ch < nc; ch++)
          for (int a = 0; a < nk; a++)
            for (int b = 0; b < nk; b++) begin
              @(negedge clk);
              ld_we = 1; ld_buf = BUF_FILTER; ld_addr = baddr_t'(((f * C + ch) * K + a) * K + b);
              ld_data = wgt[NB * bt + f][ch][a][b];
            end
      for (int f = 0; f < NB * one; f++) begin
        @(negedge clk); ld_we = 1; ld_addr = baddr_t'(NB * C * K * K + f); ld_data = bias[NB * bt + f];
      end
      @(negedge clk); ld_we = 0;
      for (int p = 0; p < (C / (NG * ND)) * one; p++) begin
        c = '0;
        c.op = OP_CONV;
        c.layer.load_input = 1; c.layer.first = (p == 0); c.layer.last = (p == C / (NG * ND) - 1);
        c.layer.relu = 1; c.layer.src = BUF_SWAP2; c.layer.wsrc = BUF_FILTER;
        c.layer.k = 4'(K); c.layer.stride = 3'd1; c.layer.pad = 2'd1;
        c.layer.in_h = 8'(H); c.layer.in_w = 8'(H); c.layer.out_w = 8'(H);
        c.layer.ncol = 4'(H); c.layer.out_row0 = 8'd0; c.layer.psum_row0 = 8'd0; c.layer.psum_h = 8'(H);
        c.layer.ngrp = 3'(NG); c.layer.nd = 5'(ND);
        c.layer.ch_base = 10'(p * NG * ND); c.layer.flt_ch_base = 10'(p * NG * ND); c.layer.flt_c = 10'(C);
        c.layer.nf = 5'(NB); c.layer.nf_rf = 5'd5;
        c.layer.w_base = '0; c.layer.bias_base = baddr_t'(NB * C * K * K);
        issue(c);
      end
      c = '0;
      c.op = OP_POOL;
      c.pool.dst = BUF_SWAP1; c.pool.nmaps = 5'(NB); c.pool.src_rows = 8'(H); c.pool.src_w = 8'(H);
      c.pool.psum_h = 8'(H); c.pool.row0 = 8'd0; c.pool.win = 2'd1; c.pool.st = 2'd1;
      c.pool.out_h = 8'(H); c.pool.out_w = 8'(H); c.pool.dst_ch_base = 10'(NB * bt);
      issue(c);
    end
    $display("layer 3: %0d cycles, host loads included; %0d padding zeros, %0d PSUM accumulations",
             cycle - t0, n_pad, n_accum);

    for (int f = 0; f < nf; f++)
      for (int oy = 0; oy < nh; oy++)
        for (int ox = 0; ox < nh; ox++) begin
          psum_t s; data_t got;
          s = psum_t'(bias[f]) <<< 5;
          for (int ch = 0; ch < nc; ch++)
            for (int a = 0; a < nk; a++)
              for (int b = 0; b < nk; b++) begin
                int yy, xx;
                yy = oy + a - 1; xx = ox + b - 1;
                if (yy >= 0 && yy < nh && xx >= 0 && xx < nh)
                  s += psum_t'(wgt[f][ch][a][b]) * psum_t'(img[ch][yy][xx]);
              end
          if (s < 0) s = 0;
          @(negedge clk); hr_re = 1; hr_buf = BUF_SWAP1; hr_addr = baddr_t'((f * H + oy) * H + ox);
          @(negedge clk); hr_re = 0; got = hr_rdata;
          checks++;
          if (got !== to_pixel(s)) begin
            failures++;
            if (failures < 20) $display("map %0d (%0d,%0d): %0d expected %0d", f, oy, ox, got, to_pixel(s));
          end
        end
    checks++;
    if (n_pad == 0 || n_accum == 0) begin
      failures++;
      $display("padding %0d, accumulations %0d: both must occur", n_pad, n_accum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
