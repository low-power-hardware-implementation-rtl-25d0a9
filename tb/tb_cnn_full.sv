// tb_cnn_full: the whole of AlexNet layer 1 (CONV1 + ReLU + POOL1) on the
// accelerator at its full default sizes.
// The 227x227x3 image is too large for one swapping buffer, so layer 1 is
// computed in four strips of output rows (14, 14, 14, 13), each needing 63
// input rows (59 for the last), and the 96 filters in six batches of 16
// (11x11x3, stride 4): 24 iterations. The host model does, per strip:
//   load the strip's input rows into swapping buffer 1; then per filter batch:
//   load the 16 filters and biases into the filter buffer, run three CONV
//   passes (one per input channel: store, accumulate, accumulate + bias +
//   ReLU) that fill the PSUM buffer with 16 maps x 14 rows x 55, and one POOL
//   pass (3x3, stride 2) into the 27x27x96 output in swapping buffer 2.
// Pooling windows that straddle two strips (pooled rows 6, 13 and 20) are
// pooled partially and completed with the next strip. All 27x27x96 outputs are
// read back and compared with a reference convolution + ReLU + max pool +
// conversion; the partial and merged window counts must both be 3 x 27 x 96.
// The cycle count of the whole layer is printed. Image, weights and biases
// come from a fixed hash, so no data files are needed.
module tb_cnn_full;
  import cnn_pkg::*;

  localparam int IMG = 227, K = 11, S = 4, E = 55, NF = 96, NB = 16, P = 27;

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
    repeat (20000000) @(posedge clk);
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

  data_t img  [3][IMG][IMG];
  data_t wgt  [NF][3][K][K];
  data_t bias [NF];
  psum_t conv_ref [E][E];
  // loop bounds set at run time (keeps the compiler from unrolling the loops)
  int nk, nch, nf, ne, np, nimg, one;

  initial begin
    cmd_t c;
    int t0;
    rst_n = 0; cmd_valid = 0; cmd = '0; ld_we = 0; ld_buf = BUF_FILTER; ld_addr = 0; ld_data = 0;
    hr_re = 0; hr_buf = BUF_FILTER; hr_addr = 0;
    nk = K; nch = 3; nf = NF; ne = E; np = P; nimg = IMG; one = 1;
    for (int ch = 0; ch < nch; ch++)
      for (int y = 0; y < nimg; y++)
        for (int x = 0; x < nimg; x++) img[ch][y][x] = hash16(ch, y, x, 1, 1024);
    for (int f = 0; f < nf; f++) begin
      for (int ch = 0; ch < nch; ch++)
        for (int a = 0; a < nk; a++)
          for (int b = 0; b < nk; b++) wgt[f][ch][a][b] = hash16(f * 3 + ch, a, b, 2, 1024);
      bias[f] = hash16(f, 0, 0, 3, 4096);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = cycle;

    for (int strip = 0; strip < 4 * one; strip++) begin
      int rows, ncol;
      rows = (strip == 3) ? 59 : 63;
      ncol = (strip == 3) ? 13 : 14;
      // input rows 56*strip .. of all three channels into swapping buffer 1
      for (int ch = 0; ch < nch; ch++)
        for (int y = 0; y < rows; y++)
          for (int x = 0; x < nimg; x++) begin
            @(negedge clk);
            ld_we = 1; ld_buf = BUF_SWAP1; ld_addr = baddr_t'((ch * rows + y) * IMG + x);
            ld_data = img[ch][56 * strip + y][x];
          end
      @(negedge clk); ld_we = 0;
      for (int g = 0; g < 6 * one; g++) begin
        // filters of batch g: ((f*3 + c)*11 + a)*11 + b, then the 16 biases
        for (int f = 0; f < NB * one; f++)
          for (int ch = 0; ch < nch; ch++)
            for (int a = 0; a < nk; a++)
              for (int b = 0; b < nk; b++) begin
                @(negedge clk);
                ld_we = 1; ld_buf = BUF_FILTER; ld_addr = baddr_t'(((f * 3 + ch) * K + a) * K + b);
                ld_data = wgt[NB * g + f][ch][a][b];
              end
        for (int f = 0; f < NB * one; f++) begin
          @(negedge clk); ld_we = 1; ld_addr = baddr_t'(NB * 3 * K * K + f); ld_data = bias[NB * g + f];
        end
        @(negedge clk); ld_we = 0;
        for (int ch = 0; ch < nch; ch++) begin
          c = '0;
          c.op = OP_CONV;
          c.layer.load_input = 1; c.layer.first = (ch == 0); c.layer.last = (ch == 2); c.layer.relu = 1;
          c.layer.src = BUF_SWAP1; c.layer.wsrc = BUF_FILTER;
          c.layer.k = 4'(K); c.layer.stride = 3'(S); c.layer.pad = 2'd0;
          c.layer.in_h = 8'(rows); c.layer.in_w = 8'(IMG); c.layer.out_w = 8'(E);
          c.layer.ncol = 4'(ncol); c.layer.out_row0 = 8'd0; c.layer.psum_row0 = 8'd0; c.layer.psum_h = 8'd14;
          c.layer.ngrp = 3'd1; c.layer.nd = 5'd1; c.layer.ch_base = 10'(ch); c.layer.flt_ch_base = 10'(ch);
          c.layer.flt_c = 10'd3; c.layer.nf = 5'(NB); c.layer.nf_rf = 5'(NB);
          c.layer.w_base = '0; c.layer.bias_base = baddr_t'(NB * 3 * K * K);
          issue(c);
        end
        c = '0;
        c.op = OP_POOL;
        c.pool.dst = BUF_SWAP2; c.pool.nmaps = 5'(NB); c.pool.src_rows = 8'(ncol); c.pool.src_w = 8'(E);
        c.pool.psum_h = 8'd14; c.pool.row0 = 8'(14 * strip); c.pool.win = 2'd3; c.pool.st = 2'd2;
        c.pool.out_h = 8'(P); c.pool.out_w = 8'(P); c.pool.dst_ch_base = 10'(NB * g);
        issue(c);
      end
    end
    $display("layer 1 + pool 1: %0d cycles, host loads included", cycle - t0);

    for (int f = 0; f < nf; f++) begin
      for (int oy = 0; oy < ne; oy++)
        for (int ox = 0; ox < ne; ox++) begin
          psum_t s;
          s = psum_t'(bias[f]) <<< 5;
          for (int ch = 0; ch < nch; ch++)
            for (int a = 0; a < nk; a++)
              for (int b = 0; b < nk; b++)
                s += psum_t'(wgt[f][ch][a][b]) * psum_t'(img[ch][S * oy + a][S * ox + b]);
          conv_ref[oy][ox] = (s < 0) ? psum_t'(0) : s;
        end
      for (int oy = 0; oy < np; oy++)
        for (int ox = 0; ox < np; ox++) begin
          psum_t mx; data_t got;
          mx = 0;
          for (int dy = 0; dy < 3 * one; dy++)
            for (int dx = 0; dx < 3 * one; dx++)
              if (conv_ref[2 * oy + dy][2 * ox + dx] > mx) mx = conv_ref[2 * oy + dy][2 * ox + dx];
          @(negedge clk); hr_re = 1; hr_buf = BUF_SWAP2; hr_addr = baddr_t'((f * P + oy) * P + ox);
          @(negedge clk); hr_re = 0; got = hr_rdata;
          checks++;
          if (got !== to_pixel(mx)) begin
            failures++;
            if (failures < 20)
              $display("map %0d (%0d,%0d): %0d expected %0d", f, oy, ox, got, to_pixel(mx));
          end
        end
    end
    checks++;
    if (pool_partial != 16'(3 * NF * P) || pool_merged != 16'(3 * NF * P)) begin
      failures++;
      $display("partial %0d merged %0d, expected %0d each", pool_partial, pool_merged, 3 * NF * P);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
