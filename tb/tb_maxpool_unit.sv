// tb_maxpool_unit: self-checking test of the max-pooling unit.
// Two 13x13 maps of random partial sums are pooled 3x3 / stride 2 into 6x6
// pixel maps. The maps are delivered in two parts, rows 0..6 and rows 7..12,
// as a layer computed in strips would deliver them, so the windows of output
// row 3 (rows 6..8) straddle the parts: the first pass must store a partial
// maximum and the second must merge into it. The result is compared with a
// reference that pools the whole map at once, and the partial / merge
// counters must both equal 2 maps x 6 windows. A copy pass (1x1 window,
// stride 1) is checked as well.
module tb_maxpool_unit;
  import cnn_pkg::*;

  localparam int H = 13, OW = 6, NM = 2;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  pool_cfg_t cfg;
  logic ps_re, dst_re, dst_we;
  baddr_t ps_raddr, dst_raddr, dst_waddr;
  psum_t ps_rdata;
  data_t dst_rdata, dst_wdata;
  logic [15:0] n_partial, n_merge;
  int checks = 0, failures = 0;

  psum_t full  [NM][H][H];
  psum_t psmem [2048];
  data_t dmem  [2048];

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (ps_re)  ps_rdata  <= psmem[ps_raddr[10:0]];
    if (dst_re) dst_rdata <= dmem[dst_raddr[10:0]];
    if (dst_we) dmem[dst_waddr[10:0]] <= dst_wdata;
  end

  maxpool_unit dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t to_pixel(psum_t p);
    psum_t s;
    s = p >>> 11;
    if (s > 32767) return 16'sd32767;
    if (s < -32768) return -16'sd32768;
    return data_t'(s);
  endfunction

  task automatic run_part(input int row0, input int rows, input int win, input int st,
                          input int oh, input int ow, input int dbase);
    // load the part into the PSUM memory: (m*psum_h + row-row0)*src_w + col
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < H; c++) psmem[(m * 7 + r) * H + c] = full[m][row0 + r][c];
    cfg = '0;
    cfg.nmaps = 5'(NM); cfg.src_rows = 8'(rows); cfg.src_w = 8'(H); cfg.psum_h = 8'(7);
    cfg.row0 = 8'(row0); cfg.win = 2'(win); cfg.st = 2'(st);
    cfg.out_h = 8'(oh); cfg.out_w = 8'(ow); cfg.dst_ch_base = 10'(dbase);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; start = 0; cfg = '0; ps_rdata = 0; dst_rdata = 0;
    for (int i = 0; i < 2048; i++) dmem[i] = 16'h5555;
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) full[m][r][c] = psum_t'($signed($urandom) >>> 4);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pooled, in two parts, into maps 1 and 2 of the destination
    run_part(0, 7, 3, 2, OW, OW, 1);
    run_part(7, 6, 3, 2, OW, OW, 1);
    for (int m = 0; m < NM; m++)
      for (int oy = 0; oy < OW; oy++)
        for (int ox = 0; ox < OW; ox++) begin
          psum_t mx; data_t got;
          mx = full[m][2 * oy][2 * ox];
          for (int dy = 0; dy < 3; dy++)
            for (int dx = 0; dx < 3; dx++)
              if (full[m][2 * oy + dy][2 * ox + dx] > mx) mx = full[m][2 * oy + dy][2 * ox + dx];
          got = dmem[(1 + m) * OW * OW + oy * OW + ox];
          checks++;
          if (got !== to_pixel(mx)) begin
            failures++;
            $display("map %0d (%0d,%0d): %0d expected %0d", m, oy, ox, got, to_pixel(mx));
          end
        end
    checks++;
    if (n_partial != 16'(NM * OW) || n_merge != 16'(NM * OW)) begin
      failures++;
      $display("partial %0d merge %0d, expected %0d each", n_partial, n_merge, NM * OW);
    end
    // map 0 of the destination untouched
    checks++;
    if (dmem[5] !== 16'h5555) begin failures++; $display("wrote outside its maps"); end
    // copy mode: rows 0..6 of both maps, 1x1 window, stride 1
    run_part(0, 7, 1, 1, 7, H, 20);
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < 7; r++)
        for (int c = 0; c < H; c++) begin
          checks++;
          if (dmem[(20 + m) * 7 * H + r * H + c] !== to_pixel(full[m][r][c])) begin
            failures++;
            $display("copy map %0d (%0d,%0d) wrong", m, r, c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
