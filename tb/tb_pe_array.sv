// tb_pe_array: self-checking test of the PE matrix.
// CONV: for three mappings (K=3 stride 1 with four depth groups, K=5
// stride 2 with two groups, K=11 stride 4 with one group) filter rows are
// broadcast to PE rows and padded input rows are written diagonally; MAC steps
// then compute one output pixel per column, and each column sum must equal a
// direct 3-D convolution reference for that output row. Unused columns must
// sum to zero. FC: every PE gets its own vector chunk and weights by
// point writes, and each column must return the dot product over its rows.
module tb_pe_array;
  import cnn_pkg::*;

  localparam int ROWS = PE_ROWS, COLS = PE_COLS, W = 12;

  logic clk = 1'b0;
  logic rst_n;
  array_cfg_t cfg;
  rf_wr_t wr;
  mac_cmd_t mac;
  psum_t col_sum [COLS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  data_t flt [4][11][11];
  data_t img [4][64][W];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic to_f, input wr_tag_e tag, input int r, input int g,
                       input int row, input int col, input int addr, input data_t d);
    @(negedge clk);
    wr = '0;
    wr.en = 1; wr.to_filter = to_f; wr.tag = tag; wr.r = 6'(r); wr.g = 3'(g);
    wr.row = 4'(row); wr.col = 4'(col); wr.addr = 8'(addr); wr.data = d;
  endtask

  task automatic conv(input int k, input int s, input int ng, input int ncols);
    int nrows;
    nrows = (ncols - 1) * s + k;
    cfg = '0; cfg.k = 4'(k); cfg.stride = 3'(s); cfg.ngrp = 3'(ng);
    cfg.rows_used = 4'(k * ng); cfg.cols_used = 4'(ncols);
    for (int g = 0; g < ng; g++) begin
      for (int a = 0; a < k; a++)
        for (int b = 0; b < k; b++) flt[g][a][b] = data_t'($signed($urandom % 512) - 256);
      for (int r = 0; r < nrows; r++)
        for (int c = 0; c < W; c++) img[g][r][c] = data_t'($signed($urandom % 512) - 256);
    end
    // filter row a of group g goes to PE row g*k + a
    for (int g = 0; g < ng; g++)
      for (int a = 0; a < k; a++)
        for (int b = 0; b < k; b++) write(1, TAG_ROW, 0, 0, g * k + a, 0, b, flt[g][a][b]);
    // input rows diagonally
    for (int g = 0; g < ng; g++)
      for (int r = 0; r < nrows; r++)
        for (int c = 0; c < W; c++) write(0, TAG_DIAG, r, g, 0, 0, c, img[g][r][c]);
    @(negedge clk); wr = '0;
    for (int px = 0; px + k <= W; px++) begin
      for (int b = 0; b < k; b++) begin
        @(negedge clk);
        mac.en = 1; mac.first = (b == 0); mac.faddr = 8'(b); mac.iaddr = 8'(px + b);
      end
      @(negedge clk); mac = '0;
      @(negedge clk);
      for (int j = 0; j < COLS; j++) begin
        psum_t e;
        e = 0;
        if (j < ncols)
          for (int g = 0; g < ng; g++)
            for (int a = 0; a < k; a++)
              for (int b = 0; b < k; b++)
                e += psum_t'(flt[g][a][b]) * psum_t'(img[g][s * j + a][px + b]);
        checks++;
        if (col_sum[j] !== e) begin
          failures++;
          $display("K=%0d col %0d px %0d: %0d expected %0d", k, j, px, col_sum[j], e);
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; cfg = '0; wr = '0; mac = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    conv(3, 1, 4, 14);
    conv(5, 2, 2, 14);
    conv(11, 4, 1, 14);
    conv(3, 1, 4, 13);
    // FC: 6 rows x 4 columns, 8 words per PE
    begin
      data_t x [12][14][8];
      data_t w [12][14][8];
      cfg = '0; cfg.fc = 1; cfg.rows_used = 4'd6; cfg.cols_used = 4'd4;
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 4; j++)
          for (int a = 0; a < 8; a++) begin
            x[i][j][a] = data_t'($urandom); w[i][j][a] = data_t'($urandom);
            write(0, TAG_POINT, 0, 0, i, j, a, x[i][j][a]);
            write(1, TAG_POINT, 0, 0, i, j, a, w[i][j][a]);
          end
      // a diagonal write must be ignored in FC mode
      write(0, TAG_DIAG, 0, 0, 0, 0, 0, 16'sd77);
      @(negedge clk); wr = '0;
      for (int a = 0; a < 8; a++) begin
        @(negedge clk); mac.en = 1; mac.first = (a == 0); mac.faddr = 8'(a); mac.iaddr = 8'(a);
      end
      @(negedge clk); mac = '0;
      @(negedge clk);
      for (int j = 0; j < COLS; j++) begin
        psum_t e;
        e = 0;
        if (j < 4)
          for (int i = 0; i < 6; i++)
            for (int a = 0; a < 8; a++) e += psum_t'(x[i][j][a]) * psum_t'(w[i][j][a]);
        checks++;
        if (col_sum[j] !== e) begin
          failures++;
          $display("FC col %0d: %0d expected %0d", j, col_sum[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
