// pe_array: the matrix of processing elements, 12 PE rows by 14 PE columns.
//
// In a CONV pass each PE column produces one output row: its PE rows hold the
// K rows of a filter (and, when K is small, further groups of K rows for more
// input depths), and the partial sums are added down the column. Input rows
// are placed diagonally: padded input row r of depth group g belongs to the
// PE in column j and row g*K + (r - S*j) whenever 0 <= r - S*j < K, so with a
// vertical stride S each new column starts S input rows further down. Filter
// rows are shared along a PE row. In an FC pass every PE holds one chunk of
// the input vector and the matching chunk of one neuron's weights.
//
// Writes are broadcast on one bus (rf_wr_t); every PE decides from the tag and
// its own position whether a write is its own. MAC steps (mac_cmd_t) are
// broadcast too and every active PE executes them in lock step. col_sum[j] is
// the sum of the accumulators of the active PEs of column j, valid two cycles
// after the last MAC step (see pe).
//
// The 14x12 shape, diagonal input placement, shared filter rows and vertical
// accumulation follow the design; the tag encoding is this implementation's.
module pe_array
  import cnn_pkg::*;
#(
  parameter int unsigned ROWS = PE_ROWS,
  parameter int unsigned COLS = PE_COLS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  array_cfg_t cfg,
  input  rf_wr_t     wr,
  input  mac_cmd_t   mac,
  output psum_t      col_sum [COLS]
);

  // Position of every PE row inside its depth group: row i = g*K + k.
  logic [3:0] row_k [ROWS];
  logic [3:0] row_g [ROWS];

  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      row_k[i] = 4'(i);
      row_g[i] = '0;
      for (int n = 0; n < ROWS; n++) begin
        if (cfg.k != 0 && row_k[i] >= cfg.k) begin
          row_k[i] = row_k[i] - cfg.k;
          row_g[i] = row_g[i] + 4'd1;
        end
      end
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_col
    // Input row that lands in the top PE of this column.
    logic [6:0] col_off;
    assign col_off = 7'(cfg.stride) * 7'(j);

    for (genvar i = 0; i < ROWS; i++) begin : g_row
      logic  mine, active;
      psum_t pin, pout;
      if (i == 0) begin : g_top
        assign pin = '0;
      end else begin : g_below
        assign pin = g_row[i-1].pout;
      end
      always_comb begin
        unique case (wr.tag)
          TAG_DIAG:  mine = !cfg.fc && (row_g[i] == 4'(wr.g)) && (row_g[i] < 4'(cfg.ngrp)) &&
                            (7'(wr.r) == col_off + 7'(row_k[i]));
          TAG_ROW:   mine = (wr.row == 4'(i));
          TAG_POINT: mine = (wr.row == 4'(i)) && (wr.col == 4'(j));
          default:   mine = 1'b0;
        endcase
      end
      assign active = (4'(i) < cfg.rows_used) && (4'(j) < cfg.cols_used);

      pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .active   (active),
        .wr_ifm   (wr.en && !wr.to_filter && mine),
        .wr_flt   (wr.en &&  wr.to_filter && mine),
        .wr_addr  (wr.addr),
        .wr_data  (wr.data),
        .mac      (mac),
        .psum_in  (pin),
        .psum_out (pout)
      );
    end
    assign col_sum[j] = g_row[ROWS-1].pout;
  end

endmodule
