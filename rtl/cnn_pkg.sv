// cnn_pkg: sizes, fixed-point formats and command structures shared by the
// AlexNet row-stationary accelerator.
//
// Number formats. Feature-map pixels are 16-bit two's complement with 5
// fraction bits and weights/biases are 16-bit with 11 fraction bits (the
// "FMAPs=5, Filters=11" fixed-point point whose accuracy matches floating
// point). A product therefore has 16 fraction bits, and all partial sums are
// 32-bit with 16 fraction bits. Results go back to the pixel format by an
// arithmetic shift right of 11 with saturation (requant()).
//
// Sizes follow the design's own numbers: a 12-row by 14-column PE matrix,
// 256-entry register files per PE (0.5 KB of 16-bit words across the two),
// and global buffers sized to the largest per-layer need: filter buffer 36880
// words (layer 3), PSUM buffer 12320 words (layer 1), swapping buffers 69984
// words (27x27x96, layer 2). The word widths are this design's choice.
//
// Commands. The accelerator executes one command at a time, each a complete
// pass of one engine: a CONV or FC pass on the PE matrix, a pooling pass, an
// LRN pass or a class estimation. A layer is a sequence of such commands,
// produced offline by a mapper, as the design intends.
package cnn_pkg;

  localparam int unsigned DATA_W     = 16;
  localparam int unsigned PSUM_W     = 32;
  localparam int unsigned FMAP_FRAC  = 5;
  localparam int unsigned WGT_FRAC   = 11;
  localparam int unsigned PSUM_FRAC  = FMAP_FRAC + WGT_FRAC;

  localparam int unsigned PE_ROWS    = 12;
  localparam int unsigned PE_COLS    = 14;
  localparam int unsigned RF_DEPTH   = 256;
  localparam int unsigned RF_AW      = 8;

  localparam int unsigned FILTER_BUF_DEPTH = 36880;
  localparam int unsigned PSUM_BUF_DEPTH   = 12320;
  localparam int unsigned SWAP_BUF_DEPTH   = 69984;
  localparam int unsigned BUF_AW           = 17;   // covers every global buffer

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [PSUM_W-1:0] psum_t;
  typedef logic [BUF_AW-1:0]        baddr_t;

  // Global buffer selector.
  typedef enum logic [1:0] {
    BUF_FILTER = 2'd0,
    BUF_SWAP1  = 2'd1,
    BUF_SWAP2  = 2'd2
  } buf_sel_e;

  typedef enum logic [2:0] {
    OP_CONV  = 3'd0,
    OP_FC    = 3'd1,
    OP_POOL  = 3'd2,
    OP_LRN   = 3'd3,
    OP_EST   = 3'd4
  } op_e;

  // How a PE decides whether a broadcast register-file write is its own.
  typedef enum logic [1:0] {
    TAG_DIAG  = 2'd0,   // ifmap row r of depth group g: PE(i,j) with i%K==r-S*j
    TAG_ROW   = 2'd1,   // filter row: every PE of PE row 'row'
    TAG_POINT = 2'd2    // one PE (row, col), used for FC chunks
  } wr_tag_e;

  // Broadcast write into the PE register files.
  typedef struct packed {
    logic             en;
    logic             to_filter;  // 1: filter RF, 0: ifmap RF
    wr_tag_e          tag;
    logic [5:0]       r;          // padded input row inside the pass (TAG_DIAG)
    logic [2:0]       g;          // depth group (TAG_DIAG)
    logic [3:0]       row;        // PE row (TAG_ROW, TAG_POINT)
    logic [3:0]       col;        // PE column (TAG_POINT)
    logic [RF_AW-1:0] addr;
    data_t            data;
  } rf_wr_t;

  // Lock-step MAC step broadcast to all PEs.
  typedef struct packed {
    logic             en;
    logic             first;      // restart the accumulator with this product
    logic [RF_AW-1:0] faddr;
    logic [RF_AW-1:0] iaddr;
  } mac_cmd_t;

  // Shape of the active part of the PE matrix.
  typedef struct packed {
    logic       fc;
    logic [3:0] k;          // filter rows per depth group
    logic [2:0] stride;
    logic [2:0] ngrp;       // depth groups stacked down the PE rows
    logic [3:0] rows_used;
    logic [3:0] cols_used;
  } array_cfg_t;

  // One CONV or FC pass.
  typedef struct packed {
    logic        fc;
    logic        load_input;   // (re)load the ifmap register files
    logic        first;        // first depth pass: overwrite PSUMs
    logic        last;         // last depth pass: add bias (and ReLU)
    logic        relu;
    buf_sel_e    src;          // ifmap / FC input buffer
    buf_sel_e    wsrc;         // weights and biases buffer
    buf_sel_e    dst;          // FC output buffer
    // CONV fields
    logic [3:0]  k;            // filter size K x K
    logic [2:0]  stride;
    logic [1:0]  pad;
    logic [7:0]  in_h;
    logic [7:0]  in_w;
    logic [7:0]  out_w;        // output row length E
    logic [3:0]  ncol;         // output rows in this pass (active PE columns)
    logic [7:0]  out_row0;     // first output row of the pass
    logic [2:0]  ngrp;         // depth groups down the PE rows
    logic [4:0]  nd;           // depths held per PE
    logic [9:0]  ch_base;      // first ifmap channel of the pass
    logic [9:0]  flt_ch_base;  // same depth, counted inside the filter
    logic [9:0]  flt_c;        // depth of each stored filter
    logic [4:0]  nf;           // filters in the batch (CONV) / filters in the pass (FC)
    logic [4:0]  nf_rf;        // filters per register-file load
    logic [7:0]  psum_row0;    // PSUM row of PE column 0
    logic [7:0]  psum_h;       // rows per map in the PSUM buffer
    baddr_t      bias_base;    // address of the bias of filter 0 (FC: of neuron 0)
    // FC fields (in_base and w_base serve CONV too)
    logic [13:0] fc_len;       // input vector length
    logic [8:0]  fc_chunk;     // input words per PE
    logic [3:0]  fc_rows;      // PE rows per filter
    logic [3:0]  fc_cols;      // PE columns per filter
    baddr_t      in_base;      // ifmap (CONV) / input vector (FC) base address
    baddr_t      w_base;       // weights of filter 0 (CONV) / of the pass' first neuron (FC)
    logic [12:0] f0;           // index of the pass' first neuron
    baddr_t      out_base;
  } layer_cfg_t;

  // One pooling pass from the PSUM buffer into a swapping buffer.
  typedef struct packed {
    buf_sel_e    dst;
    logic [4:0]  nmaps;        // maps held in the PSUM buffer
    logic [7:0]  src_rows;     // rows of each map present
    logic [7:0]  src_w;        // row length
    logic [7:0]  psum_h;       // rows per map in the PSUM buffer
    logic [7:0]  row0;         // global row number of PSUM row 0
    logic [1:0]  win;          // 3: 3x3 window, 1: copy
    logic [1:0]  st;           // stride
    logic [7:0]  out_h;
    logic [7:0]  out_w;
    logic [9:0]  dst_ch_base;
  } pool_cfg_t;

  // One LRN pass across the depth of a volume.
  typedef struct packed {
    buf_sel_e    src;
    buf_sel_e    dst;
    logic [9:0]  nch;
    logic [15:0] hw;           // pixels per map
  } lrn_cfg_t;

  // Class estimation over a score vector.
  typedef struct packed {
    buf_sel_e    src;
    baddr_t      base;
    logic [12:0] count;
  } est_cfg_t;

  typedef struct packed {
    op_e        op;
    layer_cfg_t layer;
    pool_cfg_t  pool;
    lrn_cfg_t   lrn;
    est_cfg_t   est;
  } cmd_t;

  // One-cycle event pulses brought out of the top for a host's statistics.
  typedef struct packed {
    logic ps_store;     // PSUM word written (first depth pass)
    logic ps_accum;     // PSUM word accumulated (later depth pass)
    logic ps_last;      // PSUM word finished with bias and ReLU
    logic pad_zero;     // zero padding written into an ifmap register file
    logic flt_load;     // a filter register-file load (batch) begins
    logic gated_step;   // MAC step with part of the PE matrix unused
    logic copy_wr;      // pooling unit wrote in copy mode
    logic lrn_wr;       // LRN result written
    logic fc_wr;        // FC neuron written
    logic est_done;     // class estimation finished
  } event_t;

  // Partial sum (16 fraction bits) back to a pixel (5 fraction bits),
  // arithmetic shift with saturation.
  function automatic data_t requant(input psum_t p);
    psum_t s;
    s = p >>> WGT_FRAC;
    if (s > psum_t'(32767))       return data_t'(16'sh7fff);
    else if (s < -psum_t'(32768)) return data_t'(16'sh8000);
    else                          return data_t'(s[DATA_W-1:0]);
  endfunction

  // Bias (weight format) aligned to the partial-sum format.
  function automatic psum_t bias_align(input data_t b);
    return psum_t'(b) <<< FMAP_FRAC;
  endfunction

endpackage
