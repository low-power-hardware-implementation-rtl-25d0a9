// global_buffer: one on-chip global buffer (filter buffer or swapping buffer).
//
// A simple dual-port memory of 16-bit words: one synchronous read port (data
// one cycle after the address) and one write port. A write and a read of the
// same address in one cycle return the old word. The accelerator has three:
// the filter buffer (DEPTH 36880, the largest per-layer filter batch plus its
// biases, layer 3) and the two swapping buffers (DEPTH 69984, the 27x27x96
// layer-2 input) that take turns holding a layer's input and output.
// The buffer sizes are the design's; the port arrangement is this
// implementation's choice (block-RAM style, read-before-write).
module global_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = SWAP_BUF_DEPTH,
  parameter int unsigned AW    = BUF_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  data_t         wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output data_t         rdata
);

  // memory index: the address checked against DEPTH, then its low IW bits
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[IW'(waddr)] <= wdata;
    if (re) rdata <= (raddr < AW'(DEPTH)) ? mem[IW'(raddr)] : data_t'(0);
  end

endmodule
