// psum_buffer: the global partial-sum buffer.
//
// Holds 32-bit partial sums (16 fraction bits) of the output rows a CONV pass
// is building: 12320 words, the 14 rows x 55 pixels x 16 maps of a layer-1
// pass, the largest of all layers. The first depth pass stores its partial
// sums; every later pass adds its partial sums to the stored ones; the last
// pass also adds the bias and may apply ReLU. That read-add-write is done here:
//
//   write request (cycle t):  addr, data, acc, relu
//   cycle t+1:                the stored word is read (or forwarded from the
//                             write of cycle t when it hits the same address)
//   cycle t+2 edge:           mem[addr] <= relu(acc ? old + data : data)
//
// One request per cycle is accepted, back-to-back requests to the same
// address included. The read port (for the pooling unit) is synchronous, one
// cycle. Storing, accumulating across depths and adding the bias follow the
// design; ReLU at the final write and the forwarding are this design's.
module psum_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = PSUM_BUF_DEPTH,
  parameter int unsigned AW    = BUF_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  psum_t         wr_data,
  input  logic          wr_acc,
  input  logic          wr_relu,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output psum_t         rdata
);

  // memory index: the address checked against DEPTH, then its low IW bits
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  psum_t mem [DEPTH];

  // Request register.
  logic          s1_v, s1_acc, s1_relu;
  logic [AW-1:0] s1_addr;
  psum_t         s1_data;
  psum_t         s1_old;
  psum_t         s1_sum;
  // Write stage.
  logic          s2_v;
  logic [AW-1:0] s2_addr;
  psum_t         s2_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
    end else begin
      s1_v <= wr_en;
      s2_v <= s1_v;
    end
  end

  always_ff @(posedge clk) begin
    s1_addr <= wr_addr;
    s1_data <= wr_data;
    s1_acc  <= wr_acc;
    s1_relu <= wr_relu;
    // The word the new request reads: from the write that completes this
    // cycle when it hits the same address, else from the memory.
    s1_old  <= (wr_addr < AW'(DEPTH)) ? mem[IW'(wr_addr)] : psum_t'(0);
    if (s1_v && s1_addr == wr_addr) s1_old <= s1_sum;
    else if (s2_v && s2_addr == wr_addr) s1_old <= s2_val;
  end

  always_comb begin
    s1_sum = s1_acc ? s1_old + s1_data : s1_data;
    if (s1_relu && s1_sum < 0) s1_sum = '0;
  end

  always_ff @(posedge clk) begin
    s2_addr <= s1_addr;
    s2_val  <= s1_sum;
    if (s1_v && s1_addr < AW'(DEPTH)) mem[IW'(s1_addr)] <= s1_sum;
    if (re) rdata <= (raddr < AW'(DEPTH)) ? mem[IW'(raddr)] : psum_t'(0);
  end

endmodule
