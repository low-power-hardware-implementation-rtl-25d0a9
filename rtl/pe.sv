// pe: one processing element of the row-stationary PE matrix.
//
// The PE holds two register files: one for filter weights and one for input
// feature-map pixels. A multiplier and an adder with an accumulator register
// perform multiply-accumulate steps, so that over a sequence of steps the PE
// computes a 1-D row convolution (one output pixel of one filter row against
// one input row), or, with several depths interleaved in its register files,
// the sum of such row convolutions over those depths.
//
// Interface and timing
//   * wr_ifm / wr_flt with wr_addr, wr_data: one register-file write per cycle.
//   * mac: a step names a weight address and a pixel address. Both register
//     files are read synchronously; one cycle later the product is added to the
//     accumulator (or, for a step flagged 'first', replaces it). The result of
//     a step issued in cycle t is in acc from cycle t+2.
//   * psum_out = psum_in + acc: the adder that sums partial sums down a PE
//     column is combinational, so a whole column settles in the same cycle.
//   * active = 0 stands for a clock-gated, unused PE: it does not accumulate
//     and adds nothing to the column sum.
// The register files, multiplier, adder and accumulator follow the design;
// the lock-step addressing from a shared controller and the combinational
// column adder are this implementation's choices.
module pe
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = RF_DEPTH,
  parameter int unsigned AW    = RF_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          active,
  input  logic          wr_ifm,
  input  logic          wr_flt,
  input  logic [AW-1:0] wr_addr,
  input  data_t         wr_data,
  input  mac_cmd_t      mac,
  input  psum_t         psum_in,
  output psum_t         psum_out
);

  data_t flt_rf [DEPTH];
  data_t ifm_rf [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_flt) flt_rf[wr_addr] <= wr_data;
    if (wr_ifm) ifm_rf[wr_addr] <= wr_data;
  end

  // Stage 1: synchronous register-file reads.
  data_t w_q, x_q;
  logic  v_q, first_q;

  always_ff @(posedge clk) begin
    w_q <= flt_rf[mac.faddr];
    x_q <= ifm_rf[mac.iaddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      first_q <= 1'b0;
    end else begin
      v_q     <= mac.en & active;
      first_q <= mac.first;
    end
  end

  // Stage 2: multiply and accumulate.
  psum_t prod;
  psum_t acc;

  always_comb prod = psum_t'(w_q) * psum_t'(x_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (v_q) acc <= (first_q ? psum_t'(0) : acc) + prod;
  end

  assign psum_out = psum_in + (active ? acc : psum_t'(0));

endmodule
