// lrn_unit: pipelined local response normalisation datapath.
//
// Normalises one pixel across depth:
//     b = a / (K + ALPHA * (a^2 + n0^2 + n1^2 + n2^2 + n3^2))
// where a is the pixel of map i and n0..n3 the pixels at the same position in
// the neighbouring maps i-2, i-1, i+1, i+2 (zero beyond the first or last map).
// The datapath is the design's schematic: five input registers, a squarer per
// input, one adder, a multiplier by the constant ALPHA (2e-5), an adder of the
// constant K (1) and a divider of the centre pixel by that denominator.
// Every block ends in a register, so the long path is split into a pipeline:
//   cycle 1       input registers
//   cycle 2       squares, sum, x ALPHA, + K (registered denominator)
//   cycles 3..18  16-stage pipelined divider (pipe_divider)
// One pixel can enter every cycle; its result leaves 18 cycles later.
// Formats: pixels have 5 fraction bits; the denominator and the division are
// 32-bit Q16.16; ALPHA is held with 32 fraction bits. The result is rounded
// toward zero and saturated to a 16-bit pixel. The exponent beta of the usual
// LRN formula is 1 here, as in the design's schematic, which draws no power
// block. A TW-bit tag travels with each pixel.
module lrn_unit
  import cnn_pkg::*;
#(
  parameter int unsigned  TW        = 1,
  parameter logic [31:0]  ALPHA_Q32 = 32'd85899,   // 2e-5 * 2^32
  parameter logic [31:0]  K_Q16     = 32'd65536    // 1.0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  data_t         a,
  input  data_t         nb [4],
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output data_t         b,
  output logic [TW-1:0] out_tag
);

  localparam int unsigned SHIFT_IN = 16 - FMAP_FRAC;   // pixel -> Q16.16

  // Stage 1: input registers A..E.
  logic          v1;
  data_t         r_a;
  data_t         r_n [4];
  logic [TW-1:0] t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      r_a <= '0;
      t1  <= '0;
      for (int i = 0; i < 4; i++) r_n[i] <= '0;
    end else begin
      v1  <= in_valid;
      r_a <= a;
      t1  <= in_tag;
      for (int i = 0; i < 4; i++) r_n[i] <= nb[i];
    end
  end

  // Stage 2: denominator.
  logic [63:0] sumsq, scaled;
  logic [31:0] den_c, num_c;
  logic [15:0] mag;

  always_comb begin
    sumsq = 64'(32'(r_a * r_a));
    for (int i = 0; i < 4; i++) sumsq = sumsq + 64'(32'(r_n[i] * r_n[i]));
    // sumsq has 2*FMAP_FRAC fraction bits, ALPHA 32: bring to 16.
    scaled = (sumsq * 64'(ALPHA_Q32)) >> (2 * FMAP_FRAC + 32 - 16);
    den_c  = K_Q16 + scaled[31:0];
    mag    = r_a[DATA_W-1] ? 16'(-r_a) : 16'(r_a);
    num_c  = 32'(mag) << SHIFT_IN;
  end

  logic          v2;
  logic [31:0]   num2, den2;
  logic [TW:0]   t2;      // {sign, tag}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2   <= 1'b0;
      num2 <= '0;
      den2 <= '0;
      t2   <= '0;
    end else begin
      v2   <= v1;
      num2 <= num_c;
      den2 <= den_c;
      t2   <= {r_a[DATA_W-1], t1};
    end
  end

  // Stages 3..18: division.
  logic          dv;
  logic [31:0]   quo;
  logic [TW:0]   dt;

  pipe_divider #(.W(32), .FRAC(16), .STAGES(16), .TW(TW + 1)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v2),
    .num       (num2),
    .den       (den2),
    .in_tag    (t2),
    .out_valid (dv),
    .quo       (quo),
    .out_tag   (dt)
  );

  logic [31:0] qpix;
  always_comb begin
    qpix = quo >> SHIFT_IN;
    if (qpix > 32'd32767) qpix = 32'd32767;
    out_valid = dv;
    out_tag   = dt[TW-1:0];
    b         = dt[TW] ? -data_t'(qpix[15:0]) : data_t'(qpix[15:0]);
  end

endmodule
