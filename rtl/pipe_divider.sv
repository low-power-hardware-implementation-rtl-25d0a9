// pipe_divider: pipelined unsigned fixed-point divider.
//
// Computes q = floor(n * 2^FRAC / d) for W-bit unsigned n and d in the same
// fixed-point format (FRAC fraction bits), e.g. 1000/21 gives 47.6190338 in
// Q16.16. It is restoring long division: the dividend, extended by FRAC zero
// bits, is shifted left one bit at a time into a partial remainder; whenever
// the remainder is at least the divisor, the divisor is subtracted and the
// quotient bit is 1. The W+FRAC iterations are spread over STAGES pipeline
// stages, so a new division can start every cycle and each result appears
// STAGES cycles after its operands. A quotient that does not fit in W bits
// (including d = 0) saturates to all ones. A TW-bit tag travels along with
// each operation.
//
// The shift-and-subtract algorithm, the 32-bit fixed-point format and the
// 16-cycle pipelined form used in the LRN follow the design; the Q16.16 split
// (read from the design's simulation values), the spreading of 48 iterations
// as 3 per stage, saturation and the tag are this implementation's choices.
module pipe_divider #(
  parameter int unsigned W      = 32,
  parameter int unsigned FRAC   = 16,
  parameter int unsigned STAGES = 16,
  parameter int unsigned TW     = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  num,
  input  logic [W-1:0]  den,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [W-1:0]  quo,
  output logic [TW-1:0] out_tag
);

  localparam int unsigned N   = W + FRAC;                 // quotient bits
  localparam int unsigned IPS = (N + STAGES - 1) / STAGES; // iterations per stage

  typedef struct packed {
    logic          v;
    logic [N-1:0]  dvd;   // dividend bits still to shift in (MSB first)
    logic [N-1:0]  q;     // quotient bits so far
    logic [W:0]    rem;   // partial remainder
    logic [W-1:0]  d;
    logic [TW-1:0] tag;
  } slot_t;

  slot_t st [STAGES+1];

  always_comb begin
    st[0].v   = in_valid;
    st[0].dvd = N'(num) << FRAC;
    st[0].q   = '0;
    st[0].rem = '0;
    st[0].d   = den;
    st[0].tag = in_tag;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    slot_t nx;
    always_comb begin
      nx = st[s];
      for (int i = 0; i < int'(IPS); i++) begin
        if (s * IPS + i < N) begin
          nx.rem = {nx.rem[W-1:0], nx.dvd[N-1]};
          nx.dvd = nx.dvd << 1;
          nx.q   = nx.q << 1;
          if (nx.rem >= {1'b0, nx.d}) begin
            nx.rem  = nx.rem - {1'b0, nx.d};
            nx.q[0] = 1'b1;
          end
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[s+1] <= '0;
      else        st[s+1] <= nx;
    end
  end

  always_comb begin
    out_valid = st[STAGES].v;
    out_tag   = st[STAGES].tag;
    if (N > W && |st[STAGES].q[N-1:W]) quo = '1;
    else                                quo = st[STAGES].q[W-1:0];
  end

endmodule
