// tb_lrn_engine: self-checking test of the LRN engine.
// Seven channels of a 10-position map are normalised across depth with a
// window of five channels (two on each side, zero beyond the edges). The
// reference computes b = a / (1 + 2e-5 * sum of the five squares) in real
// arithmetic; each output must be within one pixel LSB. Every output must be
// written exactly once, and done must follow the last write.
module tb_lrn_engine;
  import cnn_pkg::*;

  localparam int NCH = 7, HW = 10;

  logic clk = 1'b0;
  logic rst_n, start, busy, done, re, we;
  lrn_cfg_t cfg;
  baddr_t raddr, waddr;
  data_t rdata, wdata;
  int checks = 0, failures = 0;
  int n_wr = 0;

  data_t src [NCH * HW];
  data_t dst [NCH * HW];
  int    hits [NCH * HW];

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (re) rdata <= src[raddr];
  always @(posedge clk) if (rst_n && we) begin
    dst[waddr] <= wdata;
    hits[waddr] <= hits[waddr] + 1;
    n_wr <= n_wr + 1;
  end

  lrn_engine dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; rdata = 0;
    cfg = '0; cfg.nch = 10'(NCH); cfg.hw = 16'(HW);
    for (int i = 0; i < NCH * HW; i++) begin
      src[i] = data_t'($signed($urandom % 40000) - 20000);
      dst[i] = 0; hits[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (n_wr != NCH * HW) begin failures++; $display("%0d writes, expected %0d", n_wr, NCH * HW); end
    for (int c = 0; c < NCH; c++)
      for (int p = 0; p < HW; p++) begin
        real s, a, e, got;
        s = 0.0;
        for (int d = -2; d <= 2; d++)
          if (c + d >= 0 && c + d < NCH) begin
            real v;
            v = real'(src[(c + d) * HW + p]) / 32.0;
            s += v * v;
          end
        a = real'(src[c * HW + p]) / 32.0;
        e = a / (1.0 + 2.0e-5 * s);
        got = real'(dst[c * HW + p]) / 32.0;
        checks++;
        if (hits[c * HW + p] != 1 || got - e > 1.0 / 32.0 || e - got > 1.0 / 32.0) begin
          failures++;
          $display("ch %0d pos %0d: %f expected %f (%0d writes)", c, p, got, e, hits[c * HW + p]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
