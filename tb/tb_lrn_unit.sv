// tb_lrn_unit: self-checking test of the local response normalisation unit.
// For random pixels (Q10.5) the reference computes
//   b = a / (1 + 2e-5 * (a^2 + sum of the four neighbours' squares))
// in real arithmetic; the unit's result must be within one pixel LSB of it.
// One input per cycle; every result must appear exactly 18 cycles after its
// input, in order, with its tag.
module tb_lrn_unit;
  import cnn_pkg::*;

  localparam int TW = 12;
  localparam int LAT = 18;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid;
  data_t a, b;
  data_t nb [4];
  logic [TW-1:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  lrn_unit #(.TW(TW)) dut (.*);

  real exp_b [$];
  int  exp_c [$];
  int  exp_t [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_b.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        real e; int c, tg; real got;
        e = exp_b.pop_front(); c = exp_c.pop_front(); tg = exp_t.pop_front();
        got = real'(b) / 32.0;
        if ((got - e) > 1.0 / 32.0 || (e - got) > 1.0 / 32.0 || cycle - c != LAT ||
            out_tag !== TW'(tg)) begin
          failures++;
          $display("tag %0d: b %f expected %f, latency %0d", tg, got, e, cycle - c);
        end
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; a = 0; in_tag = 0;
    for (int i = 0; i < 4; i++) nb[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      real s, ar;
      int range;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      range = (t % 3 == 0) ? 32768 : (t % 3 == 1) ? 4096 : 256;
      a = data_t'($signed($urandom % (2 * range)) - range);
      for (int i = 0; i < 4; i++) nb[i] = data_t'($signed($urandom % (2 * range)) - range);
      in_tag = TW'(t);
      if (in_valid) begin
        ar = real'(a) / 32.0;
        s = ar * ar;
        for (int i = 0; i < 4; i++) s += (real'(nb[i]) / 32.0) * (real'(nb[i]) / 32.0);
        exp_b.push_back(ar / (1.0 + 2.0e-5 * s));
        exp_c.push_back(cycle);
        exp_t.push_back(t);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_b.size() != 0) begin failures++; $display("%0d results missing", exp_b.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
