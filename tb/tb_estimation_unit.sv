// tb_estimation_unit: self-checking test of the class estimation unit.
// A behavioural memory with one-cycle read latency holds 1000 signed class
// scores; the unit must return the index and value of the largest, the
// lowest index on a tie, and work from a non-zero base address.
module tb_estimation_unit;
  import cnn_pkg::*;

  logic clk = 1'b0;
  logic rst_n, start, busy, done, re;
  est_cfg_t cfg;
  baddr_t raddr;
  data_t rdata, score;
  logic [12:0] cls;
  int checks = 0, failures = 0;
  data_t mem [4096];

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (re) rdata <= mem[raddr[11:0]];

  estimation_unit dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int base, input int count);
    int best; data_t bv; int cyc;
    best = 0; bv = mem[base];
    for (int i = 1; i < count; i++)
      if (mem[base + i] > bv) begin bv = mem[base + i]; best = i; end
    cfg.base = baddr_t'(base); cfg.count = 13'(count);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(cls) != best || score !== bv) begin
      failures++;
      $display("base %0d: class %0d score %0d, expected %0d %0d", base, cls, score, best, bv);
    end
    checks++;
    if (cyc > count + 3) begin failures++; $display("took %0d cycles for %0d scores", cyc, count); end
  endtask

  initial begin
    rst_n = 0; start = 0; cfg = '0; rdata = 0;
    for (int i = 0; i < 4096; i++) mem[i] = data_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 1000);
    run(1234, 1000);
    // all negative
    for (int i = 0; i < 1000; i++) mem[2000 + i] = -data_t'(100 + ($urandom % 1000));
    run(2000, 1000);
    // tie: two equal maxima, lower index wins
    for (int i = 0; i < 10; i++) mem[3000 + i] = data_t'(i);
    mem[3003] = 16'sd500; mem[3007] = 16'sd500;
    run(3000, 10);
    checks++;
    if (cls != 13'd3) begin failures++; $display("tie resolved to %0d", cls); end
    run(3500, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
