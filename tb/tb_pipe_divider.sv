// tb_pipe_divider: self-checking test of the pipelined Q16.16 divider.
// One division enters per cycle, back to back, with random gaps; each
// result must come out exactly STAGES = 16 cycles after it entered, in
// order, with its tag, equal to floor((num << 16) / den) saturated to 32 bits.
// The worked examples 1000/21 and 7/4 are included.
module tb_pipe_divider;
  localparam int W = 32, FRAC = 16, STAGES = 16, TW = 16;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid;
  logic [W-1:0] num, den, quo;
  logic [TW-1:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  pipe_divider #(.W(W), .FRAC(FRAC), .STAGES(STAGES), .TW(TW)) dut (.*);

  logic [31:0] exp_q [$];
  int          exp_t [$];
  int          exp_c [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        logic [31:0] q; int tg, c;
        q = exp_q.pop_front(); tg = exp_t.pop_front(); c = exp_c.pop_front();
        if (quo !== q || out_tag !== TW'(tg) || cycle - c != STAGES) begin
          failures++;
          $display("tag %0d: quo %h exp %h, tag %0d, latency %0d", tg, quo, q, out_tag, cycle - c);
        end
      end
    end
  end

  task automatic push(input logic [31:0] n, input logic [31:0] d, input int tg);
    longint unsigned q;
    q = (longint'(n) << FRAC) / longint'(d);
    if (q > 64'hFFFF_FFFF) q = 64'hFFFF_FFFF;
    @(negedge clk);
    in_valid = 1; num = n; den = d; in_tag = TW'(tg);
    exp_q.push_back(q[31:0]); exp_t.push_back(tg); exp_c.push_back(cycle);
  endtask

  initial begin
    rst_n = 0; in_valid = 0; num = 0; den = 1; in_tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    push(32'd1000 << 16, 32'd21 << 16, 1);
    push(32'd7 << 16, 32'd4 << 16, 2);
    for (int t = 3; t < 600; t++) begin
      logic [31:0] d;
      d = $urandom >> ($urandom % 31);
      if (d == 0) d = 3;
      push($urandom, d, t);
      if ($urandom % 5 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
