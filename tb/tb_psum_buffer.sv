// tb_psum_buffer: self-checking test of the partial-sum buffer.
// A reduced depth keeps the run short. Random streams of write, accumulate
// and accumulate-with-ReLU requests, including back-to-back requests to the
// same address (the read-add-write hazard), are mirrored in a reference
// array; the whole buffer is then read back and compared.
module tb_psum_buffer;
  import cnn_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW    = BUF_AW;

  logic clk = 1'b0;
  logic rst_n;
  logic wr_en, wr_acc, wr_relu, re;
  logic [AW-1:0] wr_addr, raddr;
  psum_t wr_data, rdata;
  int checks = 0, failures = 0;
  int n_hazard = 0;
  psum_t ref_mem [DEPTH];

  always #5 clk = ~clk;

  psum_buffer #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, prev2;
    rst_n = 0; wr_en = 0; wr_acc = 0; wr_relu = 0; re = 0; wr_addr = 0; raddr = 0; wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_acc = 0; wr_relu = 0; wr_addr = AW'(a);
      wr_data = psum_t'($urandom) >>> 4; ref_mem[a] = wr_data;
    end
    prev = -1; prev2 = -1;
    for (int t = 0; t < 5000; t++) begin
      int a;
      // small address range in half of the requests to provoke hazards
      a = ($urandom % 2 == 0) ? ($urandom % 3) : ($urandom % DEPTH);
      if (a == prev) n_hazard++;
      prev2 = prev; prev = a;
      @(negedge clk);
      wr_en   = ($urandom % 8) != 0;
      wr_acc  = ($urandom % 4) != 0;
      wr_relu = ($urandom % 4) == 0;
      wr_addr = AW'(a);
      wr_data = psum_t'($signed($urandom) >>> 8);
      if (wr_en) begin
        psum_t s;
        s = wr_acc ? ref_mem[a] + wr_data : wr_data;
        if (wr_relu && s < 0) s = 0;
        ref_mem[a] = s;
      end else begin
        prev = -1;
      end
    end
    @(negedge clk); wr_en = 0;
    repeat (3) @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("addr %0d: %0d expected %0d", a, rdata, ref_mem[a]);
      end
    end
    checks++;
    if (n_hazard < 100) begin failures++; $display("only %0d back-to-back hazards", n_hazard); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
