// tb_global_buffer: self-checking test of the single-port-per-direction
// on-chip buffer used for the filter buffer and the two swapping buffers.
// A reduced depth keeps the run short. The test writes random words to random
// addresses, mirrors them in a reference array, reads back with the one-cycle
// read latency, checks read-before-write on a same-cycle collision and that an
// address beyond the depth reads as zero and is not written.
module tb_global_buffer;
  import cnn_pkg::*;

  localparam int DEPTH = 1000;
  localparam int AW    = BUF_AW;

  logic clk = 1'b0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  data_t wdata, rdata;
  int checks = 0, failures = 0;
  data_t ref_mem [DEPTH];

  always #5 clk = ~clk;

  global_buffer #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int a, input data_t exp);
    @(negedge clk); re = 1; raddr = AW'(a);
    @(negedge clk); re = 0;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("addr %0d: read %h expected %h", a, rdata, exp);
    end
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = data_t'($urandom); ref_mem[a] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = $urandom % DEPTH;
      @(negedge clk); we = 1; waddr = AW'(a); wdata = data_t'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      int a;
      a = $urandom % DEPTH;
      check_read(a, ref_mem[a]);
    end
    // read and write of the same address in one cycle: the old word is read
    @(negedge clk); we = 1; re = 1; waddr = 17'd7; raddr = 17'd7; wdata = ~ref_mem[7];
    @(negedge clk); we = 0; re = 0;
    checks++;
    if (rdata !== ref_mem[7]) begin failures++; $display("collision read wrong"); end
    ref_mem[7] = ~ref_mem[7];
    check_read(7, ref_mem[7]);
    // out of range
    @(negedge clk); we = 1; waddr = AW'(DEPTH + 3); wdata = 16'h1234;
    @(negedge clk); we = 0;
    check_read(DEPTH + 3, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
