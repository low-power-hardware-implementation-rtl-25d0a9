// tb_pe: self-checking test of one processing element.
// Fills both register files with random words, runs 1-D row convolutions of
// random length and offset (a MAC run restarted by 'first'), and checks that
// psum_out = psum_in + sum(w*x) exactly two cycles after the last step, that
// a second run restarts the accumulator, and that an inactive PE adds nothing.
module tb_pe;
  import cnn_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     active;
  logic     wr_ifm, wr_flt;
  logic [7:0] wr_addr;
  data_t    wr_data;
  mac_cmd_t mac;
  psum_t    psum_in, psum_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe dut (.*);

  data_t fw [256];
  data_t iw [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int f0, input int i0, input int len, input int stride_x, output psum_t exp);
    exp = 0;
    for (int j = 0; j < len; j++) begin
      @(negedge clk);
      mac.en    = 1'b1;
      mac.first = (j == 0);
      mac.faddr = 8'(f0 + j);
      mac.iaddr = 8'(i0 + j * stride_x);
      exp += psum_t'(fw[f0 + j]) * psum_t'(iw[i0 + j * stride_x]);
    end
    @(negedge clk);
    mac = '0;
  endtask

  initial begin
    psum_t exp;
    rst_n = 1'b0; active = 1'b1; wr_ifm = 0; wr_flt = 0; wr_addr = 0; wr_data = 0;
    mac = '0; psum_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 256; a++) begin
      fw[a] = data_t'($urandom);
      iw[a] = data_t'($urandom);
      @(negedge clk);
      wr_flt = 1; wr_ifm = 0; wr_addr = 8'(a); wr_data = fw[a];
      @(negedge clk);
      wr_flt = 0; wr_ifm = 1; wr_data = iw[a];
    end
    @(negedge clk); wr_ifm = 0;
    for (int t = 0; t < 40; t++) begin
      int len, f0, i0;
      len = 1 + ($urandom % 16);
      f0  = $urandom % (256 - len);
      i0  = $urandom % (256 - 2 * len);
      psum_in = psum_t'($urandom);
      run(f0, i0, len, 1 + (t % 2), exp);
      // the last step was issued one cycle ago; result visible one cycle later
      @(posedge clk); #1;
      checks++;
      if (psum_out !== psum_in + exp) begin
        failures++;
        $display("run %0d: psum_out %0d expected %0d", t, psum_out, psum_in + exp);
      end
    end
    // latency: the result must not be there one cycle earlier
    run(0, 0, 3, 1, exp);
    checks++;
    if (psum_out == exp && exp != 0) begin
      failures++;
      $display("result visible too early");
    end
    // inactive PE
    active = 1'b0; psum_in = 32'sd1234;
    #1;
    checks++;
    if (psum_out !== 32'sd1234) begin failures++; $display("inactive PE added its sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
