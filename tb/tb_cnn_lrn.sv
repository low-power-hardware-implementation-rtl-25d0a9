// tb_cnn_lrn: both AlexNet LRN layers on the accelerator at the full default
// sizes, through the top's command interface.
//   LRN1: 27x27x96 volume, swapping buffer 1 -> swapping buffer 2
//   LRN2: 13x13x256 volume, swapping buffer 2 -> swapping buffer 1
// Each output is compared with b = a / (1 + 2e-5 * sum of the squares of the
// five neighbouring maps' pixels at that position), computed in real
// arithmetic, within one pixel LSB (the datapath truncates). Pixel values
// span the whole 16-bit range so that the denominator varies from 1 to
// several hundred. The cycle count of each pass is printed. Data come from a
// fixed hash.
module tb_cnn_lrn;
  import cnn_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic cmd_valid, cmd_ready, done;
  cmd_t cmd;
  logic ld_we, hr_re;
  buf_sel_e ld_buf, hr_buf;
  baddr_t ld_addr, hr_addr;
  data_t ld_data, hr_rdata, est_score;
  logic [12:0] est_cls;
  logic [15:0] pool_partial, pool_merged;
  event_t events;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cnn_accel_top dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t hash16(int a, int b, int salt);
    int unsigned h;
    h = (32'(a) * 32'd73856093) ^ (32'(b) * 32'd19349663) ^ 32'(salt);
    h = h * 32'd2654435761;
    h = h ^ (h >> 15);
    return data_t'(h[15:0]);
  endfunction

  task automatic issue(input cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  data_t vol [69984];

  task automatic run_lrn(input string name, input int nch, input int hw, input buf_sel_e src,
                         input buf_sel_e dst, input int salt);
    cmd_t c;
    int t0;
    for (int i = 0; i < nch * hw; i++) begin
      vol[i] = hash16(i, 0, salt);
      @(negedge clk); ld_we = 1; ld_buf = src; ld_addr = baddr_t'(i); ld_data = vol[i];
    end
    @(negedge clk); ld_we = 0;
    c = '0; c.op = OP_LRN; c.lrn.src = src; c.lrn.dst = dst; c.lrn.nch = 10'(nch); c.lrn.hw = 16'(hw);
    t0 = cycle;
    issue(c);
    $display("%s: %0d maps of %0d pixels in %0d cycles", name, nch, hw, cycle - t0);
    for (int ch = 0; ch < nch; ch++)
      for (int p = 0; p < hw; p++) begin
        real s, a, e, got;
        s = 0.0;
        for (int d = -2; d <= 2; d++)
          if (ch + d >= 0 && ch + d < nch) begin
            real v;
            v = real'(vol[(ch + d) * hw + p]) / 32.0;
            s += v * v;
          end
        a = real'(vol[ch * hw + p]) / 32.0;
        e = a / (1.0 + 2.0e-5 * s);
        @(negedge clk); hr_re = 1; hr_buf = dst; hr_addr = baddr_t'(ch * hw + p);
        @(negedge clk); hr_re = 0; got = real'(hr_rdata) / 32.0;
        checks++;
        if (got - e > 1.0 / 32.0 || e - got > 1.0 / 32.0) begin
          failures++;
          if (failures < 20) $display("%s ch %0d pos %0d: %f expected %f", name, ch, p, got, e);
        end
      end
  endtask

  initial begin
    rst_n = 0; cmd_valid = 0; cmd = '0; ld_we = 0; ld_buf = BUF_FILTER; ld_addr = 0; ld_data = 0;
    hr_re = 0; hr_buf = BUF_FILTER; hr_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_lrn("LRN1", 96, 27 * 27, BUF_SWAP1, BUF_SWAP2, 41);
    run_lrn("LRN2", 256, 13 * 13, BUF_SWAP2, BUF_SWAP1, 42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
