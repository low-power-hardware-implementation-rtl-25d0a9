// tb_cnn_fc8: the classifier end of AlexNet on the accelerator at the full
// default sizes: FC8 (4096 inputs, 1000 neurons, no ReLU) followed by the
// class estimation over the 1000 scores.
// Mapping used by the host model, as for the 4096-input layers FC7 and FC8:
//   * the 4096-pixel input vector sits in swapping buffer 1; each PE keeps a
//     171-word chunk, so a neuron spans 24 PEs (6 PE rows x 4 PE columns;
//     the last chunk holds 163 words) and 3 neurons fill 12 PE columns;
//   * the weights of the 3 neurons of a pass (3 x 4096 words) and all the
//     biases are in swapping buffer 2; the host loads each pass's weights
//     before issuing it, standing in for the external memory transfer;
//   * the input is written into the register files on the first pass only
//     and stays there for the other 333 passes;
//   * scores are written to swapping buffer 1 behind the input vector.
// Every score is compared with a reference dot product + bias, converted to
// a pixel; the estimation unit's class and score are compared with the
// arg-max of the reference scores (ties to the lower index). The cycle count
// is printed. Data come from a fixed hash.
module tb_cnn_fc8;
  import cnn_pkg::*;

  localparam int N = 4096, M = 1000, NPP = 3, CHUNK = 171;
  localparam int BIAS0 = NPP * N, OUT0 = N;

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
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t hash16(int a, int b, int c, int salt, int range);
    int unsigned h;
    h = (32'(a) * 32'd73856093) ^ (32'(b) * 32'd19349663) ^ (32'(c) * 32'd83492791) ^ 32'(salt);
    h = h * 32'd2654435761;
    h = h ^ (h >> 15);
    return data_t'(int'(h % 32'(2 * range)) - range);
  endfunction

  task automatic issue(input cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic data_t to_pixel(psum_t p);
    psum_t s;
    s = p >>> 11;
    if (s > 32767) return 16'sd32767;
    if (s < -32768) return -16'sd32768;
    return data_t'(s);
  endfunction

  data_t vin  [N];
  data_t bias [M];
  data_t ref_score [M];
  // loop bounds set at run time (keeps the compiler from unrolling the loops)
  int nn, nm, one;

  function automatic data_t wgt(int n, int i);
    return hash16(n, i, 0, 32, 512);
  endfunction

  initial begin
    cmd_t c;
    int t0, best;
    rst_n = 0; cmd_valid = 0; cmd = '0; ld_we = 0; ld_buf = BUF_FILTER; ld_addr = 0; ld_data = 0;
    hr_re = 0; hr_buf = BUF_FILTER; hr_addr = 0;
    nn = N; nm = M; one = 1;
    for (int i = 0; i < nn; i++) vin[i] = hash16(i, 0, 0, 31, 1024);
    for (int n = 0; n < nm; n++) bias[n] = hash16(n, 0, 0, 33, 4096);
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = cycle;

    for (int i = 0; i < nn; i++) begin
      @(negedge clk); ld_we = 1; ld_buf = BUF_SWAP1; ld_addr = baddr_t'(i); ld_data = vin[i];
    end
    for (int n = 0; n < nm; n++) begin
      @(negedge clk); ld_we = 1; ld_buf = BUF_SWAP2; ld_addr = baddr_t'(BIAS0 + n); ld_data = bias[n];
    end
    @(negedge clk); ld_we = 0;
    for (int f0 = 0; f0 < nm; f0 += NPP) begin
      int nb;
      nb = (nm - f0 < NPP) ? nm - f0 : NPP;
      for (int s = 0; s < nb; s++)
        for (int i = 0; i < nn; i++) begin
          @(negedge clk); ld_we = 1; ld_buf = BUF_SWAP2; ld_addr = baddr_t'(s * N + i); ld_data = wgt(f0 + s, i);
        end
      @(negedge clk); ld_we = 0;
      c = '0; c.op = OP_FC;
      c.layer.load_input = (f0 == 0); c.layer.relu = 1'b0;
      c.layer.src = BUF_SWAP1; c.layer.wsrc = BUF_SWAP2; c.layer.dst = BUF_SWAP1;
      c.layer.fc_len = 14'(N); c.layer.fc_chunk = 9'(CHUNK); c.layer.fc_rows = 4'd6; c.layer.fc_cols = 4'd4;
      c.layer.nf = 5'(nb); c.layer.f0 = 13'(f0);
      c.layer.in_base = '0; c.layer.w_base = '0;
      c.layer.bias_base = baddr_t'(BIAS0); c.layer.out_base = baddr_t'(OUT0);
      issue(c);
    end
    c = '0; c.op = OP_EST; c.est.src = BUF_SWAP1; c.est.base = baddr_t'(OUT0); c.est.count = 13'(M);
    issue(c);
    $display("FC8 + estimation: %0d cycles, host loads included", cycle - t0);

    best = 0;
    for (int n = 0; n < nm; n++) begin
      psum_t s; data_t got;
      s = psum_t'(bias[n]) <<< 5;
      for (int i = 0; i < nn; i++) s += psum_t'(wgt(n, i)) * psum_t'(vin[i]);
      ref_score[n] = to_pixel(s);
      if (ref_score[n] > ref_score[best]) best = n;
      @(negedge clk); hr_re = 1; hr_buf = BUF_SWAP1; hr_addr = baddr_t'(OUT0 + n);
      @(negedge clk); hr_re = 0; got = hr_rdata;
      checks++;
      if (got !== ref_score[n]) begin
        failures++;
        if (failures < 20) $display("neuron %0d: %0d expected %0d", n, got, ref_score[n]);
      end
    end
    checks++;
    if (int'(est_cls) != best || est_score !== ref_score[best]) begin
      failures++;
      $display("estimation: class %0d score %0d, expected %0d %0d", est_cls, est_score, best, ref_score[best]);
    end else $display("estimated class %0d, score %0d", est_cls, est_score);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
