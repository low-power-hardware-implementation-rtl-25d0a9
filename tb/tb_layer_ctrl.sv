// tb_layer_ctrl: self-checking test of the CONV / FC pass controller,
// driving a real PE matrix. Behavioural memories with one-cycle read latency
// stand in for the ifmap, weight and PSUM buffers (the PSUM model stores,
// accumulates and applies ReLU exactly as the buffer's contract says).
//   * CONV, one pass: 3 input channels of 9x9, four 3x3 filters, stride 2,
//     padding 1, three depth groups down the PE rows, filters loaded in two
//     batches of two, bias and ReLU.
//   * CONV, four passes: the same layer split into two strips of output rows
//     (3 + 2) and two depth passes (channels 0-1 then channel 2), so partial
//     sums are stored, then accumulated, and bias/ReLU come on the last pass.
//   * FC: a 50-element vector against three neurons, 12 PEs per neuron
//     (3 rows x 4 columns, 5 words each, zero past the end), with bias, with
//     and without ReLU.
// Every PSUM word / FC output is compared with a direct reference.
module tb_layer_ctrl;
  import cnn_pkg::*;

  localparam int C = 3, H = 9, K = 3, S = 2, P = 1, E = 5, NF = 4;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  layer_cfg_t cfg;
  logic in_re, w_re, ps_we, ps_acc, ps_relu, out_we;
  baddr_t in_raddr, w_raddr, ps_waddr, out_waddr;
  data_t in_rdata, w_rdata, out_wdata;
  psum_t ps_wdata;
  array_cfg_t acfg;
  rf_wr_t rf_wr;
  mac_cmd_t mac;
  psum_t col_sum [PE_COLS];
  int checks = 0, failures = 0;

  data_t imem [4096];
  data_t wmem [4096];
  psum_t pmem [4096];
  data_t omem [64];

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (in_re) in_rdata <= imem[in_raddr[11:0]];
    if (w_re)  w_rdata  <= wmem[w_raddr[11:0]];
  end
  always @(posedge clk) begin
    if (ps_we) begin
      psum_t s;
      s = ps_acc ? pmem[ps_waddr[11:0]] + ps_wdata : ps_wdata;
      if (ps_relu && s < 0) s = 0;
      pmem[ps_waddr[11:0]] <= s;
    end
    if (out_we) omem[out_waddr[5:0]] <= out_wdata;
  end

  layer_ctrl u_ctrl (.*);
  pe_array u_arr (.clk(clk), .rst_n(rst_n), .cfg(acfg), .wr(rf_wr), .mac(mac), .col_sum(col_sum));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // weights: filter f, channel c, row a, column b at ((f*C + c)*K + a)*K + b
  // biases at 1000 + f; ifmap channel c at c*H*H
  function automatic psum_t ref_conv(int f, int oy, int ox);
    psum_t s;
    s = psum_t'(wmem[1000 + f]) <<< 5;
    for (int c = 0; c < C; c++)
      for (int a = 0; a < K; a++)
        for (int b = 0; b < K; b++) begin
          int y, x;
          y = oy * S + a - P; x = ox * S + b - P;
          if (y >= 0 && y < H && x >= 0 && x < H)
            s += psum_t'(wmem[((f * C + c) * K + a) * K + b]) * psum_t'(imem[c * H * H + y * H + x]);
        end
    return s < 0 ? psum_t'(0) : s;
  endfunction

  task automatic run();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic layer_cfg_t conv_cfg(int ng, int nd, int ch, int row0, int ncol, bit first, bit last);
    layer_cfg_t c;
    c = '0;
    c.load_input = 1; c.first = first; c.last = last; c.relu = 1;
    c.k = 4'(K); c.stride = 3'(S); c.pad = 2'(P);
    c.in_h = 8'(H); c.in_w = 8'(H); c.out_w = 8'(E);
    c.ncol = 4'(ncol); c.out_row0 = 8'(row0); c.psum_row0 = 8'(row0); c.psum_h = 8'(E);
    c.ngrp = 3'(ng); c.nd = 5'(nd); c.ch_base = 10'(ch); c.flt_ch_base = 10'(ch);
    c.flt_c = 10'(C); c.nf = 5'(NF); c.nf_rf = 5'd2; c.bias_base = 17'd1000;
    return c;
  endfunction

  task automatic check_conv(string what);
    for (int f = 0; f < NF; f++)
      for (int oy = 0; oy < E; oy++)
        for (int ox = 0; ox < E; ox++) begin
          psum_t e;
          e = ref_conv(f, oy, ox);
          checks++;
          if (pmem[(f * E + oy) * E + ox] !== e) begin
            failures++;
            $display("%s f%0d (%0d,%0d): %0d expected %0d", what, f, oy, ox,
                     pmem[(f * E + oy) * E + ox], e);
          end
        end
  endtask

  initial begin
    rst_n = 0; start = 0; cfg = '0; in_rdata = 0; w_rdata = 0;
    for (int i = 0; i < 4096; i++) begin
      imem[i] = data_t'($signed($urandom % 2048) - 1024);
      wmem[i] = data_t'($signed($urandom % 2048) - 1024);
      pmem[i] = psum_t'($urandom);
    end
    for (int i = 0; i < 64; i++) omem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // one pass: 3 groups x 1 depth, all 5 output rows
    cfg = conv_cfg(3, 1, 0, 0, E, 1, 1);
    run();
    check_conv("single pass");

    // four passes: 2 strips x 2 depth passes
    for (int i = 0; i < 4096; i++) pmem[i] = psum_t'($urandom);
    cfg = conv_cfg(2, 1, 0, 0, 3, 1, 0); run();
    cfg = conv_cfg(1, 1, 2, 0, 3, 0, 1); run();
    cfg = conv_cfg(1, 2, 0, 3, 2, 1, 0); run();   // one group holding two depths
    cfg = conv_cfg(1, 1, 2, 3, 2, 0, 1); run();
    check_conv("strips+depth");

    // FC: vector at 3000, weights at 100 (neuron n at 100 + n*50), biases at 2000
    for (int relu = 0; relu < 2; relu++) begin
      cfg = '0;
      cfg.fc = 1; cfg.load_input = 1; cfg.relu = relu[0];
      cfg.fc_len = 14'd50; cfg.fc_chunk = 9'd5; cfg.fc_rows = 4'd3; cfg.fc_cols = 4'd4;
      cfg.nf = 5'd3; cfg.in_base = 17'd3000; cfg.w_base = 17'(100 + 2 * 50); cfg.f0 = 13'd2;
      cfg.bias_base = 17'd2000; cfg.out_base = 17'(10 + 20 * relu);
      run();
      for (int s = 0; s < 3; s++) begin
        psum_t acc; data_t e;
        acc = psum_t'(wmem[2000 + 2 + s]) <<< 5;
        for (int i = 0; i < 50; i++) acc += psum_t'(wmem[100 + (2 + s) * 50 + i]) * psum_t'(imem[3000 + i]);
        if (relu == 1 && acc < 0) acc = 0;
        acc = acc >>> 11;
        e = acc > 32767 ? 16'sd32767 : acc < -32768 ? -16'sd32768 : data_t'(acc);
        checks++;
        if (omem[10 + 20 * relu + 2 + s] !== e) begin
          failures++;
          $display("FC relu=%0d neuron %0d: %0d expected %0d", relu, 2 + s, omem[10 + 20 * relu + 2 + s], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
