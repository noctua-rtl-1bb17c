// tb_noctua_top: end-to-end test of the whole accelerator at its default
// sizes (4x4 mesh, 32x32 arrays, full memories). The host loads matrices into
// the data and weight memories, runs a sequence of operations and checks
// every result word against software models:
//   1. MATMUL 128x64 * 64x160 (4x5 = 20 output tiles, two rounds), shift 9;
//   2. MATMUL 32x32 * 32x512 (1x16 tiles) with GELU, which must occupy all
//      16 PEs, the A block reaching them in one multicast;
//   3. MATMUL 32x320 * 320x64: K longer than the PE SRAMs, run as two K
//      chunks whose partial sums add up inside the PEs;
//   4. SOFTMAX over 6 row blocks of length 40 (two rounds over the four
//      leftmost PEs), exact against the integer model of Eq. (1);
//   5. LAYERNORM over 2 row blocks of length 64, within 2 output steps of a
//      double-precision model.
// It counts how often each mechanism happens (multicast injections, link
// stalls, multi-round operations, GELU negatives, each alpha bucket, PEs in
// use) and fails if one never does.
module tb_noctua_top;
  import noctua_pkg::*;
  int checks = 0, failures = 0;
  int n_mcast = 0, n_stall = 0, n_rounds = 0, n_gelu_neg = 0, n_pe_used = 0, n_chunks = 0;
  int bucket [4] = '{0, 0, 0, 0};
  logic clk = 0, rst_n = 0;
  logic host_cmd_valid = 0, host_busy;
  cmd_t host_cmd = '0;
  logic host_d_we = 0, host_d_re = 0, host_w_we = 0;
  logic [1:0] host_d_bank = '0, host_w_bank = '0;
  logic [11:0] host_d_addr = '0, host_w_addr = '0;
  vec_t host_d_wdata = '0, host_d_rdata, host_w_wdata = '0;
  noctua_top dut (.*);
  always #5 clk = ~clk;

  logic [NODES-1:0] result_src;
  always @(posedge clk) if (rst_n) begin
    if (dut.inj_valid && dut.inj_ready && $countones(dut.inj_flit.dst) > 1) n_mcast++;
    for (int y = 0; y < MESH; y++)
      for (int x = 0; x < MESH; x++)
        for (int p = 0; p < 4; p++)
          if (dut.t_iv[y][x][p] && !dut.t_ir[y][x][p]) n_stall++;
    for (int b = 0; b < MESH; b++)
      if (dut.dm_rx_valid[b] && dut.dm_rx_ready[b] && dut.dm_rx_flit[b].ptype == PKT_RESULT)
        result_src[dut.dm_rx_flit[b].src] <= 1'b1;
    if (dut.u_ctrl.state == dut.u_ctrl.S_CMD && dut.inj_ready && !dut.u_ctrl.pc.acc_last) n_chunks++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_WAIT && dut.u_ctrl.state != dut.u_ctrl.S_IDLE &&
        dut.u_ctrl.tcur < dut.u_ctrl.total && $changed(dut.u_ctrl.state)) n_rounds++;
  end

  task automatic dwr(int b, int a, vec_t v);
    @(negedge clk); host_d_we = 1; host_d_bank = 2'(b); host_d_addr = 12'(a); host_d_wdata = v;
    @(negedge clk); host_d_we = 0;
  endtask
  task automatic wwr(int b, int a, vec_t v);
    @(negedge clk); host_w_we = 1; host_w_bank = 2'(b); host_w_addr = 12'(a); host_w_wdata = v;
    @(negedge clk); host_w_we = 0;
  endtask
  task automatic drd(int b, int a, output vec_t v);
    @(negedge clk); host_d_re = 1; host_d_bank = 2'(b); host_d_addr = 12'(a);
    @(negedge clk); host_d_re = 0; v = host_d_rdata;
  endtask
  task automatic run(cmd_t c);
    @(negedge clk); host_cmd = c; host_cmd_valid = 1;
    @(negedge clk); host_cmd_valid = 0;
    @(posedge clk); while (host_busy) @(posedge clk);
  endtask

  function automatic real erf_as(real z);
    real t, p, s = (z < 0) ? -1.0 : 1.0;
    z = (z < 0) ? -z : z;
    t = 1.0 / (1.0 + 0.3275911 * z);
    p = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    return s * (1.0 - p * $exp(-z * z));
  endfunction

  // A (M x K) in data memory, W (K x N) in weight memory, C read back
  task automatic matmul(int mt, int K, int nt, int shift, bit gelu, int range);
    logic signed [7:0] A [][];
    logic signed [7:0] W [][];
    cmd_t c = '0;
    A = new[mt * VEC]; foreach (A[i]) A[i] = new[K];
    W = new[K];        foreach (W[i]) W[i] = new[nt * VEC];
    foreach (A[i, k]) A[i][k] = 8'(int'($urandom % (2 * range + 1)) - range);
    foreach (W[k, j]) W[k][j] = 8'(int'($urandom % (2 * range + 1)) - range);
    for (int mi = 0; mi < mt; mi++)
      for (int k = 0; k < K; k++) begin
        vec_t v;
        for (int i = 0; i < VEC; i++) v[i*8 +: 8] = A[mi*VEC + i][k];
        dwr(1, 100 + mi * K + k, v);
      end
    for (int nj = 0; nj < nt; nj++)
      for (int k = 0; k < K; k++) begin
        vec_t v;
        for (int j = 0; j < VEC; j++) v[j*8 +: 8] = W[k][nj*VEC + j];
        wwr(2, 50 + nj * K + k, v);
      end
    c.op = OP_MATMUL; c.post = gelu ? POST_GELU : POST_NONE; c.shift = 5'(shift);
    c.a_bank = 1; c.a_base = 16'd100; c.w_bank = 2; c.w_base = 16'd50; c.o_bank = 3; c.o_base = 16'd0;
    c.m_tiles = 8'(mt); c.k_len = AW'(K); c.n_tiles = 8'(nt);
    result_src = '0;
    run(c);
    n_pe_used = (n_pe_used > $countones(result_src)) ? n_pe_used : $countones(result_src);
    for (int mi = 0; mi < mt; mi++)
      for (int n = 0; n < nt * VEC; n++) begin
        vec_t v;
        drd(3, mi * nt * VEC + n, v);
        for (int i = 0; i < VEC; i++) begin
          automatic int acc = 0, q, e;
          for (int k = 0; k < K; k++) acc += int'(A[mi*VEC + i][k]) * int'(W[k][n]);
          q = acc >>> shift;
          q = (q > 127) ? 127 : (q < -128) ? -128 : q;
          e = q;
          if (gelu) begin
            if (q < -64) e = 0;
            else if (q < 32) begin
              automatic real xr = q / 16.0;
              e = int'($floor(0.5 * xr * (1.0 + erf_as(xr / $sqrt(2.0))) * 16.0 + 0.5));
              if (e < 0) n_gelu_neg++;
            end
          end
          checks++;
          if (int'($signed(v[i*8 +: 8])) != e) begin
            failures++;
            if (failures < 10) $display("FAIL C[%0d][%0d] got %0d exp %0d", mi*VEC+i, n, $signed(v[i*8 +: 8]), e);
          end
        end
      end
  endtask

  task automatic softmax(int mt, int L);
    logic signed [7:0] X [][];
    cmd_t c = '0;
    X = new[mt * VEC]; foreach (X[i]) X[i] = new[L];
    foreach (X[r, k]) begin
      automatic int spread = 2 << (r % 7);
      automatic int v = int'($urandom % (spread + 1)) - spread / 2 + (r % 20) - 10;
      X[r][k] = 8'((v > 127) ? 127 : (v < -128) ? -128 : v);
    end
    for (int mi = 0; mi < mt; mi++)
      for (int k = 0; k < L; k++) begin
        vec_t v;
        for (int i = 0; i < VEC; i++) v[i*8 +: 8] = X[mi*VEC + i][k];
        dwr(0, 1000 + mi * L + k, v);
      end
    c.op = OP_SOFTMAX; c.a_bank = 0; c.a_base = 16'd1000; c.o_bank = 2; c.o_base = 16'd300;
    c.m_tiles = 8'(mt); c.k_len = AW'(L);
    run(c);
    for (int r = 0; r < mt * VEC; r++) begin
      automatic int mx = -128, mn = 127, la, sd;
      automatic longint sum = 0, inv;
      foreach (X[r][k]) begin
        if (X[r][k] > mx) mx = X[r][k];
        if (X[r][k] < mn) mn = X[r][k];
      end
      la = (mx - mn >= 128) ? 0 : (mx - mn >= 64) ? 1 : (mx - mn >= 32) ? 2 : 3;
      bucket[la]++;
      sd = 5 - la;
      foreach (X[r][k]) begin
        automatic int sh = (mx - X[r][k]) >> sd;
        if (sh <= 15) sum += longint'(1) << (15 - sh);
      end
      inv = (longint'(1) << 23) / sum;
      for (int k = 0; k < L; k++) begin
        automatic int sh = (mx - X[r][k]) >> sd;
        automatic longint p = (sh > 8) ? 0 : inv >> sh;
        vec_t v;
        if (p > 255) p = 255;
        drd(2, 300 + (r / VEC) * L + k, v);
        checks++;
        if (int'(v[(r % VEC)*8 +: 8]) != int'(p)) begin
          failures++;
          if (failures < 10) $display("FAIL softmax row %0d k %0d got %0d exp %0d", r, k, v[(r % VEC)*8 +: 8], p);
        end
      end
    end
  endtask

  function automatic real bf2r(logic [15:0] v);
    if (v[14:7] == 0) return 0.0;
    return $bitstoreal({v[15], 11'(int'(v[14:7]) - 127 + 1023), v[6:0], 45'd0});
  endfunction

  task automatic layernorm(int mt, int L);
    logic signed [7:0] X [][];
    cmd_t c = '0;
    real g [], bt [];
    X = new[mt * VEC]; foreach (X[i]) X[i] = new[L];
    g = new[L]; bt = new[L];
    foreach (X[r, k]) X[r][k] = 8'(int'($urandom % 101) - 50 + (r % 9));
    for (int k = 0; k < L; k++) begin
      automatic logic [15:0] gv = {1'b0, 8'd126 + 8'(k % 2), 7'($urandom)};   // 0.5 .. 2
      automatic logic [15:0] bv = {1'($urandom), 8'd125, 7'($urandom)};       // |beta| < 0.25
      g[k] = bf2r(gv); bt[k] = bf2r(bv);
      wwr(0, 700 + k, VW'({bv, gv}));
    end
    for (int mi = 0; mi < mt; mi++)
      for (int k = 0; k < L; k++) begin
        vec_t v;
        for (int i = 0; i < VEC; i++) v[i*8 +: 8] = X[mi*VEC + i][k];
        dwr(0, 1500 + mi * L + k, v);
      end
    c.op = OP_LAYERNORM; c.a_bank = 0; c.a_base = 16'd1500; c.w_bank = 0; c.w_base = 16'd700;
    c.o_bank = 1; c.o_base = 16'd2000; c.m_tiles = 8'(mt); c.k_len = AW'(L); c.shift = 5'd4;
    c.ln_recip = 16'h3c80;   // 1/64
    c.ln_eps   = 16'h3a83;
    run(c);
    for (int r = 0; r < mt * VEC; r++) begin
      automatic real s = 0, q = 0, mu, rs;
      foreach (X[r][k]) begin s += X[r][k]; q += real'(X[r][k]) * X[r][k]; end
      mu = s / L; rs = 1.0 / $sqrt(q / L - mu * mu + bf2r(16'h3a83));
      for (int k = 0; k < L; k++) begin
        automatic real y = ((X[r][k] - mu) * rs * g[k] + bt[k]) * 16.0;
        automatic real got, err;
        vec_t v;
        drd(1, 2000 + (r / VEC) * L + k, v);
        got = real'(int'($signed(v[(r % VEC)*8 +: 8])));
        if (y > 127) y = 127;
        if (y < -128) y = -128;
        err = (got > y) ? got - y : y - got;
        checks++;
        if (err > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL layernorm row %0d k %0d got %f exp %f", r, k, got, y);
        end
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c0 = $time;
    matmul(4, 64, 5, 9, 0, 127);
    $display("matmul 128x64x160: %0d cycles incl. host I/O", ($time - c0) / 10);
    matmul(1, 32, 16, 2, 1, 6);
    matmul(1, 320, 2, 10, 0, 127);
    softmax(6, 40);
    layernorm(2, 64);
    $display("mechanisms: multicast=%0d stalls=%0d extra_rounds=%0d k_chunk_cmds=%0d gelu_neg=%0d pes_used=%0d alpha=%0d/%0d/%0d/%0d",
             n_mcast, n_stall, n_rounds, n_chunks, n_gelu_neg, n_pe_used, bucket[0], bucket[1], bucket[2], bucket[3]);
    checks++; if (n_mcast == 0) begin failures++; $display("FAIL: no multicast"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL: no link stall"); end
    checks++; if (n_rounds == 0) begin failures++; $display("FAIL: no multi-round operation"); end
    checks++; if (n_chunks == 0) begin failures++; $display("FAIL: no K chunking"); end
    checks++; if (n_gelu_neg == 0) begin failures++; $display("FAIL: GELU negative branch unused"); end
    checks++; if (n_pe_used != NODES) begin failures++; $display("FAIL: only %0d PEs used", n_pe_used); end
    for (int b = 0; b < 4; b++) begin
      checks++; if (bucket[b] == 0) begin failures++; $display("FAIL: alpha bucket %0d unused", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
