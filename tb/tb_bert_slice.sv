// tb_bert_slice: one attention head and one feed-forward slice of a BERT-Base
// style encoder at sequence length 128, run end to end on the full-size
// accelerator with every intermediate result staying in the data memory:
//   1. Q = X * Wq            128x64 * 64x64,   shift 7
//   2. S = Q * K^T           128x64 * 64x128,  shift 8  (A operand = step 1 result)
//   3. P = softmax(S)        4 row blocks of 128        (input = step 2 result)
//   4. H = LayerNorm(Q)      4 row blocks of 64, gamma/beta, output scale 2^4
//   5. F = GELU(H * W1)      128x64 * 64x128,  shift 6  (A operand = step 4 result)
// The head width 64 and sequence 128 are those of BERT-Base on sentence-pair
// tasks; the hidden and feed-forward widths are cut to 64 and 128 so the
// simulation stays short. Matrix products and softmax are checked exactly
// against integer models fed with the values read back from the previous
// step; the layer normalisation within 2 output steps of a double-precision
// model. The cycles of each step are printed.
module tb_bert_slice;
  import noctua_pkg::*;
  localparam int S = 128, D = 64, F = 128;
  int checks = 0, failures = 0, n_gelu_neg = 0;
  logic clk = 0, rst_n = 0;
  logic host_cmd_valid = 0, host_busy;
  cmd_t host_cmd = '0;
  logic host_d_we = 0, host_d_re = 0, host_w_we = 0;
  logic [1:0] host_d_bank = '0, host_w_bank = '0;
  logic [11:0] host_d_addr = '0, host_w_addr = '0;
  vec_t host_d_wdata = '0, host_d_rdata, host_w_wdata = '0;
  noctua_top dut (.*);
  always #5 clk = ~clk;

  typedef int mat_t [][];

  initial begin
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
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
  task automatic run(string name, cmd_t c);
    automatic longint t0;
    @(negedge clk); host_cmd = c; host_cmd_valid = 1; t0 = $time;
    @(negedge clk); host_cmd_valid = 0;
    @(posedge clk); while (host_busy) @(posedge clk);
    $display("%s: %0d cycles", name, ($time - t0) / 10);
  endtask

  function automatic mat_t rnd(int r, int c, int range);
    mat_t m = new[r];
    foreach (m[i]) begin
      m[i] = new[c];
      foreach (m[i][j]) m[i][j] = int'($urandom % (2 * range + 1)) - range;
    end
    return m;
  endfunction
  function automatic mat_t transpose(mat_t a);
    mat_t m = new[a[0].size()];
    foreach (m[i]) begin m[i] = new[a.size()]; foreach (m[i][j]) m[i][j] = a[j][i]; end
    return m;
  endfunction

  // row-block layout: rows in lanes, word base + mi*cols + k holds column k
  task automatic load_rows(int b, int base, mat_t a);
    for (int mi = 0; mi < a.size() / VEC; mi++)
      for (int k = 0; k < a[0].size(); k++) begin
        vec_t v;
        for (int i = 0; i < VEC; i++) v[i*8 +: 8] = 8'(a[mi*VEC + i][k]);
        dwr(b, base + mi * a[0].size() + k, v);
      end
  endtask
  task automatic read_rows(int b, int base, int r, int c, bit sgn, output mat_t a);
    a = new[r];
    foreach (a[i]) a[i] = new[c];
    for (int mi = 0; mi < r / VEC; mi++)
      for (int k = 0; k < c; k++) begin
        vec_t v;
        drd(b, base + mi * c + k, v);
        for (int i = 0; i < VEC; i++)
          a[mi*VEC + i][k] = sgn ? int'($signed(v[i*8 +: 8])) : int'(v[i*8 +: 8]);
      end
  endtask
  // column-block layout of W: word base + nj*K + k holds W[k][nj*VEC + j]
  task automatic load_w(int b, int base, mat_t w);
    for (int nj = 0; nj < w[0].size() / VEC; nj++)
      for (int k = 0; k < w.size(); k++) begin
        vec_t v;
        for (int j = 0; j < VEC; j++) v[j*8 +: 8] = 8'(w[k][nj*VEC + j]);
        wwr(b, base + nj * w.size() + k, v);
      end
  endtask

  function automatic real erf_as(real z);
    real t, p, s = (z < 0) ? -1.0 : 1.0;
    z = (z < 0) ? -z : z;
    t = 1.0 / (1.0 + 0.3275911 * z);
    p = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    return s * (1.0 - p * $exp(-z * z));
  endfunction
  function automatic int gelu_q(int q);
    real xr;
    if (q < -64) return 0;
    if (q >= 32) return q;
    xr = q / 16.0;
    return int'($floor(0.5 * xr * (1.0 + erf_as(xr / $sqrt(2.0))) * 16.0 + 0.5));
  endfunction

  task automatic check_mm(string name, mat_t a, mat_t w, mat_t got, int shift, bit gelu);
    int bad = 0;
    foreach (got[i, n]) begin
      automatic int acc = 0, q;
      for (int k = 0; k < w.size(); k++) acc += a[i][k] * w[k][n];
      q = acc >>> shift;
      q = (q > 127) ? 127 : (q < -128) ? -128 : q;
      if (gelu) begin q = gelu_q(q); if (q < 0) n_gelu_neg++; end
      checks++;
      if (got[i][n] != q) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s [%0d][%0d] got %0d exp %0d", name, i, n, got[i][n], q);
      end
    end
  endtask

  function automatic real bf2r(logic [15:0] v);
    if (v[14:7] == 0) return 0.0;
    return $bitstoreal({v[15], 11'(int'(v[14:7]) - 127 + 1023), v[6:0], 45'd0});
  endfunction

  initial begin
    mat_t X, Wq, Kt, W1, Q, Sc, P, H, Fo;
    logic [15:0] gv [D], bv [D];
    cmd_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    X = rnd(S, D, 20); Wq = rnd(D, D, 20); Kt = transpose(rnd(S, D, 20)); W1 = rnd(D, F, 30);
    load_rows(0, 0, X);
    load_w(0, 0, Wq);
    load_w(1, 0, Kt);
    load_w(3, 0, W1);
    for (int k = 0; k < D; k++) begin
      gv[k] = {1'b0, 8'd126 + 8'(k % 2), 7'($urandom)};
      bv[k] = {1'($urandom), 8'd125, 7'($urandom)};
      wwr(2, k, VW'({bv[k], gv[k]}));
    end
    // 1. Q projection
    c = '0; c.op = OP_MATMUL; c.shift = 5'd7; c.a_bank = 0; c.a_base = 0; c.w_bank = 0; c.w_base = 0;
    c.o_bank = 1; c.o_base = 0; c.m_tiles = 8'(S / VEC); c.k_len = AW'(D); c.n_tiles = 8'(D / VEC);
    run("Q = X*Wq", c);
    read_rows(1, 0, S, D, 1, Q);
    check_mm("Q", X, Wq, Q, 7, 0);
    // 2. attention scores from the result left in memory
    c = '0; c.op = OP_MATMUL; c.shift = 5'd8; c.a_bank = 1; c.a_base = 0; c.w_bank = 1; c.w_base = 0;
    c.o_bank = 2; c.o_base = 0; c.m_tiles = 8'(S / VEC); c.k_len = AW'(D); c.n_tiles = 8'(S / VEC);
    run("S = Q*K^T", c);
    read_rows(2, 0, S, S, 1, Sc);
    check_mm("S", Q, Kt, Sc, 8, 0);
    // 3. softmax over the score rows
    c = '0; c.op = OP_SOFTMAX; c.a_bank = 2; c.a_base = 0; c.o_bank = 3; c.o_base = 0;
    c.m_tiles = 8'(S / VEC); c.k_len = AW'(S);
    run("P = softmax(S)", c);
    read_rows(3, 0, S, S, 0, P);
    for (int r = 0; r < S; r++) begin
      automatic int mx = -128, mn = 127, la, sd, bad = 0;
      automatic longint sum = 0, inv;
      foreach (Sc[r][k]) begin mx = (Sc[r][k] > mx) ? Sc[r][k] : mx; mn = (Sc[r][k] < mn) ? Sc[r][k] : mn; end
      la = (mx - mn >= 128) ? 0 : (mx - mn >= 64) ? 1 : (mx - mn >= 32) ? 2 : 3;
      sd = 5 - la;
      foreach (Sc[r][k]) begin
        automatic int sh = (mx - Sc[r][k]) >> sd;
        if (sh <= 15) sum += longint'(1) << (15 - sh);
      end
      inv = (longint'(1) << 23) / sum;
      foreach (Sc[r][k]) begin
        automatic int sh = (mx - Sc[r][k]) >> sd;
        automatic longint p = (sh > 8) ? 0 : inv >> sh;
        if (p > 255) p = 255;
        checks++;
        if (P[r][k] != int'(p)) begin
          failures++; bad++;
          if (bad < 3) $display("FAIL softmax row %0d k %0d got %0d exp %0d", r, k, P[r][k], p);
        end
      end
    end
    // 4. layer normalisation of Q
    c = '0; c.op = OP_LAYERNORM; c.a_bank = 1; c.a_base = 0; c.w_bank = 2; c.w_base = 0;
    c.o_bank = 0; c.o_base = 16'd1000; c.m_tiles = 8'(S / VEC); c.k_len = AW'(D); c.shift = 5'd4;
    c.ln_recip = 16'h3c80; c.ln_eps = 16'h3a83;
    run("H = LayerNorm(Q)", c);
    read_rows(0, 1000, S, D, 1, H);
    for (int r = 0; r < S; r++) begin
      automatic real s = 0, q = 0, mu, rs;
      foreach (Q[r][k]) begin s += Q[r][k]; q += real'(Q[r][k]) * Q[r][k]; end
      mu = s / D; rs = 1.0 / $sqrt(q / D - mu * mu + bf2r(16'h3a83));
      foreach (Q[r][k]) begin
        automatic real y = ((Q[r][k] - mu) * rs * bf2r(gv[k]) + bf2r(bv[k])) * 16.0;
        y = (y > 127) ? 127 : (y < -128) ? -128 : y;
        checks++;
        if ((H[r][k] > y ? H[r][k] - y : y - H[r][k]) > 2.0) begin
          failures++; $display("FAIL layernorm row %0d k %0d got %0d exp %f", r, k, H[r][k], y);
        end
      end
    end
    // 5. feed-forward with GELU from the normalised rows
    c = '0; c.op = OP_MATMUL; c.post = POST_GELU; c.shift = 5'd6; c.a_bank = 0; c.a_base = 16'd1000;
    c.w_bank = 3; c.w_base = 0; c.o_bank = 1; c.o_base = 16'd1000;
    c.m_tiles = 8'(S / VEC); c.k_len = AW'(D); c.n_tiles = 8'(F / VEC);
    run("F = GELU(H*W1)", c);
    read_rows(1, 1000, S, F, 1, Fo);
    check_mm("F", H, W1, Fo, 6, 1);
    checks++;
    if (n_gelu_neg == 0) begin failures++; $display("FAIL: GELU negative branch unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
