// tb_pe: a PE with nonlinear units, driven as the network interface would.
//  1. MATMUL without and with GELU, and split into two K chunks whose partial
//     sums must add up in the array: random A and W blocks are written into the
//     Data/Weight SRAMs; the 32 result vectors must equal a software product,
//     shifted, saturated to INT8 (and passed through GELU), addressed
//     out_addr + j in bank out_bank, followed by PKT_DONE. The cycles from
//     command to first result are checked against K + 3*VEC + 8.
//  2. SOFTMAX: every row's outputs sum to about 256 and the largest score
//     gets the largest probability.
//  3. LAYERNORM with gamma = 1, beta = 0: each row's outputs have mean close
//     to 0 and standard deviation close to 2^shift.
// Results are accepted with random back-pressure.
module tb_pe;
  import noctua_pkg::*;
  localparam int K = 48;
  int checks = 0, failures = 0, n_gelu_neg = 0;
  logic clk = 0, rst_n = 0;
  logic dsram_we = 0, wsram_we = 0, cmd_valid = 0, cmd_ready;
  logic [7:0] sram_waddr = '0;
  vec_t sram_wdata = '0, res_data;
  pe_cmd_t cmd = '0;
  logic res_valid, res_ready = 0;
  pkt_type_e res_kind;
  logic [1:0] res_bank;
  logic [AW-1:0] res_addr;
  pe #(.NODE(0), .HAS_NL(1'b1), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  logic signed [7:0] A [VEC][K];
  logic signed [7:0] W [K][VEC];
  vec_t got [256];
  int ngot, ndone, first_cyc, cyc;

  always @(negedge clk) res_ready = ($urandom % 4) != 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (res_valid && res_ready) begin
      if (res_kind == PKT_DONE) ndone <= ndone + 1;
      else begin
        if (ngot == 0) first_cyc <= cyc;
        got[res_addr - 16'd100] <= res_data;
        ngot <= ngot + 1;
        if (res_bank != 2'd3) failures++;
      end
    end
  end

  function automatic real erf_as(real z);
    real t, p, s = (z < 0) ? -1.0 : 1.0;
    z = (z < 0) ? -z : z;
    t = 1.0 / (1.0 + 0.3275911 * z);
    p = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    return s * (1.0 - p * $exp(-z * z));
  endfunction

  task automatic wr(bit weight, int addr, vec_t v);
    @(negedge clk);
    dsram_we = !weight; wsram_we = weight; sram_waddr = 8'(addr); sram_wdata = v;
    @(negedge clk);
    dsram_we = 0; wsram_we = 0;
  endtask

  task automatic issue(pe_cmd_t c, output int start_cyc);
    @(negedge clk);
    ngot = 0; ndone = 0;
    cmd = c; cmd_valid = 1;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    start_cyc = cyc;
    @(negedge clk); cmd_valid = 0;
    while (ndone == 0) @(posedge clk);
  endtask

  // split = 0: one command; otherwise two K chunks [0, split) and [split, K)
  task automatic matmul(bit gelu, int shift, int split);
    pe_cmd_t c = '0;
    int s0;
    int k0 = (split == 0) ? 0 : split;
    if (split != 0) begin
      for (int k = 0; k < split; k++) begin
        vec_t a, w;
        for (int i = 0; i < VEC; i++) begin a[i*8 +: 8] = A[i][k]; w[i*8 +: 8] = W[k][i]; end
        wr(0, k, a); wr(1, k, w);
      end
      c.op = OP_MATMUL; c.len = AW'(split); c.acc_first = 1; c.acc_last = 0;
      c.shift = 5'(shift); c.out_bank = 2'd3; c.out_addr = 16'd100;
      issue(c, s0);
      checks++;
      if (ngot != 0 || ndone != 1) begin failures++; $display("FAIL: first chunk sent %0d results", ngot); end
    end
    for (int k = k0; k < K; k++) begin
      vec_t a, w;
      for (int i = 0; i < VEC; i++) begin a[i*8 +: 8] = A[i][k]; w[i*8 +: 8] = W[k][i]; end
      wr(0, k - k0, a); wr(1, k - k0, w);
    end
    c = '0;
    c.op = OP_MATMUL; c.post = gelu ? POST_GELU : POST_NONE; c.shift = 5'(shift);
    c.len = AW'(K - k0); c.acc_first = (split == 0); c.acc_last = 1;
    c.out_bank = 2'd3; c.out_addr = 16'd100;
    issue(c, s0);
    checks++;
    if (ngot != VEC || ndone != 1) begin failures++; $display("FAIL: %0d results", ngot); end
    checks++;
    if (first_cyc - s0 > K - k0 + 3 * VEC + 8) begin failures++; $display("FAIL: latency %0d", first_cyc - s0); end
    for (int j = 0; j < VEC; j++)
      for (int i = 0; i < VEC; i++) begin
        automatic int acc = 0, q, e;
        for (int k = 0; k < K; k++) acc += int'(A[i][k]) * int'(W[k][j]);
        q = acc >>> shift;
        if (q > 127) q = 127;
        if (q < -128) q = -128;
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
        if (int'($signed(got[j][i*8 +: 8])) != e) begin
          failures++;
          if (failures < 10) $display("FAIL C[%0d][%0d] got %0d exp %0d", i, j, $signed(got[j][i*8 +: 8]), e);
        end
      end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < VEC; i++) for (int k = 0; k < K; k++) A[i][k] = 8'($urandom);
    for (int k = 0; k < K; k++) for (int j = 0; j < VEC; j++) W[k][j] = 8'($urandom);
    matmul(0, 10, 0);
    matmul(0, 10, 20);
    for (int i = 0; i < VEC; i++) for (int k = 0; k < K; k++) A[i][k] = 8'(int'($urandom % 16) - 8);
    for (int k = 0; k < K; k++) for (int j = 0; j < VEC; j++) W[k][j] = 8'(int'($urandom % 16) - 8);
    matmul(1, 2, 0);
    checks++;
    if (n_gelu_neg == 0) failures++;
    // softmax on 20 elements per row
    begin
      pe_cmd_t c = '0;
      int s0;
      int mx [VEC], am [VEC];
      for (int i = 0; i < VEC; i++) begin mx[i] = -999; am[i] = 0; end
      for (int k = 0; k < 20; k++) begin
        vec_t a;
        for (int i = 0; i < VEC; i++) begin
          automatic int v = int'($urandom % 120) - 60 + k;
          a[i*8 +: 8] = 8'(v);
          if (v > mx[i]) begin mx[i] = v; am[i] = k; end
        end
        wr(0, k, a);
      end
      c.op = OP_SOFTMAX; c.len = 16'd20; c.out_bank = 2'd3; c.out_addr = 16'd100;
      issue(c, s0);
      checks++;
      if (ngot != 20) failures++;
      for (int i = 0; i < VEC; i++) begin
        automatic int sum = 0, best = 0;
        for (int k = 0; k < 20; k++) begin
          sum += int'(got[k][i*8 +: 8]);
          if (int'(got[k][i*8 +: 8]) > best) best = int'(got[k][i*8 +: 8]);
        end
        checks += 2;
        if (sum < 256 - 48 || sum > 256 + 20) begin failures++; $display("FAIL softmax sum %0d", sum); end
        if (int'(got[am[i]][i*8 +: 8]) != best) failures++;
      end
    end
    // layer normalisation over 64 elements, gamma 1, beta 0, output scale 2^4
    begin
      pe_cmd_t c = '0;
      int s0;
      for (int k = 0; k < 64; k++) begin
        vec_t a;
        for (int i = 0; i < VEC; i++) a[i*8 +: 8] = 8'(int'($urandom % 81) - 40 + i);
        wr(0, k, a);
        wr(1, k, VW'({16'h0000, 16'h3f80}));
      end
      c.op = OP_LAYERNORM; c.len = 16'd64; c.shift = 5'd4; c.out_bank = 2'd3; c.out_addr = 16'd100;
      c.ln_recip = 16'h3c80; c.ln_eps = 16'h3a83;      // 1/64 and about 1e-3
      issue(c, s0);
      checks++;
      if (ngot != 64) failures++;
      for (int i = 0; i < VEC; i++) begin
        automatic real s = 0, q = 0, m, sd;
        for (int k = 0; k < 64; k++) begin
          automatic real v = real'(int'($signed(got[k][i*8 +: 8])));
          s += v; q += v * v;
        end
        m = s / 64; sd = $sqrt(q / 64 - m * m);
        checks++;
        if (m > 1.0 || m < -1.0 || sd < 15.0 || sd > 17.0) begin
          failures++; $display("FAIL layernorm lane %0d mean %f sd %f", i, m, sd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
