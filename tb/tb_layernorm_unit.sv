// tb_layernorm_unit: layer-normalises VEC random rows (different means and
// spreads per lane) and compares each INT8 output with a double-precision
// model of Eq. (2): y = (x - mean) / sqrt(var + delta) * gamma + beta, scaled
// by 2^shift. The bfloat16 datapath must stay within 2 output steps. Also
// checks the inverse square root itself against 1/sqrt(V) (relative error
// below 2%, bfloat16 statistics included) and the cycle count against 2*len + 20.
module tb_layernorm_unit;
  import noctua_pkg::*;
  localparam int DEPTH = 256;
  localparam int SHIFT = 4;
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] len = '0;
  logic [15:0] recip, eps;
  logic [4:0] shift = 5'(SHIFT);
  logic busy, done, rd_en, out_valid;
  logic [$clog2(DEPTH)-1:0] rd_addr, out_addr;
  vec_t rd_data, rd_wdata, out_data;
  vec_t mem [DEPTH];
  vec_t wmem [DEPTH];
  vec_t outm [DEPTH];

  layernorm_unit #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (rd_en) begin rd_data <= mem[rd_addr]; rd_wdata <= wmem[rd_addr]; end
    if (out_valid) outm[out_addr] <= out_data;
  end

  function automatic real bf2r(logic [15:0] v);
    if (v[14:7] == 0) return 0.0;
    return $bitstoreal({v[15], 11'(int'(v[14:7]) - 127 + 1023), v[6:0], 45'd0});
  endfunction
  function automatic logic [15:0] r2bf(real r);   // truncating conversion for constants
    logic [63:0] b = $realtobits(r);
    if (r == 0.0) return 16'd0;
    return {b[63], 8'(int'(b[62:52]) - 1023 + 127), b[51:45]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run(int L);
    int cyc = 0;
    real g [DEPTH], bt [DEPTH];
    for (int k = 0; k < L; k++) begin
      automatic int ri = int'($urandom % 100);
      automatic int rj = int'($urandom % 100) - 50;
      automatic real gr = 0.5 + ri / 100.0;
      automatic real br = rj / 100.0;
      automatic logic [15:0] gv = r2bf(gr);
      automatic logic [15:0] bv = r2bf(br);
      wmem[k] = VW'({bv, gv});
      g[k]  = bf2r(wmem[k][15:0]);
      bt[k] = bf2r(wmem[k][31:16]);
    end
    for (int i = 0; i < VEC; i++) begin
      automatic int spread = 4 + 4 * (i % 16);
      automatic int centre = int'($urandom % 21) - 10;
      for (int k = 0; k < L; k++) begin
        automatic int v = centre + int'($urandom % (2 * spread + 1)) - spread;
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        mem[k][i*8 +: 8] = 8'(v);
      end
    end
    recip = r2bf(1.0 / L);
    eps   = r2bf(1.0e-3);
    @(negedge clk); len = AW'(L); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > 2 * L + 20) begin failures++; $display("FAIL: %0d cycles for len %0d", cyc, L); end
    for (int i = 0; i < VEC; i++) begin
      automatic real s = 0, q = 0, mu, var_, rs, rsg;
      for (int k = 0; k < L; k++) begin
        automatic real x = real'(int'($signed(mem[k][i*8 +: 8])));
        s += x; q += x * x;
      end
      mu = s / L; var_ = q / L - mu * mu;
      rs = 1.0 / $sqrt(var_ + bf2r(eps));
      rsg = bf2r(dut.s[i]);
      checks++;
      if ((rsg - rs) / rs > 0.02 || (rs - rsg) / rs > 0.02) begin
        failures++; $display("FAIL lane %0d 1/sqrt got %f exp %f", i, rsg, rs);
      end
      for (int k = 0; k < L; k++) begin
        automatic real x = real'(int'($signed(mem[k][i*8 +: 8])));
        automatic real y = ((x - mu) * rs * g[k] + bt[k]) * (2.0 ** SHIFT);
        automatic real got = real'(int'($signed(outm[k][i*8 +: 8])));
        automatic real err;
        if (y > 127) y = 127;
        if (y < -128) y = -128;
        err = (got > y) ? got - y : y - got;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d k %0d got %f exp %f", i, k, got, y);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(64);
    run(200);
    $display("max abs error %f output steps", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
