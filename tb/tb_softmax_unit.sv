// tb_softmax_unit: runs the range-adaptive integer softmax on row blocks
// whose rows have different dynamic ranges, so that every alpha bucket is
// used, and compares every output with a software model of Eq. (1):
// shift = (max - x) >> (5 - log2 alpha), w = 2^15 >> shift, inv = 2^23 / sum w,
// p = min(255, inv >> shift). Checks the cycle count against 3*len + 30 and
// that each row's probabilities sum to about 256 (probability 1).
module tb_softmax_unit;
  import noctua_pkg::*;
  localparam int DEPTH = 256;
  int checks = 0, failures = 0;
  int bucket_hits [4] = '{0, 0, 0, 0};
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] len = '0;
  logic busy, done, rd_en, out_valid;
  logic [$clog2(DEPTH)-1:0] rd_addr, out_addr;
  vec_t rd_data, out_data;
  vec_t mem [DEPTH];
  vec_t outm [DEPTH];

  softmax_unit #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (out_valid) outm[out_addr] <= out_data;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run(int L);
    int cyc = 0;
    // lane i gets a spread of 2^(i%8) around a random centre
    for (int i = 0; i < VEC; i++) begin
      automatic int spread = 1 << (i % 8);
      automatic int centre = int'($urandom % 101) - 50;
      for (int k = 0; k < L; k++) begin
        automatic int v = centre + int'($urandom % (spread + 1)) - spread / 2;
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        mem[k][i*8 +: 8] = 8'(v);
      end
    end
    @(negedge clk); len = AW'(L); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > 3 * L + 30) begin failures++; $display("FAIL: %0d cycles for len %0d", cyc, L); end
    for (int i = 0; i < VEC; i++) begin
      automatic int mx = -128, mn = 127, la, sd, tot = 0, psum = 0;
      automatic longint sum = 0, inv;
      for (int k = 0; k < L; k++) begin
        automatic int x = int'($signed(mem[k][i*8 +: 8]));
        if (x > mx) mx = x;
        if (x < mn) mn = x;
      end
      la = (mx - mn >= 128) ? 0 : (mx - mn >= 64) ? 1 : (mx - mn >= 32) ? 2 : 3;
      bucket_hits[la]++;
      sd = 8 - 3 - la;
      for (int k = 0; k < L; k++) begin
        automatic int sh = (mx - int'($signed(mem[k][i*8 +: 8]))) >> sd;
        if (sh <= 15) sum += (longint'(1) << (15 - sh));
      end
      inv = (longint'(1) << 23) / sum;
      for (int k = 0; k < L; k++) begin
        automatic int sh = (mx - int'($signed(mem[k][i*8 +: 8]))) >> sd;
        automatic longint p = (sh > 8) ? 0 : (inv >> sh);
        automatic int got = int'(outm[k][i*8 +: 8]);
        if (p > 255) p = 255;
        checks++;
        psum += got;
        if (got != int'(p)) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d k %0d got %0d exp %0d", i, k, got, p);
        end
      end
      checks++;
      if (psum > 256 + L || psum < 256 - 2 * L - 8) begin
        failures++; $display("FAIL: lane %0d probabilities sum to %0d", i, psum);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(16);
    run(1);
    run(64);
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (bucket_hits[b] == 0) begin failures++; $display("FAIL: alpha bucket %0d never used", b); end
    end
    $display("alpha buckets used: %0d %0d %0d %0d", bucket_hits[0], bucket_hits[1], bucket_hits[2], bucket_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
