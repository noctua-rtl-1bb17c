// tb_bf16: self-checking test of the bfloat16 helpers (bf16_mul, bf16_add,
// int_to_bf16, bf16_to_int8). Random operands; the reference computes the
// exact result in double precision and rounds it to bfloat16 (nearest even)
// or to INT8 (half away from zero, saturating) in software.
module tb_bf16;
  int checks = 0, failures = 0;
  logic [15:0] a, b, ym, ya, yi;
  logic signed [31:0] xi;
  logic [4:0] sh;
  logic signed [7:0] y8;

  bf16_mul     u_mul (.a(a), .b(b), .y(ym));
  bf16_add     u_add (.a(a), .b(b), .y(ya));
  int_to_bf16  u_i2b (.x(xi), .y(yi));
  bf16_to_int8 u_b2i (.x(a), .sh(sh), .y(y8));

  function automatic real bf2r(logic [15:0] v);
    if (v[14:7] == 0) return 0.0;
    return $bitstoreal({v[15], 11'(int'(v[14:7]) - 127 + 1023), v[6:0], 45'd0});
  endfunction

  function automatic logic [15:0] r2bf(real r);
    logic [63:0] bits = $realtobits(r);
    int e;
    logic [8:0] m;
    if (r == 0.0) return 16'd0;
    e = int'(bits[62:52]) - 1023 + 127;
    m = {2'b01, bits[51:45]};
    if (bits[44] && ((|bits[43:0]) || bits[45])) m = m + 1;
    if (m[8]) begin m = m >> 1; e = e + 1; end
    if (e <= 0) return {bits[63], 15'd0};
    if (e >= 255) return {bits[63], 8'hff, 7'd0};
    return {bits[63], 8'(e), m[6:0]};
  endfunction

  function automatic logic [15:0] rnd_bf(int emin, int emax);
    return {1'($urandom), 8'(emin + int'($urandom % (emax - emin + 1))), 7'($urandom)};
  endfunction

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp && !(got[14:0] == 0 && exp[14:0] == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a = rnd_bf(100, 150); b = rnd_bf(100, 150);
      if (n % 7 == 0) b = {~a[15], a[14:7], 7'($urandom)};     // near cancellation
      if (n % 11 == 0) b = 16'd0;
      xi = (n % 3 == 0) ? 32'($urandom % 4096) - 2048 : $signed($urandom);
      sh = 5'($urandom % 6);
      #1;
      chk("mul", ym, r2bf(bf2r(a) * bf2r(b)));
      chk("add", ya, r2bf(bf2r(a) + bf2r(b)));
      chk("i2b", yi, r2bf(real'(xi)));
      begin
        automatic real v = bf2r(a) * (2.0 ** sh);
        automatic real av = (v < 0) ? -v : v;
        automatic int  m = (av >= 128.0) ? 128 : int'($floor(av + 0.5));
        automatic int  e8 = (v < 0) ? -m : m;
        if (e8 > 127) e8 = 127;
        if (e8 < -128) e8 = -128;
        chk("b2i", 16'(y8), 16'(e8));
      end
    end
    // a few exact cases
    a = 16'h3f80; b = 16'h4000; #1; chk("1*2", ym, 16'h4000); chk("1+2", ya, 16'h4040);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
