// bf16_mul: combinational bfloat16 multiplier (1 sign, 8 exponent, 7 fraction
// bits), rounding to nearest even. Subnormal inputs and results are flushed to
// zero and overflow gives infinity; NaN inputs are not handled. Used by the
// layer normalisation, which the document evaluates in bfloat16 precision;
// the rounding and the special-value handling are this design's choices.
module bf16_mul (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  always_comb begin
    automatic logic        s  = a[15] ^ b[15];
    automatic logic [15:0] p  = {1'b1, a[6:0]} * {1'b1, b[6:0]};
    automatic int          e  = int'(a[14:7]) + int'(b[14:7]) - 127;
    automatic logic [7:0]  m;     // hidden bit + 7 fraction bits
    automatic logic        r, st;
    automatic logic [8:0]  mr;
    if (p[15]) begin
      m = p[15:8]; r = p[7]; st = |p[6:0]; e = e + 1;
    end else begin
      m = p[14:7]; r = p[6]; st = |p[5:0];
    end
    mr = {1'b0, m} + 9'(r && (st || m[0]));
    if (mr[8]) begin
      mr = mr >> 1; e = e + 1;
    end
    if (a[14:7] == 8'd0 || b[14:7] == 8'd0 || e <= 0) y = {s, 15'd0};
    else if (e >= 255)                                y = {s, 8'hff, 7'd0};
    else                                              y = {s, 8'(e), mr[6:0]};
  end
endmodule
