// bf16_add: combinational bfloat16 adder, round to nearest even.
// The smaller operand is aligned into a 24-bit field (16 bits below the last
// fraction bit, bits shifted further out are jammed into the lowest bit), the
// magnitudes are added or subtracted, the sum is normalised and rounded.
// Subnormals flush to zero, overflow gives infinity, NaN is not handled.
// Used by the bfloat16 layer normalisation; details are this design's choices.
module bf16_add (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  always_comb begin
    automatic logic [15:0] l, s;
    automatic int          d, e, p, lz;
    automatic logic [24:0] ml, ms, sum;
    automatic logic [7:0]  m;
    automatic logic        r, st;
    automatic logic [8:0]  mr;
    if (a[14:0] >= b[14:0]) begin l = a; s = b; end
    else                    begin l = b; s = a; end
    d  = int'(l[14:7]) - int'(s[14:7]);
    ml = {1'b0, 1'b1, l[6:0], 16'd0};
    ms = (s[14:7] == 8'd0) ? 25'd0 : {1'b0, 1'b1, s[6:0], 16'd0};
    if (d >= 25) ms = (ms != 0) ? 25'd1 : 25'd0;
    else if (d > 0) ms = (ms >> d) | 25'(((ms & ((25'd1 << d) - 25'd1)) != 0));
    sum = (l[15] == s[15]) ? ml + ms : ml - ms;
    e = int'(l[14:7]);
    p = -1;
    for (int i = 0; i < 25; i++) if (sum[i]) p = i;
    y = 16'd0;
    if (l[14:7] == 8'd0) begin
      y = 16'd0;
    end else if (p < 0) begin
      y = 16'd0;
    end else begin
      st = 1'b0;
      if (p == 24) begin
        st  = sum[0];
        sum = sum >> 1;
        e   = e + 1;
      end else begin
        lz  = 23 - p;
        sum = sum << lz;
        e   = e - lz;
      end
      m  = sum[23:16];
      r  = sum[15];
      st = st | (|sum[14:0]);
      mr = {1'b0, m} + 9'(r && (st || m[0]));
      if (mr[8]) begin mr = mr >> 1; e = e + 1; end
      if (e <= 0)        y = {l[15], 15'd0};
      else if (e >= 255) y = {l[15], 8'hff, 7'd0};
      else               y = {l[15], 8'(e), mr[6:0]};
    end
  end
endmodule
