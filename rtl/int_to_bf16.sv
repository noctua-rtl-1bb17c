// int_to_bf16: converts a signed 32-bit integer to bfloat16, rounding to
// nearest even. Combinational. Used to bring the layer normalisation's integer
// sums and inputs into bfloat16.
module int_to_bf16 (
  input  logic signed [31:0] x,
  output logic        [15:0] y
);
  always_comb begin
    automatic logic [31:0] mag = x[31] ? 32'(-x) : 32'(x);
    automatic int          p = -1;
    automatic logic [31:0] n;
    automatic logic [8:0]  mr;
    automatic int          e;
    for (int i = 0; i < 32; i++) if (mag[i]) p = i;
    if (p < 0) begin
      y = 16'd0;
    end else begin
      n  = mag << (31 - p);
      e  = 127 + p;
      mr = {1'b0, n[31:24]} + 9'(n[23] && ((|n[22:0]) || n[24]));
      if (mr[8]) begin mr = mr >> 1; e = e + 1; end
      y = {x[31], 8'(e), mr[6:0]};
    end
  end
endmodule
