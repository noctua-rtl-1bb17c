// bf16_to_int8: converts a bfloat16 value times 2^sh to a signed INT8,
// rounding half away from zero and saturating to [-128, 127]. Combinational.
// Used to write layer normalisation results back in the INT8 data format;
// the output scaling by 2^sh is this design's choice.
module bf16_to_int8 (
  input  logic [15:0]       x,
  input  logic [4:0]        sh,
  output logic signed [7:0] y
);
  always_comb begin
    automatic int         e = int'(x[14:7]) - 127 + int'(sh);
    automatic logic [7:0] mant = {1'b1, x[6:0]};
    automatic logic [8:0] two, mag;
    if (x[14:7] == 8'd0 || e < -1) begin
      mag = 9'd0;
    end else if (e > 6) begin
      mag = 9'd255;
    end else begin
      two = 9'(mant >> (6 - e));
      mag = (two + 9'd1) >> 1;
    end
    if (x[15]) y = (mag >= 9'd128) ? -8'sd128 : -$signed(8'(mag));
    else       y = (mag >= 9'd128) ?  8'sd127 :  $signed(8'(mag));
  end
endmodule
