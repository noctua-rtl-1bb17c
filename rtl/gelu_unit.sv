// gelu_unit: asymmetric hybrid GELU for a vector of VEC INT8 lanes.
//
// Each lane holds a fixed-point number with 4 fractional bits (q/16). Inputs in
// the range [-4, 2) (q in [-64, 31]) are looked up in a 96-entry table; below
// -4 the output is 0 and from 2 upward it is the input itself, the ReLU branch.
// Table entry t (q = t - 64) holds round(16 * GELU(q/16)), with
// GELU(x) = 0.5 x (1 + erf(x / sqrt(2))). Purely combinational.
// The LUT range [-4, 2) and the ReLU outside it follow the document; the Q4.4
// lane format is this design's choice.
module gelu_unit
  import noctua_pkg::*;
(
  input  vec_t x,
  output vec_t y
);
  localparam int LO = -64;   // -4.0 in Q4.4
  localparam int HI = 32;    //  2.0 in Q4.4
  localparam logic signed [7:0] LUT [96] = '{
     8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,
     8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,
     8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,
     8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0, -8'sd1, -8'sd1, -8'sd1,
    -8'sd1, -8'sd1, -8'sd1, -8'sd1, -8'sd1, -8'sd1, -8'sd1, -8'sd1,
    -8'sd2, -8'sd2, -8'sd2, -8'sd2, -8'sd2, -8'sd2, -8'sd2, -8'sd2,
    -8'sd3, -8'sd3, -8'sd3, -8'sd3, -8'sd3, -8'sd3, -8'sd3, -8'sd3,
    -8'sd2, -8'sd2, -8'sd2, -8'sd2, -8'sd2, -8'sd1, -8'sd1,  8'sd0,
     8'sd0,  8'sd1,  8'sd1,  8'sd2,  8'sd2,  8'sd3,  8'sd4,  8'sd5,
     8'sd6,  8'sd6,  8'sd7,  8'sd8,  8'sd9,  8'sd10, 8'sd11, 8'sd12,
     8'sd13, 8'sd15, 8'sd16, 8'sd17, 8'sd18, 8'sd19, 8'sd20, 8'sd21,
     8'sd22, 8'sd24, 8'sd25, 8'sd26, 8'sd27, 8'sd28, 8'sd29, 8'sd30
  };

  always_comb begin
    for (int i = 0; i < VEC; i++) begin
      automatic logic signed [7:0] q = x[i*8 +: 8];
      if (int'(q) < LO)       y[i*8 +: 8] = 8'sd0;
      else if (int'(q) >= HI) y[i*8 +: 8] = q;
      else                    y[i*8 +: 8] = LUT[int'(q) - LO];
    end
  end
endmodule
