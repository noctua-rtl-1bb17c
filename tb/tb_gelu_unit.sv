// tb_gelu_unit: sweeps every INT8 input (4 fractional bits) through all lanes
// of the hybrid GELU and compares with GELU computed in software (erf by the
// Abramowitz-Stegun 7.1.26 series) inside [-4, 2), with 0 below and the
// input itself from 2 upward. Also counts inputs in each of the three regions.
module tb_gelu_unit;
  import noctua_pkg::*;
  int checks = 0, failures = 0;
  int n_lut = 0, n_zero = 0, n_relu = 0;
  vec_t x, y;
  gelu_unit dut (.x(x), .y(y));

  function automatic real erf_as(real z);
    real t, p, s = (z < 0) ? -1.0 : 1.0;
    z = (z < 0) ? -z : z;
    t = 1.0 / (1.0 + 0.3275911 * z);
    p = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    return s * (1.0 - p * $exp(-z * z));
  endfunction

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int base = -128; base < 128; base += VEC) begin
      for (int i = 0; i < VEC; i++) x[i*8 +: 8] = 8'(base + ((i * 7) % VEC));
      #1;
      for (int i = 0; i < VEC; i++) begin
        automatic int q = base + ((i * 7) % VEC);
        automatic int got = int'($signed(y[i*8 +: 8]));
        automatic real xr = q / 16.0;
        automatic real g = 0.5 * xr * (1.0 + erf_as(xr / $sqrt(2.0))) * 16.0;
        checks++;
        if (q < -64) begin
          n_zero++;
          if (got != 0) failures++;
        end else if (q >= 32) begin
          n_relu++;
          if (got != q) failures++;
        end else begin
          n_lut++;
          if (real'(got) - g > 0.501 || g - real'(got) > 0.501) begin
            failures++;
            $display("FAIL q=%0d got=%0d ref=%f", q, got, g);
          end
        end
      end
    end
    checks++;
    if (n_lut != 96 || n_zero != 64 || n_relu != 96) failures++;
    $display("regions: lut=%0d zero=%0d relu=%0d", n_lut, n_zero, n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
