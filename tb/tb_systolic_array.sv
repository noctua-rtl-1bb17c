// tb_systolic_array: multiplies random INT8 matrices A (N x K) and W (K x N)
// on the systolic array and compares every accumulator with a software
// matrix product. Also checks the latency: the last result must appear
// exactly LAT cycles after the last input vector, and not one cycle earlier.
module tb_systolic_array;
  localparam int N = 32;
  localparam int K = 40;
  localparam int LAT = 2 * N;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [N*8-1:0] a_in = '0, b_in = '0;
  logic [$clog2(N)-1:0] col_sel = '0;
  logic signed [31:0] col_out [N];
  logic signed [7:0] A [N][K];
  logic signed [7:0] W [K][N];
  int ref_c [N][N];

  systolic_array #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // counts accumulators that differ from the reference, without using time
  task automatic mismatches(output int m);
    m = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) if (dut.acc[i][j] != ref_c[i][j]) m++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) for (int k = 0; k < K; k++) A[i][k] = 8'($urandom);
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) W[k][j] = 8'($urandom);
    A[N-1][K-1] = 8'sd100; W[K-1][N-1] = -8'sd77;
    A[0][0] = -8'sd128; W[0][0] = -8'sd128;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      ref_c[i][j] = 0;
      for (int k = 0; k < K; k++) ref_c[i][j] += int'(A[i][k]) * int'(W[k][j]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < N; i++) begin a_in[i*8 +: 8] = A[i][k]; b_in[i*8 +: 8] = W[k][i]; end
      @(negedge clk);
    end
    a_in = '0; b_in = '0;
    // now LAT-1 more cycles must not be enough, LAT must be
    repeat (LAT - 1) @(negedge clk);
    checks++;
    begin
      automatic int m0;
      mismatches(m0);
      if (m0 == 0) begin failures++; $display("FAIL: results complete too early"); end
    end
    @(negedge clk);
    checks++;
    begin
      automatic int m;
      mismatches(m);
      if (m != 0) begin failures++; $display("FAIL: %0d accumulators wrong after %0d cycles", m, LAT); end
    end
    // results stay and each one is checked individually
    repeat (3) @(negedge clk);
    for (int j = 0; j < N; j++) begin
      col_sel = $clog2(N)'(j); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (col_out[i] != ref_c[i][j]) failures++;
      end
    end
    // clear zeroes everything
    clear = 1; @(negedge clk); clear = 0; #1;
    checks++;
    begin
      automatic int nz = 0;
      for (int j = 0; j < N; j++) begin
        col_sel = $clog2(N)'(j); #1;
        for (int i = 0; i < N; i++) if (col_out[i] != 0) nz++;
      end
      if (nz != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
