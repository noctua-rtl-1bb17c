// systolic_array: N x N output-stationary INT8 systolic array.
//
// Each cycle the array takes one vector a_in (N signed INT8 values, one per row
// i: A[i][k]) and one vector b_in (N values, one per column j: W[k][j]). Row i
// of a_in is delayed i+1 cycles and column j of b_in j+1 cycles before entering,
// so cell (i,j) sees A[i][k] and W[k][j] together; values then move
// one cell right (A) or down (W) per cycle. Each cell multiplies and adds into
// its own 32-bit accumulator. Vector k reaches cell (i,j) i+j+2 cycles after
// it is presented, so after streaming K vectors and 2N further cycles of
// zeros, acc(i,j) holds sum_k A[i][k]*W[k][j]. clear zeroes all
// accumulators and the pipeline. col_sel picks one accumulator column for
// read-out (col_out[i] = acc(i,col_sel)), which is combinational.
// The systolic array and its 32x32 size (16384 MACs over 16 PEs) follow the
// document; the output-stationary dataflow is this design's choice.
module systolic_array #(
  parameter int N = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [N*8-1:0]          a_in,
  input  logic [N*8-1:0]          b_in,
  input  logic [$clog2(N)-1:0]    col_sel,
  output logic signed [31:0]      col_out [N]
);
  // skew lines: element i is delayed by i cycles
  logic signed [7:0] a_skew [N][N];
  logic signed [7:0] b_skew [N][N];
  // moving operands inside the array
  logic signed [7:0]  a_r [N][N];
  logic signed [7:0]  b_r [N][N];
  logic signed [31:0] acc [N][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a_skew[i][j] <= '0; b_skew[i][j] <= '0;
          a_r[i][j] <= '0; b_r[i][j] <= '0; acc[i][j] <= '0;
        end
    end else if (clear) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a_skew[i][j] <= '0; b_skew[i][j] <= '0;
          a_r[i][j] <= '0; b_r[i][j] <= '0; acc[i][j] <= '0;
        end
    end else begin
      for (int i = 0; i < N; i++) begin
        a_skew[i][0] <= a_in[i*8 +: 8];
        b_skew[i][0] <= b_in[i*8 +: 8];
        for (int d = 1; d < N; d++) begin
          a_skew[i][d] <= a_skew[i][d-1];
          b_skew[i][d] <= b_skew[i][d-1];
        end
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          // row i enters from the left after i skew stages, column j from the top after j
          a_r[i][j] <= (j == 0) ? a_skew[i][i] : a_r[i][j-1];
          b_r[i][j] <= (i == 0) ? b_skew[j][j] : b_r[i-1][j];
          acc[i][j] <= acc[i][j] + 32'(a_r[i][j] * b_r[i][j]);
        end
    end
  end

  always_comb
    for (int i = 0; i < N; i++) col_out[i] = acc[i][col_sel];
endmodule
