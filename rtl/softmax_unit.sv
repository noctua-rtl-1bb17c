// softmax_unit: dynamic range-adaptive integer softmax, VEC rows in parallel.
//
// The unit reads a row block from the Data SRAM: row element k of all VEC rows
// sits in SRAM word k (one signed INT8 score per lane), for k = 0..len-1. Each
// lane is one softmax row. Three passes over the SRAM, with B = 8:
//   1. max and min of each row; the dynamic range max-min picks the adaptive
//      factor alpha from {8, 4, 2, 1} (range < 32, < 64, < 128, otherwise);
//   2. shift_i = (max - x_i) >> (B - log2 B - log2 alpha), weight
//      w_i = 2^15 >> shift_i, and the denominator sum of the w_i;
//   3. after a restoring division inv = floor(2^23 / sum) (24 cycles), the
//      output is p_i = inv >> shift_i, i.e. 256 * w_i / sum, saturated to 255
//      and written as an unsigned 8-bit lane into Output SRAM word k.
// Latency about 3*len + 30 cycles. SRAM reads have one cycle of latency.
// Eq. (1), the use of the dynamic range and the bucketised alpha follow the
// document; the alpha set, the bucket bounds, the 2^15 weight scale and the
// 8-bit output scale (256 = probability 1) are this design's choices.
module softmax_unit
  import noctua_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [AW-1:0]            len,
  output logic                     busy,
  output logic                     done,
  output logic                     rd_en,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  input  vec_t                     rd_data,
  output logic                     out_valid,
  output logic [$clog2(DEPTH)-1:0] out_addr,
  output vec_t                     out_data
);
  localparam int B  = 8;
  localparam int WB = 15;                 // weight of the maximum is 2^WB
  localparam int DB = 24;                 // divider width
  typedef enum logic [2:0] {S_IDLE, S_P1, S_ALPHA, S_P2, S_DIV, S_P3} state_e;
  state_e state;

  logic [AW-1:0] ka, kd;                  // issue and receive counters
  logic          dv;                      // rd_data valid this cycle
  logic [4:0]    dcnt;
  logic signed [7:0] mx [VEC];
  logic signed [7:0] mn [VEC];
  logic [2:0]        sdiv [VEC];          // B - log2 B - log2 alpha
  logic [DB-1:0]     sum [VEC];
  logic [DB-1:0]     rem [VEC];
  logic [DB-1:0]     quo [VEC];

  wire pass = (state == S_P1) || (state == S_P2) || (state == S_P3);
  assign busy    = (state != S_IDLE);
  assign rd_en   = pass && (ka < len);
  assign rd_addr = ka[$clog2(DEPTH)-1:0];

  function automatic logic [7:0] shamt(logic signed [7:0] m, logic signed [7:0] x, logic [2:0] sd);
    automatic logic [8:0] diff = 9'($signed({m[7], m}) - $signed({x[7], x}));
    return 8'(diff >> sd);
  endfunction

  always_comb begin
    for (int i = 0; i < VEC; i++) begin
      automatic logic [7:0] sh = shamt(mx[i], rd_data[i*8 +: 8], sdiv[i]);
      automatic logic [DB-1:0] p = (sh > 8'd8) ? '0 : (quo[i] >> sh);
      out_data[i*8 +: 8] = (p > 255) ? 8'd255 : 8'(p);
    end
    out_valid = (state == S_P3) && dv;
    out_addr  = kd[$clog2(DEPTH)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ka <= '0; kd <= '0; dv <= 1'b0; dcnt <= '0; done <= 1'b0;
      for (int i = 0; i < VEC; i++) begin
        mx[i] <= '0; mn[i] <= '0; sdiv[i] <= '0; sum[i] <= '0; rem[i] <= '0; quo[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      dv   <= rd_en;
      if (rd_en) ka <= ka + 1'b1;
      if (dv)    kd <= kd + 1'b1;
      case (state)
        S_IDLE: if (start && len != 0) begin
          state <= S_P1; ka <= '0; kd <= '0;
          for (int i = 0; i < VEC; i++) begin
            mx[i] <= -8'sd128; mn[i] <= 8'sd127; sum[i] <= '0;
          end
        end
        S_P1: begin
          if (dv) for (int i = 0; i < VEC; i++) begin
            automatic logic signed [7:0] x = rd_data[i*8 +: 8];
            if (x > mx[i]) mx[i] <= x;
            if (x < mn[i]) mn[i] <= x;
          end
          if (dv && kd == len - 1'b1) state <= S_ALPHA;
        end
        S_ALPHA: begin
          for (int i = 0; i < VEC; i++) begin
            automatic int r = int'(mx[i]) - int'(mn[i]);
            automatic int la = (r >= 128) ? 0 : (r >= 64) ? 1 : (r >= 32) ? 2 : 3;
            sdiv[i] <= 3'(B - $clog2(B) - la);
          end
          state <= S_P2; ka <= '0; kd <= '0;
        end
        S_P2: begin
          if (dv) for (int i = 0; i < VEC; i++) begin
            automatic logic [7:0] sh = shamt(mx[i], rd_data[i*8 +: 8], sdiv[i]);
            if (sh <= 8'(WB)) sum[i] <= sum[i] + (DB'(1) << (WB - int'(sh)));
          end
          if (dv && kd == len - 1'b1) begin
            state <= S_DIV; dcnt <= '0;
            for (int i = 0; i < VEC; i++) begin rem[i] <= '0; quo[i] <= '0; end
          end
        end
        S_DIV: begin
          // restoring division of 2^(WB+8) by sum, one quotient bit per cycle
          for (int i = 0; i < VEC; i++) begin
            automatic logic [DB:0] t = {rem[i], (DB - 1 - int'(dcnt) == WB + 8)};
            if (t >= {1'b0, sum[i]}) begin
              rem[i] <= DB'(t - {1'b0, sum[i]}); quo[i] <= {quo[i][DB-2:0], 1'b1};
            end else begin
              rem[i] <= DB'(t);                  quo[i] <= {quo[i][DB-2:0], 1'b0};
            end
          end
          dcnt <= dcnt + 1'b1;
          if (dcnt == 5'(DB - 1)) begin state <= S_P3; ka <= '0; kd <= '0; end
        end
        S_P3: if (dv && kd == len - 1'b1) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
