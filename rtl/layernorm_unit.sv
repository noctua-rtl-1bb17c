// layernorm_unit: layer normalisation of VEC rows in parallel, Eq. (2) and (3).
//
// Row element k of all VEC rows is SRAM word k of the Data SRAM (one signed
// INT8 per lane); gamma[k] and beta[k] are bfloat16 values in bits [15:0] and
// [31:16] of Weight SRAM word k. Work per command:
//   1. one pass over the row accumulates sum(x) and sum(x^2) per lane exactly
//      in integers;
//   2. a short bfloat16 sequence, one operation per cycle on all lanes:
//      mu = sum*recip, E[x^2] = sumsq*recip, V = E[x^2] - mu^2 + delta, where
//      recip = 1/len and delta come with the command;
//   3. the initial estimate s0 of 1/sqrt(V) from a 16-segment piecewise
//      linear table over the mantissa range [1,4) (V = M * 2^(2h), s0 =
//      (a + b*M) * 2^-h), then NR_ITERS Newton-Raphson steps
//      s = 0.5 * s * (3 - V*s^2) in bfloat16;
//   4. a second pass writes y = ((x - mu) * s * gamma + beta) * 2^shift,
//      rounded to INT8, into Output SRAM word k.
// Latency about 2*len + 7 + 4*NR_ITERS cycles. SRAM reads take one cycle.
// The PWL-assisted Newton-Raphson inverse square root in bfloat16 follows the
// document. The segment count and table, the integer statistics, the INT8
// output with a power-of-two scale and the gamma/beta layout are this design's
// choices. Table entry k (k = 0..15): segment [lo, lo+w) with lo = 1 + k/8 for
// k < 8 and 2 + (k-8)/4 otherwise; b = slope of the chord of 1/sqrt(M), a =
// chord intercept lowered by half its midpoint error, both rounded to bf16.
module layernorm_unit
  import noctua_pkg::*;
#(
  parameter int DEPTH    = 256,
  parameter int NR_ITERS = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [AW-1:0]            len,
  input  logic [15:0]              recip,   // bf16 1/len
  input  logic [15:0]              eps,     // bf16 delta
  input  logic [4:0]               shift,
  output logic                     busy,
  output logic                     done,
  output logic                     rd_en,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  input  vec_t                     rd_data,    // Data SRAM
  input  vec_t                     rd_wdata,   // Weight SRAM, same address
  output logic                     out_valid,
  output logic [$clog2(DEPTH)-1:0] out_addr,
  output vec_t                     out_data
);
  localparam logic [15:0] PWL_A [16] = '{
    16'h3fba, 16'h3fb0, 16'h3fa8, 16'h3fa0, 16'h3f9a, 16'h3f94, 16'h3f8f, 16'h3f8a,
    16'h3f84, 16'h3f79, 16'h3f6d, 16'h3f63, 16'h3f59, 16'h3f51, 16'h3f4a, 16'h3f43};
  localparam logic [15:0] PWL_B [16] = '{
    16'hbeea, 16'hbec6, 16'hbeaa, 16'hbe95, 16'hbe83, 16'hbe6a, 16'hbe52, 16'hbe3e,
    16'hbe26, 16'hbe0c, 16'hbdf1, 16'hbdd2, 16'hbdba, 16'hbda5, 16'hbd94, 16'hbd86};
  localparam logic [15:0] BF_THREE = 16'h4040;

  typedef enum logic [2:0] {S_IDLE, S_P1, S_CALC, S_P2} state_e;
  state_e state;
  logic [4:0] step;         // micro-step inside S_CALC
  logic [3:0] iter;

  logic [AW-1:0] ka, kd;
  logic          dv;
  logic signed [31:0] sum   [VEC];
  logic signed [31:0] sumsq [VEC];
  logic [15:0] mu [VEC], ex2 [VEC], v [VEC], s [VEC], t [VEC];
  logic signed [7:0] hh [VEC];

  // per-lane bf16 datapath shared by the calculation steps
  logic [15:0] ma [VEC], mb [VEC], mp [VEC];
  logic [15:0] aa [VEC], ab [VEC], as_ [VEC];
  logic [15:0] fsum [VEC], fsq [VEC];
  // output datapath
  logic [15:0] xf [VEC], xc [VEC], xs [VEC], xg [VEC], xo [VEC];
  wire  [15:0] gam = rd_wdata[15:0];
  wire  [15:0] bet = rd_wdata[31:16];

  for (genvar i = 0; i < VEC; i++) begin : g_lane
    bf16_mul    u_m  (.a(ma[i]), .b(mb[i]), .y(mp[i]));
    bf16_add    u_a  (.a(aa[i]), .b(ab[i]), .y(as_[i]));
    int_to_bf16 u_fs (.x(sum[i]),   .y(fsum[i]));
    int_to_bf16 u_fq (.x(sumsq[i]), .y(fsq[i]));
    int_to_bf16 u_xf (.x(32'(signed'(rd_data[i*8 +: 8]))), .y(xf[i]));
    bf16_add    u_xc (.a(xf[i]), .b({~mu[i][15], mu[i][14:0]}), .y(xc[i]));
    bf16_mul    u_xs (.a(xc[i]), .b(s[i]), .y(xs[i]));
    bf16_mul    u_xg (.a(xs[i]), .b(gam),  .y(xg[i]));
    bf16_add    u_xo (.a(xg[i]), .b(bet),  .y(xo[i]));
    bf16_to_int8 u_q (.x(xo[i]), .sh(shift), .y(out_data[i*8 +: 8]));
  end

  // operand selection of the calculation steps
  // step 0: mu = sum*recip        step 1: ex2 = sumsq*recip   step 2: t = mu*mu
  // step 3: v = ex2 - t           step 4: v = v + eps
  // step 5: t = b*M               step 6: s = (a + t) * 2^-h
  // step 7: t = s*s   step 8: t = v*t   step 9: t = 3 - t   step 10: s = s*t/2
  always_comb begin
    for (int i = 0; i < VEC; i++) begin
      automatic logic [3:0] idx = {~v[i][7], v[i][6:4]};   // exponent of V odd -> M in [2,4)
      automatic logic [15:0] mm = {1'b0, v[i][7] ? 8'd127 : 8'd128, v[i][6:0]};
      ma[i] = fsum[i]; mb[i] = recip; aa[i] = ex2[i]; ab[i] = {~t[i][15], t[i][14:0]};
      case (step)
        5'd0:  begin ma[i] = fsum[i]; mb[i] = recip; end
        5'd1:  begin ma[i] = fsq[i];  mb[i] = recip; end
        5'd2:  begin ma[i] = mu[i];   mb[i] = mu[i]; end
        5'd3:  begin aa[i] = ex2[i];  ab[i] = {~t[i][15], t[i][14:0]}; end
        5'd4:  begin aa[i] = v[i];    ab[i] = eps; end
        5'd5:  begin ma[i] = PWL_B[idx]; mb[i] = mm; end
        5'd6:  begin aa[i] = PWL_A[idx]; ab[i] = t[i]; end
        5'd7:  begin ma[i] = s[i];    mb[i] = s[i]; end
        5'd8:  begin ma[i] = v[i];    mb[i] = t[i]; end
        5'd9:  begin aa[i] = BF_THREE; ab[i] = {~t[i][15], t[i][14:0]}; end
        5'd10: begin ma[i] = s[i];    mb[i] = t[i]; end
        default: ;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign rd_en     = (state == S_P1 || state == S_P2) && (ka < len);
  assign rd_addr   = ka[$clog2(DEPTH)-1:0];
  assign out_valid = (state == S_P2) && dv;
  assign out_addr  = kd[$clog2(DEPTH)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= '0; iter <= '0; ka <= '0; kd <= '0; dv <= 1'b0; done <= 1'b0;
      for (int i = 0; i < VEC; i++) begin
        sum[i] <= '0; sumsq[i] <= '0; mu[i] <= '0; ex2[i] <= '0;
        v[i] <= '0; s[i] <= '0; t[i] <= '0; hh[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      dv   <= rd_en;
      if (rd_en) ka <= ka + 1'b1;
      if (dv)    kd <= kd + 1'b1;
      case (state)
        S_IDLE: if (start && len != 0) begin
          state <= S_P1; ka <= '0; kd <= '0;
          for (int i = 0; i < VEC; i++) begin sum[i] <= '0; sumsq[i] <= '0; end
        end
        S_P1: begin
          if (dv) for (int i = 0; i < VEC; i++) begin
            automatic logic signed [7:0] x = rd_data[i*8 +: 8];
            sum[i]   <= sum[i] + 32'(x);
            sumsq[i] <= sumsq[i] + 32'(x * x);
          end
          if (dv && kd == len - 1'b1) begin state <= S_CALC; step <= '0; iter <= '0; end
        end
        S_CALC: begin
          for (int i = 0; i < VEC; i++) begin
            case (step)
              5'd0: mu[i]  <= mp[i];
              5'd1: ex2[i] <= mp[i];
              5'd2: t[i]   <= mp[i];
              5'd3: v[i]   <= as_[i][15] ? 16'd0 : as_[i];     // rounding can make it negative
              5'd4: begin
                automatic int e = int'(as_[i][14:7]) - 127;
                v[i]  <= as_[i];
                hh[i] <= 8'(e >>> 1);
              end
              5'd5: t[i] <= mp[i];
              5'd6: s[i] <= {as_[i][15], 8'(int'(as_[i][14:7]) - int'(hh[i])), as_[i][6:0]};
              5'd7, 5'd8, 5'd9: t[i] <= (step == 5'd9) ? as_[i] : mp[i];
              5'd10: s[i] <= (mp[i][14:7] <= 8'd1) ? 16'd0 : {mp[i][15], mp[i][14:7] - 8'd1, mp[i][6:0]};
              default: ;
            endcase
          end
          if (step == 5'd10) begin
            iter <= iter + 1'b1;
            if (int'(iter) == NR_ITERS - 1) begin state <= S_P2; ka <= '0; kd <= '0; end
            else step <= 5'd7;
          end else if (step == 5'd6 && NR_ITERS == 0) begin
            state <= S_P2; ka <= '0; kd <= '0;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_P2: if (dv && kd == len - 1'b1) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
