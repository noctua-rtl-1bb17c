// pe: processing element of a tile (Fig. 3): PE controller, Data, Weight and
// Output SRAMs, a VEC x VEC systolic array and, when HAS_NL is set (the PEs of
// the leftmost mesh column), the softmax and layer normalisation units.
//
// The network interface writes Data/Weight SRAM words and hands over commands
// (pe_cmd_t). The PE controller runs one command at a time:
//   OP_MATMUL  streams Data SRAM word k (column k of a VEC-row A block) and
//              Weight SRAM word k (row k of a VEC-column W block) into the
//              array for k = 0..len-1 and flushes it. A long K is split by
//              the controller into chunks: acc_first clears the accumulators
//              before a chunk, so partial sums of later chunks add on top of
//              earlier ones; only after the acc_last chunk is the 32x32
//              result drained column by column: each INT32 sum is shifted
//              right by `shift` (arithmetic), saturated to INT8 and, for
//              POST_GELU, passed through the hybrid GELU, into Output SRAM
//              word j. A chunk that is not the last answers only PKT_DONE;
//   OP_SOFTMAX / OP_LAYERNORM start the matching unit on Data SRAM words
//              0..len-1, which writes Output SRAM words 0..len-1.
// The Output SRAM words are then sent as PKT_RESULT to data memory bank
// out_bank, rows out_addr + j, followed by one PKT_DONE. cmd_ready is high
// only while idle. A MATMUL takes len + 2*VEC + 3 cycles of compute, VEC
// cycles of drain and 2 cycles per result sent.
// The PE parts and the heterogeneous split (nonlinear units only in the
// leftmost column) follow the document; the command set, the data layout
// and the requantisation are this design's choices. Fig. 3 labels the
// activation unit ReLU, the text calls it hybrid GELU; it is built as the
// text describes, with ReLU as its outer branch.
module pe
  import noctua_pkg::*;
#(
  parameter int NODE   = 0,
  parameter bit HAS_NL = 1'b1,
  parameter int DEPTH  = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dsram_we,
  input  logic                     wsram_we,
  input  logic [$clog2(DEPTH)-1:0] sram_waddr,
  input  vec_t                     sram_wdata,
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  pe_cmd_t                  cmd,
  output logic                     res_valid,
  input  logic                     res_ready,
  output pkt_type_e                res_kind,
  output logic [1:0]               res_bank,
  output logic [AW-1:0]            res_addr,
  output vec_t                     res_data
);
  localparam int DA = $clog2(DEPTH);
  localparam int FLUSH = 2 * VEC + 2;

  typedef enum logic [3:0] {
    S_IDLE, S_MM_CLR, S_MM_FEED, S_MM_FLUSH, S_MM_DRAIN, S_NL, S_RD, S_TX, S_DONE
  } state_e;
  state_e  state;
  pe_cmd_t c;
  logic [AW-1:0] k, nout;
  logic          feed_dv;

  // SRAMs
  logic          d_re, w_re, o_re, o_we;
  logic [DA-1:0] d_ra, w_ra, o_ra, o_wa;
  vec_t          d_rd, w_rd, o_rd, o_wd;
  sram #(.W(VW), .DEPTH(DEPTH)) u_dsram (.clk, .we(dsram_we), .waddr(sram_waddr), .wdata(sram_wdata),
                                         .re(d_re), .raddr(d_ra), .rdata(d_rd));
  sram #(.W(VW), .DEPTH(DEPTH)) u_wsram (.clk, .we(wsram_we), .waddr(sram_waddr), .wdata(sram_wdata),
                                         .re(w_re), .raddr(w_ra), .rdata(w_rd));
  sram #(.W(VW), .DEPTH(DEPTH)) u_osram (.clk, .we(o_we), .waddr(o_wa), .wdata(o_wd),
                                         .re(o_re), .raddr(o_ra), .rdata(o_rd));

  // systolic array
  logic signed [31:0] col [VEC];
  systolic_array #(.N(VEC)) u_sa (
    .clk, .rst_n, .clear(state == S_MM_CLR),
    .a_in(feed_dv ? d_rd : '0), .b_in(feed_dv ? w_rd : '0),
    .col_sel(k[$clog2(VEC)-1:0]), .col_out(col));

  // requantisation and GELU
  vec_t q8, g8;
  always_comb
    for (int i = 0; i < VEC; i++) begin
      automatic logic signed [31:0] r = col[i] >>> c.shift;
      q8[i*8 +: 8] = (r > 127) ? 8'sd127 : (r < -128) ? -8'sd128 : 8'(r);
    end
  gelu_unit u_gelu (.x(q8), .y(g8));

  // nonlinear units
  logic          sm_start, ln_start, sm_done, ln_done, sm_rd, ln_rd, sm_ov, ln_ov;
  logic [DA-1:0] sm_ra, ln_ra, sm_oa, ln_oa;
  vec_t          sm_od, ln_od;
  pe_cmd_t cur;     // the command being started, then the latched one
  assign cur = (state == S_IDLE) ? cmd : c;
  assign sm_start = (state == S_IDLE) && cmd_valid && cmd.op == OP_SOFTMAX;
  assign ln_start = (state == S_IDLE) && cmd_valid && cmd.op == OP_LAYERNORM;
  if (HAS_NL) begin : g_nl
    logic sm_busy, ln_busy;
    softmax_unit #(.DEPTH(DEPTH)) u_softmax (
      .clk, .rst_n, .start(sm_start), .len(cur.len), .busy(sm_busy), .done(sm_done),
      .rd_en(sm_rd), .rd_addr(sm_ra), .rd_data(d_rd),
      .out_valid(sm_ov), .out_addr(sm_oa), .out_data(sm_od));
    layernorm_unit #(.DEPTH(DEPTH)) u_layernorm (
      .clk, .rst_n, .start(ln_start), .len(cur.len), .recip(cur.ln_recip), .eps(cur.ln_eps),
      .shift(cur.shift), .busy(ln_busy), .done(ln_done),
      .rd_en(ln_rd), .rd_addr(ln_ra), .rd_data(d_rd), .rd_wdata(w_rd),
      .out_valid(ln_ov), .out_addr(ln_oa), .out_data(ln_od));
  end else begin : g_no_nl
    assign sm_done = 1'b1; assign ln_done = 1'b1;
    assign sm_rd = 1'b0; assign ln_rd = 1'b0; assign sm_ov = 1'b0; assign ln_ov = 1'b0;
    assign sm_ra = '0; assign ln_ra = '0; assign sm_oa = '0; assign ln_oa = '0;
    assign sm_od = '0; assign ln_od = '0;
  end

  // SRAM port selection
  always_comb begin
    d_re = 1'b0; w_re = 1'b0; d_ra = k[DA-1:0]; w_ra = k[DA-1:0];
    o_we = 1'b0; o_wa = k[DA-1:0]; o_wd = (c.post == POST_GELU) ? g8 : q8;
    o_re = (state == S_RD); o_ra = k[DA-1:0];
    if (state == S_MM_FEED) begin d_re = 1'b1; w_re = 1'b1; end
    if (sm_rd) begin d_re = 1'b1; d_ra = sm_ra; end
    if (ln_rd) begin d_re = 1'b1; w_re = 1'b1; d_ra = ln_ra; w_ra = ln_ra; end
    if (state == S_MM_DRAIN) o_we = 1'b1;
    if (sm_ov) begin o_we = 1'b1; o_wa = sm_oa; o_wd = sm_od; end
    if (ln_ov) begin o_we = 1'b1; o_wa = ln_oa; o_wd = ln_od; end
  end

  assign cmd_ready = (state == S_IDLE);
  assign res_valid = (state == S_TX) || (state == S_DONE);
  assign res_kind  = (state == S_DONE) ? PKT_DONE : PKT_RESULT;
  assign res_bank  = c.out_bank;
  assign res_addr  = c.out_addr + k;
  assign res_data  = o_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; c <= '0; k <= '0; nout <= '0; feed_dv <= 1'b0;
    end else begin
      feed_dv <= (state == S_MM_FEED);
      case (state)
        S_IDLE: if (cmd_valid) begin
          c <= cmd; k <= '0;
          if (cmd.op == OP_MATMUL) state <= cmd.acc_first ? S_MM_CLR : S_MM_FEED;
          else if (HAS_NL)         state <= S_NL;
          else                     state <= S_DONE;   // not supported without nonlinear units
        end
        S_MM_CLR:  state <= S_MM_FEED;
        S_MM_FEED: begin
          k <= k + 1'b1;
          if (k == c.len - 1'b1) begin k <= '0; state <= S_MM_FLUSH; end
        end
        S_MM_FLUSH: begin
          k <= k + 1'b1;
          if (k == AW'(FLUSH)) begin k <= '0; state <= c.acc_last ? S_MM_DRAIN : S_DONE; end
        end
        S_MM_DRAIN: begin
          k <= k + 1'b1;
          if (k == AW'(VEC - 1)) begin k <= '0; nout <= AW'(VEC); state <= S_RD; end
        end
        S_NL: if ((c.op == OP_SOFTMAX && sm_done) || (c.op == OP_LAYERNORM && ln_done)) begin
          k <= '0; nout <= c.len; state <= S_RD;
        end
        S_RD: state <= S_TX;
        S_TX: if (res_ready) begin
          if (k == nout - 1'b1) state <= S_DONE;
          else begin k <= k + 1'b1; state <= S_RD; end
        end
        S_DONE: if (res_ready) begin state <= S_IDLE; k <= '0; end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cmd_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && cmd_valid) |-> (cmd.len != 0 && int'(cmd.len) <= DEPTH));
endmodule
