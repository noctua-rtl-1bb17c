// central_controller: tiles an operation, maps the tiles onto PEs, moves the
// operands over the NoC with multicast, starts the PEs and waits for them.
//
// MATMUL C = A * W with A of m_tiles*VEC rows by k_len columns and W of k_len
// rows by n_tiles*VEC columns. Output tile (mi, nj) is one 32x32 block of C.
// Tiles are numbered row-major and handed out in rounds of 16, tile t0+p to
// the PE of node p, so any shape of C keeps all PEs busy (e.g. 1x16 or 4x4
// tile grids alike). Per round:
//   A: for each distinct mi, the k_len words A-block(mi) are sent once with a
//      destination mask holding every PE of the round that uses that mi;
//   W: likewise, one multicast per distinct nj;
//   C: a PKT_CMD to each PE; then the controller counts PKT_DONE events.
// A K longer than the PE SRAMs (KCHUNK words) is split into chunks; A, W and
// C steps repeat per chunk, and the PEs add each chunk's partial sums to
// their accumulators (acc_first / acc_last in the command), so results leave
// the PEs only once.
// SOFTMAX / LAYERNORM: row blocks of VEC rows go, four per round, to the PEs
// of the leftmost column (nodes 0, 4, 8, 12), the only ones with nonlinear
// units; for LAYERNORM the gamma/beta words are multicast to all of them.
// Memory layout (this design's choice): A-block(mi) word k at a_base + mi*K + k
// holds A[mi*VEC + i][k] in lane i; W-block(nj) word k at w_base + nj*K + k
// holds W[k][nj*VEC + j] in lane j; C is written in A's layout with K = N, so
// a result can feed the next matrix multiplication directly.
// Each data flit takes two cycles (memory read, then injection). Data flits
// enter through the memory port of the bank they come from: data memory bank
// b at the West port of mesh row b, weight memory bank b at the North port of
// mesh column b. The document gives the controller's role (data tiling,
// multicast of shared blocks, partial-sum collection); the algorithm, the
// round structure and the layouts here are this design's own.
module central_controller
  import noctua_pkg::*;
#(
  parameter int DDEPTH = 2560,
  parameter int WDEPTH = 2560,
  parameter int KCHUNK = 256      // PE Data/Weight SRAM depth: longest K per PE command
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  cmd_t                      cmd,
  output logic                      busy,
  output logic                      d_re,
  output logic [1:0]                d_bank,
  output logic [$clog2(DDEPTH)-1:0] d_addr,
  input  vec_t                      d_rdata,
  output logic                      w_re,
  output logic [1:0]                w_bank,
  output logic [$clog2(WDEPTH)-1:0] w_addr,
  input  vec_t                      w_rdata,
  output logic                      inj_valid,
  input  logic                      inj_ready,
  output flit_t                     inj_flit,
  output logic                      inj_west,   // 1: data memory port of row inj_idx, 0: weight port of column inj_idx
  output logic [1:0]                inj_idx,
  input  logic                      done_valid [MESH]
);
  typedef enum logic [3:0] {
    S_IDLE, S_MAP, S_SEL_A, S_SEL_W, S_SEL_C, S_RD, S_TX, S_CMD, S_WAIT
  } state_e;
  typedef enum logic [1:0] {ST_A, ST_W, ST_C} stream_e;

  state_e  state;
  stream_e strm;
  cmd_t    c;
  logic [15:0]     total, tcur;
  logic [7:0]      mi_c, nj_c;
  logic [4:0]      p;                 // node scanned
  logic [NODES-1:0] tv;               // node has a tile this round
  logic [7:0]      tmi [NODES];
  logic [7:0]      tnj [NODES];
  logic [AW-1:0]   k;
  logic [4:0]      ndone, nvalid;
  logic [NODES-1:0] smask;
  logic [AW-1:0]   sbase;
  logic [AW-1:0]   koff;              // first K index of the current chunk
  logic [AW-1:0]   clen;              // length of the current chunk

  wire [AW-1:0] krem = c.k_len - koff;

  wire is_mm = (c.op == OP_MATMUL);

  // multicast masks for the node being scanned
  logic [NODES-1:0] mask_mi, mask_nj;
  logic             first_mi, first_nj;
  always_comb begin
    mask_mi = '0; mask_nj = '0; first_mi = 1'b1; first_nj = 1'b1;
    for (int q = 0; q < NODES; q++) begin
      if (tv[q] && tmi[q] == tmi[p[3:0]]) begin
        mask_mi[q] = 1'b1;
        if (q < int'(p)) first_mi = 1'b0;
      end
      if (tv[q] && tnj[q] == tnj[p[3:0]]) begin
        mask_nj[q] = 1'b1;
        if (q < int'(p)) first_nj = 1'b0;
      end
    end
  end

  pe_cmd_t pc;
  always_comb begin
    pc          = '0;
    pc.op       = c.op;
    pc.post     = c.post;
    pc.shift    = c.shift;
    pc.len      = clen;
    pc.acc_first = (koff == '0);
    pc.acc_last  = (koff + clen == c.k_len);
    pc.out_bank = c.o_bank;
    pc.ln_recip = c.ln_recip;
    pc.ln_eps   = c.ln_eps;
    pc.out_addr = is_mm ? AW'(c.o_base + AW'(tmi[p[3:0]]) * AW'({c.n_tiles, 5'd0}) + AW'({tnj[p[3:0]], 5'd0}))
                        : AW'(c.o_base + AW'(tmi[p[3:0]]) * c.k_len);
  end

  assign busy    = (state != S_IDLE);
  assign d_re    = (state == S_RD) && strm == ST_A;
  assign w_re    = (state == S_RD) && strm == ST_W;
  assign d_bank  = c.a_bank;
  assign w_bank  = c.w_bank;
  assign d_addr  = ($clog2(DDEPTH))'(sbase + k);
  assign w_addr  = ($clog2(WDEPTH))'(sbase + k);

  always_comb begin
    inj_valid       = (state == S_TX) || (state == S_CMD);
    inj_flit        = '0;
    inj_flit.src    = 4'd0;
    inj_flit.to_mem = 1'b0;
    inj_flit.dst    = smask;
    inj_flit.addr   = k;
    inj_west        = 1'b1;
    inj_idx         = c.a_bank;
    if (state == S_CMD) begin
      inj_flit.ptype = PKT_CMD;
      inj_flit.dst   = NODES'(1) << p[3:0];
      inj_flit.addr  = '0;
      inj_flit.data  = VW'(pc);
    end else if (strm == ST_W) begin
      inj_flit.ptype = PKT_WEIGHT;
      inj_flit.data  = w_rdata;
      inj_west       = 1'b0;
      inj_idx        = c.w_bank;
    end else begin
      inj_flit.ptype = PKT_DATA;
      inj_flit.data  = d_rdata;
    end
  end

  logic [2:0] ndv;
  always_comb begin
    ndv = '0;
    for (int b = 0; b < MESH; b++) ndv = ndv + 3'(done_valid[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; strm <= ST_A; c <= '0; total <= '0; tcur <= '0;
      mi_c <= '0; nj_c <= '0; p <= '0; tv <= '0; k <= '0; ndone <= '0; nvalid <= '0;
      smask <= '0; sbase <= '0; koff <= '0; clen <= '0;
      for (int q = 0; q < NODES; q++) begin tmi[q] <= '0; tnj[q] <= '0; end
    end else begin
      if (state == S_WAIT || state == S_SEL_A || state == S_SEL_W || state == S_SEL_C ||
          state == S_RD || state == S_TX || state == S_CMD)
        ndone <= ndone + 5'(ndv);
      case (state)
        S_IDLE: if (cmd_valid) begin
          c     <= cmd;
          total <= (cmd.op == OP_MATMUL) ? 16'(cmd.m_tiles) * 16'(cmd.n_tiles) : 16'(cmd.m_tiles);
          tcur <= '0; mi_c <= '0; nj_c <= '0;
          p <= '0; tv <= '0;
          if (cmd.m_tiles != 0 && cmd.k_len != 0 && (cmd.op != OP_MATMUL || cmd.n_tiles != 0))
            state <= S_MAP;
        end
        // one node per cycle: give it the next tile of the round
        S_MAP: begin
          automatic logic [3:0] node = is_mm ? p[3:0] : 4'(p[1:0] * MESH);
          if ((is_mm || p < 5'(MESH)) && tcur < total) begin
            tv[node]  <= 1'b1;
            tmi[node] <= mi_c;
            tnj[node] <= nj_c;
            tcur      <= tcur + 1'b1;
            if (is_mm && nj_c != c.n_tiles - 1'b1) nj_c <= nj_c + 1'b1;
            else begin nj_c <= '0; mi_c <= mi_c + 1'b1; end
          end
          p <= p + 1'b1;
          if (p == 5'(NODES - 1)) begin
            p <= '0; state <= S_SEL_A; ndone <= '0;
            koff <= '0;
            clen <= (!is_mm || c.k_len <= AW'(KCHUNK)) ? c.k_len : AW'(KCHUNK);
          end
        end
        S_SEL_A: begin
          if (tv[p[3:0]] && first_mi) begin
            strm  <= ST_A; smask <= mask_mi; k <= '0;
            sbase <= c.a_base + AW'(tmi[p[3:0]]) * c.k_len + koff;
            state <= S_RD;
          end else if (p == 5'(NODES - 1)) begin
            p <= '0; state <= S_SEL_W;
          end else p <= p + 1'b1;
        end
        S_SEL_W: begin
          if (c.op == OP_SOFTMAX) begin
            p <= '0; state <= S_SEL_C;
          end else if (c.op == OP_LAYERNORM) begin
            if (p == 5'd0) begin
              strm <= ST_W; smask <= tv; k <= '0; sbase <= c.w_base; state <= S_RD;
            end else begin
              p <= '0; state <= S_SEL_C;
            end
          end else if (tv[p[3:0]] && first_nj) begin
            strm  <= ST_W; smask <= mask_nj; k <= '0;
            sbase <= c.w_base + AW'(tnj[p[3:0]]) * c.k_len + koff;
            state <= S_RD;
          end else if (p == 5'(NODES - 1)) begin
            p <= '0; state <= S_SEL_C;
          end else p <= p + 1'b1;
        end
        S_RD: state <= S_TX;
        S_TX: if (inj_ready) begin
          if (k == clen - 1'b1) begin
            // stream finished: continue the scan after this node
            if (strm == ST_A) begin
              if (p == 5'(NODES - 1)) begin p <= '0; state <= S_SEL_W; end
              else begin p <= p + 1'b1; state <= S_SEL_A; end
            end else if (c.op == OP_LAYERNORM) begin
              p <= 5'd1; state <= S_SEL_W;
            end else begin
              if (p == 5'(NODES - 1)) begin p <= '0; state <= S_SEL_C; end
              else begin p <= p + 1'b1; state <= S_SEL_W; end
            end
          end else begin
            k <= k + 1'b1; state <= S_RD;
          end
        end
        S_SEL_C: begin
          if (tv[p[3:0]]) state <= S_CMD;
          else if (p == 5'(NODES - 1)) begin
            state <= S_WAIT; nvalid <= 5'($countones(tv));
          end else p <= p + 1'b1;
        end
        S_CMD: if (inj_ready) begin
          if (p == 5'(NODES - 1)) begin state <= S_WAIT; nvalid <= 5'($countones(tv)); end
          else begin p <= p + 1'b1; state <= S_SEL_C; end
        end
        S_WAIT: if (ndone + 5'(ndv) == nvalid) begin
          p <= '0;
          if (koff + clen != c.k_len) begin
            // next K chunk for the same tiles
            koff  <= koff + clen;
            clen  <= (krem - clen <= AW'(KCHUNK)) ? krem - clen : AW'(KCHUNK);
            ndone <= '0;
            state <= S_SEL_A;
          end else begin
            tv <= '0;
            state <= (tcur >= total) ? S_IDLE : S_MAP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_nl_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && cmd_valid && cmd.op != OP_MATMUL) |-> int'(cmd.k_len) <= KCHUNK);
  a_inj_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (inj_valid && !inj_ready) |=> inj_valid && $stable(inj_flit));
endmodule
