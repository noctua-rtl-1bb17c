// tb_tile: one mesh node, tile (1,1) without nonlinear units, driven on its
// four links as its neighbours would drive them.
//  1. Through traffic: flits for other tiles enter on one link and must leave
//     on the link XY routing picks (West->East, North->South, South->North,
//     East->West), unchanged.
//  2. Multicast: the A block arrives from the West with destination mask
//     {tile 5, tile 7}; every flit must be written locally and also leave East.
//     The W block arrives from the North for {tile 5, tile 13} and must also
//     leave South.
//  3. A MATMUL command then makes the PE return 32 result flits and one
//     completion flit; all are memory-bound and must leave on the West link
//     with the product of the two blocks, shifted and saturated to INT8.
// Output links apply random back-pressure.
module tb_tile;
  import noctua_pkg::*;
  localparam int K = 8, SHIFT = 3, SELF = 5;
  localparam int LN = 0, LE = 1, LS = 2, LW = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic  in_valid [4], in_ready [4], out_valid [4], out_ready [4];
  flit_t in_flit [4], out_flit [4];
  tile #(.X(1), .Y(1), .HAS_NL(1'b0), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  logic signed [7:0] A [VEC][K];
  logic signed [7:0] W [K][VEC];
  // expected flits per output link, in order
  flit_t exp_q [4][$];
  int nres = 0, ndone = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(negedge clk) for (int p = 0; p < 4; p++) out_ready[p] = 1'($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 4; p++)
      if (out_valid[p] && out_ready[p]) begin
        checks++;
        if (out_flit[p].to_mem) begin
          if (p != LW || out_flit[p].src != 4'(SELF) || out_flit[p].bank != 2'd1) begin
            failures++; $display("FAIL: memory flit on link %0d", p);
          end
          if (out_flit[p].ptype == PKT_DONE) ndone++;
          else begin
            checks++;
            if (out_flit[p].ptype != PKT_RESULT || out_flit[p].addr != AW'(40 + nres) ||
                out_flit[p].data != exp_result(nres)) begin
              failures++; $display("FAIL: result %0d", nres);
            end
            nres++;
          end
        end else if (exp_q[p].size() == 0 || out_flit[p] != exp_q[p][0]) begin
          failures++; $display("FAIL: unexpected flit on link %0d", p);
        end else void'(exp_q[p].pop_front());
      end

  function automatic vec_t exp_result(int j);
    vec_t v;
    for (int i = 0; i < VEC; i++) begin
      automatic int acc = 0;
      for (int k = 0; k < K; k++) acc += int'(A[i][k]) * int'(W[k][j]);
      acc = acc >>> SHIFT;
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      v[i*8 +: 8] = 8'(acc);
    end
    return v;
  endfunction

  task automatic send(int p, flit_t f);
    @(negedge clk);
    in_flit[p] = f; in_valid[p] = 1;
    @(posedge clk);
    while (!in_ready[p]) @(posedge clk);
    @(negedge clk); in_valid[p] = 0;
  endtask

  function automatic flit_t mk(logic [NODES-1:0] dst, pkt_type_e t, int addr, vec_t d);
    flit_t f = '0;
    f.dst = dst; f.ptype = t; f.src = 4'd0; f.addr = AW'(addr); f.data = d;
    return f;
  endfunction

  initial begin
    automatic flit_t f;
    automatic pe_cmd_t c = '0;
    for (int p = 0; p < 4; p++) begin in_valid[p] = 0; in_flit[p] = '0; end
    for (int i = 0; i < VEC; i++) for (int k = 0; k < K; k++) A[i][k] = 8'($urandom);
    for (int k = 0; k < K; k++) for (int j = 0; j < VEC; j++) W[k][j] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. through traffic
    for (int n = 0; n < 8; n++) begin
      automatic vec_t d = {8{$urandom}};
      f = mk(16'(1) << 7, PKT_DATA, n, d);  exp_q[LE].push_back(f); send(LW, f);
      f = mk(16'(1) << 13, PKT_DATA, n, d); exp_q[LS].push_back(f); send(LN, f);
      f = mk(16'(1) << 1, PKT_WEIGHT, n, d); exp_q[LN].push_back(f); send(LS, f);
      f = mk(16'(1) << 4, PKT_WEIGHT, n, d); exp_q[LW].push_back(f); send(LE, f);
    end
    // 2. multicast operands
    for (int k = 0; k < K; k++) begin
      automatic vec_t d;
      automatic logic [NODES-1:0] m = (16'(1) << SELF) | (16'(1) << 7);
      for (int i = 0; i < VEC; i++) d[i*8 +: 8] = A[i][k];
      f = mk(m, PKT_DATA, k, d);
      f.dst = 16'(1) << 7;             // the copy sent East keeps only the far tile
      exp_q[LE].push_back(f);
      f.dst = m; send(LW, f);
    end
    for (int k = 0; k < K; k++) begin
      automatic vec_t d;
      automatic logic [NODES-1:0] m = (16'(1) << SELF) | (16'(1) << 13);
      for (int j = 0; j < VEC; j++) d[j*8 +: 8] = W[k][j];
      f = mk(m, PKT_WEIGHT, k, d);
      f.dst = 16'(1) << 13;
      exp_q[LS].push_back(f);
      f.dst = m; send(LN, f);
    end
    // 3. command
    c.op = OP_MATMUL; c.post = POST_NONE; c.shift = 5'(SHIFT); c.len = AW'(K);
    c.acc_first = 1; c.acc_last = 1; c.out_bank = 2'd1; c.out_addr = 16'd40;
    send(LW, mk(16'(1) << SELF, PKT_CMD, 0, VW'(c)));
    repeat (400) @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (exp_q[p].size() != 0) begin failures++; $display("FAIL: %0d flits missing on link %0d", exp_q[p].size(), p); end
    end
    checks++;
    if (nres != VEC || ndone != 1) begin failures++; $display("FAIL: results %0d done %0d", nres, ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
