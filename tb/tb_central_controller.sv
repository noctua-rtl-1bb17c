// tb_central_controller: the controller against behavioural memories and
// PEs. Memory words encode their own bank and address, so every injected
// flit shows where its payload came from. The PE model answers each command
// with a PKT_DONE event a random time later. For several operations the test
// builds the expected set of flits on its own (one multicast per distinct
// A block and W block of each round, one command per tile, destination masks,
// ports and result addresses) and requires the controller to inject exactly
// that set, with random back-pressure, and never to start a round before all
// PEs of the previous round are done. A K of 600 checks the split into
// chunks of 256 with the acc_first / acc_last flags.
module tb_central_controller;
  import noctua_pkg::*;
  int checks = 0, failures = 0, n_multi = 0, n_rounds_seen = 0;
  logic clk = 0, rst_n = 0, cmd_valid = 0, busy;
  cmd_t cmd = '0;
  logic d_re, w_re, inj_valid, inj_ready = 0, inj_west;
  logic [1:0] d_bank, w_bank, inj_idx;
  logic [11:0] d_addr, w_addr;
  vec_t d_rdata, w_rdata;
  flit_t inj_flit;
  logic done_valid [MESH];
  central_controller dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (d_re) d_rdata <= VW'({8'hD0, 6'(d_bank), 16'(d_addr)});
    if (w_re) w_rdata <= VW'({8'hE0, 6'(w_bank), 16'(w_addr)});
  end

  // expected flits, keyed by a description string, with multiplicity
  int expected [string];
  int outstanding = 0;      // commands without done yet
  int pending_done [$];     // countdowns of PE answers

  function automatic string key(bit west, int idx, pkt_type_e t, logic [NODES-1:0] dst, int addr, vec_t data);
    return $sformatf("%0d/%0d/%0d/%h/%0d/%h", west, idx, t, dst, addr, data[63:0]);
  endfunction

  always @(negedge clk) inj_ready = ($urandom % 3) != 0;

  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < MESH; b++) done_valid[b] <= 1'b0;
    foreach (pending_done[i]) pending_done[i]--;
    if (pending_done.size() > 0 && pending_done[0] <= 0) begin
      void'(pending_done.pop_front());
      done_valid[$urandom % MESH] <= 1'b1;
      outstanding--;
    end
    if (inj_valid && inj_ready) begin
      automatic string k;
      automatic vec_t d = inj_flit.data;
      if (inj_flit.ptype == PKT_CMD) d = inj_flit.data;
      k = key(inj_west, inj_idx, inj_flit.ptype, inj_flit.dst, int'(inj_flit.addr), d);
      checks++;
      if (!expected.exists(k) || expected[k] == 0) begin
        failures++;
        if (failures < 10) $display("FAIL unexpected flit %s", k);
      end else expected[k]--;
      if ($countones(inj_flit.dst) > 1) n_multi++;
      if (inj_flit.ptype == PKT_CMD) begin
        outstanding++;
        pending_done.push_back(20 + int'($urandom % 40));
      end else if (outstanding != 0 && pending_done.size() == 0) begin
        ; // data of a new round may not overlap running PEs of the last round
      end
      if (inj_flit.ptype != PKT_CMD && outstanding != 0) begin
        failures++; $display("FAIL: data sent while %0d PEs still run", outstanding);
      end
    end
  end

  task automatic expect_flit(bit west, int idx, pkt_type_e t, logic [NODES-1:0] dst, int addr, vec_t data);
    string k = key(west, idx, t, dst, addr, data);
    if (!expected.exists(k)) expected[k] = 0;
    expected[k]++;
  endtask

  task automatic run(cmd_t c);
    int slots = (c.op == OP_MATMUL) ? NODES : MESH;
    int total = (c.op == OP_MATMUL) ? c.m_tiles * c.n_tiles : c.m_tiles;
    int L = int'(c.k_len);
    int KC = 256;
    for (int r0 = 0; r0 < total; r0 += slots)
    for (int koff = 0; koff < L; koff += (c.op == OP_MATMUL) ? KC : L) begin
      int cl = (c.op != OP_MATMUL || L - koff <= KC) ? L - koff : KC;
      int node [NODES], mi [NODES], nj [NODES], n = 0;
      for (int s = 0; s < slots && r0 + s < total; s++) begin
        node[n] = (c.op == OP_MATMUL) ? s : s * MESH;
        mi[n] = (c.op == OP_MATMUL) ? (r0 + s) / c.n_tiles : r0 + s;
        nj[n] = (c.op == OP_MATMUL) ? (r0 + s) % c.n_tiles : 0;
        n++;
      end
      // A blocks, one per distinct mi
      for (int a = 0; a < n; a++) begin
        logic [NODES-1:0] m = '0;
        bit first = 1;
        for (int b = 0; b < n; b++) if (mi[b] == mi[a]) begin m[node[b]] = 1; if (b < a) first = 0; end
        if (first) for (int k = 0; k < cl; k++)
          expect_flit(1, c.a_bank, PKT_DATA, m, k, VW'({8'hD0, 6'(c.a_bank), 16'(c.a_base + mi[a] * L + koff + k)}));
      end
      // W blocks
      if (c.op == OP_MATMUL) begin
        for (int a = 0; a < n; a++) begin
          logic [NODES-1:0] m = '0;
          bit first = 1;
          for (int b = 0; b < n; b++) if (nj[b] == nj[a]) begin m[node[b]] = 1; if (b < a) first = 0; end
          if (first) for (int k = 0; k < cl; k++)
            expect_flit(0, c.w_bank, PKT_WEIGHT, m, k, VW'({8'hE0, 6'(c.w_bank), 16'(c.w_base + nj[a] * L + koff + k)}));
        end
      end else if (c.op == OP_LAYERNORM) begin
        logic [NODES-1:0] m = '0;
        for (int b = 0; b < n; b++) m[node[b]] = 1;
        for (int k = 0; k < L; k++)
          expect_flit(0, c.w_bank, PKT_WEIGHT, m, k, VW'({8'hE0, 6'(c.w_bank), 16'(c.w_base + k)}));
      end
      for (int a = 0; a < n; a++) begin
        pe_cmd_t pc = '0;
        pc.op = c.op; pc.post = c.post; pc.shift = c.shift; pc.len = AW'(cl); pc.out_bank = c.o_bank;
        pc.acc_first = (koff == 0); pc.acc_last = (koff + cl == L);
        pc.ln_recip = c.ln_recip; pc.ln_eps = c.ln_eps;
        pc.out_addr = (c.op == OP_MATMUL) ? AW'(c.o_base + mi[a] * c.n_tiles * VEC + nj[a] * VEC)
                                          : AW'(c.o_base + mi[a] * L);
        expect_flit(1, c.a_bank, PKT_CMD, NODES'(1) << node[a], 0, VW'(pc));
      end
    end
    @(negedge clk); cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    begin
      automatic int left = 0;
      foreach (expected[s]) left += expected[s];
      if (left != 0) begin failures++; $display("FAIL: %0d expected flits never sent", left); end
    end
    checks++;
    if (outstanding != 0) failures++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    cmd_t c;
    for (int b = 0; b < MESH; b++) done_valid[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c = '0; c.op = OP_MATMUL; c.a_bank = 2; c.a_base = 16'd10; c.w_bank = 1; c.w_base = 16'd3;
    c.o_bank = 3; c.o_base = 16'd500; c.m_tiles = 2; c.n_tiles = 3; c.k_len = 16'd8; c.shift = 5'd7;
    run(c);
    c.m_tiles = 4; c.n_tiles = 5; c.k_len = 16'd4; c.post = POST_GELU;
    run(c);
    c.m_tiles = 1; c.n_tiles = 16;
    run(c);
    c.m_tiles = 2; c.n_tiles = 1; c.k_len = 16'd600;    // three K chunks: 256 + 256 + 88
    run(c);
    c = '0; c.op = OP_SOFTMAX; c.a_bank = 1; c.a_base = 16'd7; c.o_bank = 0; c.o_base = 16'd900;
    c.m_tiles = 6; c.k_len = 16'd5;
    run(c);
    c.op = OP_LAYERNORM; c.w_bank = 3; c.w_base = 16'd40; c.m_tiles = 3; c.ln_recip = 16'h3e4d; c.ln_eps = 16'h3a83;
    run(c);
    checks++;
    if (n_multi == 0) failures++;
    $display("multicast flits %0d", n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
