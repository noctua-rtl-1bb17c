// tb_router: random traffic through an interior router (X=1, Y=1) with random
// back-pressure on every output. Each flit carries a unique tag in addr. The
// checker computes, independently of the router, which output each
// destination must leave by (XY routing; memory flits go West) and verifies
// that every copy leaves by the right port with exactly the right part of
// the mask, once, and that no flit is lost. Counts multicast flits that were
// split over several ports and cycles with back-pressure.
module tb_router;
  import noctua_pkg::*;
  localparam int X = 1, Y = 1, NFLITS = 600;
  int checks = 0, failures = 0, n_split = 0, n_stall = 0, n_mem = 0;
  logic clk = 0, rst_n = 0;
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  router #(.X(X), .Y(Y)) dut (.*);
  always #5 clk = ~clk;

  logic [NODES-1:0] expect_mask [NFLITS][NPORTS];
  logic             expect_mem  [NFLITS][NPORTS];
  logic             got         [NFLITS][NPORTS];
  int sent = 0;
  logic taken [NPORTS];
  always @(posedge clk) for (int p = 0; p < NPORTS; p++) taken[p] <= in_valid[p] && in_ready[p];

  function automatic int port_of(int d);
    int dx = d % MESH, dy = d / MESH;
    if (dx != X) return (dx > X) ? P_EAST : P_WEST;
    if (dy != Y) return (dy > Y) ? P_SOUTH : P_NORTH;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // sources
  for (genvar p = 0; p < NPORTS; p++) begin : g_src
    initial begin
      in_valid[p] = 0; in_flit[p] = '0;
      wait (rst_n);
      forever begin
        @(negedge clk);
        if (in_valid[p] && !taken[p]) continue;   // hold until taken
        in_valid[p] = 0;
        if (sent < NFLITS && ($urandom % 3) != 0) begin
          automatic int id = sent++;
          automatic flit_t f = '0;
          automatic int ports = 0;
          f.addr = AW'(id);
          f.data = {8{$urandom}};
          f.ptype = PKT_DATA;
          for (int o = 0; o < NPORTS; o++) begin expect_mask[id][o] = '0; expect_mem[id][o] = 0; got[id][o] = 0; end
          if (p != P_WEST && ($urandom % 6) == 0) begin
            f.to_mem = 1; f.bank = 2'($urandom); f.ptype = PKT_RESULT;
            expect_mem[id][P_WEST] = 1;
          end else begin
            for (int d = 0; d < NODES; d++)
              if (($urandom % 4) == 0 && port_of(d) != p) f.dst[d] = 1'b1;
            if (f.dst == 0) f.dst[X + MESH * Y] = 1'b1;
            for (int d = 0; d < NODES; d++) if (f.dst[d]) expect_mask[id][port_of(d)][d] = 1'b1;
            for (int o = 0; o < NPORTS; o++) if (expect_mask[id][o] != 0) ports++;
            if (ports > 1) n_split++;
          end
          in_flit[p] = f; in_valid[p] = 1;
        end
      end
    end
  end

  // sinks
  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom % 4) != 0;

  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && !out_ready[o]) n_stall++;
      if (out_valid[o] && out_ready[o]) begin
        automatic int id = int'(out_flit[o].addr);
        checks++;
        if (id >= NFLITS || got[id][o]) begin
          failures++; $display("FAIL: unexpected or duplicate copy of %0d at port %0d", id, o);
        end else begin
          got[id][o] = 1;
          if (out_flit[o].to_mem) begin
            n_mem++;
            if (!expect_mem[id][o]) begin failures++; $display("FAIL: memory flit %0d at port %0d", id, o); end
          end else if (out_flit[o].dst != expect_mask[id][o] || expect_mask[id][o] == 0) begin
            failures++;
            $display("FAIL: flit %0d port %0d mask %h expected %h", id, o, out_flit[o].dst, expect_mask[id][o]);
          end
        end
      end
    end

  initial begin
    for (int o = 0; o < NPORTS; o++) out_ready[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent == NFLITS);
    repeat (200) @(posedge clk);
    for (int id = 0; id < NFLITS; id++)
      for (int o = 0; o < NPORTS; o++) begin
        automatic logic need = (expect_mask[id][o] != 0) || expect_mem[id][o];
        checks++;
        if (need != got[id][o]) begin failures++; $display("FAIL: flit %0d port %0d delivered=%0d", id, o, got[id][o]); end
      end
    checks++;
    if (n_split == 0 || n_stall == 0 || n_mem == 0) failures++;
    $display("split multicasts=%0d stalled cycles=%0d memory flits=%0d", n_split, n_stall, n_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
