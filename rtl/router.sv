// router: five-port mesh router with XY routing and multicast replication.
//
// Ports are Local, North, East, South, West (noctua_pkg P_*). Each input has a
// FIFO_DEPTH-entry buffer. A flit to tiles carries a 16-bit destination mask:
// the router splits the mask by XY routing (X first, then Y) and sends each
// output port only the destinations reached through it, so one injected flit
// reaches any set of tiles along a tree and is copied only where paths part.
// A flit to a data memory bank (to_mem) goes West to column 0, then North or
// South to the bank's row, and leaves through the West port of that router.
// Each output has a round-robin arbiter. An input may win its outputs in
// different cycles; it remembers which copies have left and frees its buffer
// when the last one has. Links use valid/ready; a transfer happens when both
// are high. Latency is one cycle per hop plus queueing.
// Multicast in the NoC follows the document; the mask format, XY routing,
// buffering and arbitration are this design's choices.
module router
  import noctua_pkg::*;
#(
  parameter int X          = 0,
  parameter int Y          = 0,
  parameter int FIFO_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  output logic  in_ready  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS],
  output flit_t out_flit  [NPORTS]
);
  logic  hv [NPORTS];
  flit_t hf [NPORTS];
  logic  pop [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_flit[i]),
      .out_valid(hv[i]), .out_ready(pop[i]), .out_data(hf[i]));
  end

  // destinations of a flit split by output port
  typedef logic [NODES-1:0] mask_t;
  mask_t sub [NPORTS][NPORTS];     // [input][output]
  logic  want [NPORTS][NPORTS];    // input wants output (not yet served)
  logic  served [NPORTS][NPORTS];  // copy already sent in an earlier cycle

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      for (int o = 0; o < NPORTS; o++) sub[i][o] = '0;
      if (hf[i].to_mem) begin
        if (X > 0)                         sub[i][P_WEST]  = '1;
        else if (int'(hf[i].bank) < Y)     sub[i][P_NORTH] = '1;
        else if (int'(hf[i].bank) > Y)     sub[i][P_SOUTH] = '1;
        else                               sub[i][P_WEST]  = '1;
      end else begin
        for (int d = 0; d < NODES; d++) begin
          if (hf[i].dst[d]) begin
            if ((d % MESH) > X)       sub[i][P_EAST][d]  = 1'b1;
            else if ((d % MESH) < X)  sub[i][P_WEST][d]  = 1'b1;
            else if ((d / MESH) < Y)  sub[i][P_NORTH][d] = 1'b1;
            else if ((d / MESH) > Y)  sub[i][P_SOUTH][d] = 1'b1;
            else                      sub[i][P_LOCAL][d] = 1'b1;
          end
        end
      end
      for (int o = 0; o < NPORTS; o++)
        want[i][o] = hv[i] && (sub[i][o] != '0) && !served[i][o];
    end
  end

  // round-robin arbitration per output
  logic [$clog2(NPORTS)-1:0] rr [NPORTS];
  logic [$clog2(NPORTS)-1:0] gnt [NPORTS];
  logic                      fire [NPORTS];

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      automatic int k;
      automatic logic found = 1'b0;
      gnt[o] = '0;
      for (int n = 0; n < NPORTS; n++) begin
        k = (int'(rr[o]) + n) % NPORTS;
        if (!found && want[k][o]) begin
          found  = 1'b1;
          gnt[o] = ($clog2(NPORTS))'(k);
        end
      end
      out_valid[o] = found;
      out_flit[o]  = hf[gnt[o]];
      if (!hf[gnt[o]].to_mem) out_flit[o].dst = sub[gnt[o]][o];
    end
  end

  always_comb
    for (int o = 0; o < NPORTS; o++) fire[o] = out_valid[o] && out_ready[o];

  // an input is released when every wanted output has been served
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      automatic logic left = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (want[i][o] && !(fire[o] && int'(gnt[o]) == i)) left = 1'b1;
      pop[i] = hv[i] && !left;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) rr[o] <= '0;
      for (int i = 0; i < NPORTS; i++)
        for (int o = 0; o < NPORTS; o++) served[i][o] <= 1'b0;
    end else begin
      for (int o = 0; o < NPORTS; o++)
        if (fire[o]) rr[o] <= (int'(gnt[o]) == NPORTS-1) ? '0 : gnt[o] + 1'b1;
      for (int i = 0; i < NPORTS; i++)
        for (int o = 0; o < NPORTS; o++) begin
          if (pop[i])                                served[i][o] <= 1'b0;
          else if (fire[o] && int'(gnt[o]) == i)     served[i][o] <= 1'b1;
        end
    end
  end

  // a flit must never need to turn back to the port it came from
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    if (i != P_LOCAL && !(i == P_WEST && X == 0)) begin : g_a
      a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
        hv[i] |-> (sub[i][i] == '0));
    end
  end
endmodule
