// tile: one node of the mesh (Fig. 2 tile inset): router, network interface
// and PE. The router's Local port connects to the NI; its North, East, South
// and West ports are the tile's mesh links, each a valid/ready flit channel.
// HAS_NL selects the heterogeneous PE variant with nonlinear units.
module tile
  import noctua_pkg::*;
#(
  parameter int X      = 0,
  parameter int Y      = 0,
  parameter bit HAS_NL = 1'b1,
  parameter int DEPTH  = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  // index 0..3 = North, East, South, West
  input  logic  in_valid  [4],
  output logic  in_ready  [4],
  input  flit_t in_flit   [4],
  output logic  out_valid [4],
  input  logic  out_ready [4],
  output flit_t out_flit  [4]
);
  localparam int NODE = Y * MESH + X;
  logic  r_iv [NPORTS], r_ir [NPORTS], r_ov [NPORTS], r_or [NPORTS];
  flit_t r_if [NPORTS], r_of [NPORTS];

  for (genvar p = 0; p < 4; p++) begin : g_link
    assign r_iv[p+1]    = in_valid[p];
    assign r_if[p+1]    = in_flit[p];
    assign in_ready[p]  = r_ir[p+1];
    assign out_valid[p] = r_ov[p+1];
    assign out_flit[p]  = r_of[p+1];
    assign r_or[p+1]    = out_ready[p];
  end

  router #(.X(X), .Y(Y)) u_router (
    .clk, .rst_n, .in_valid(r_iv), .in_ready(r_ir), .in_flit(r_if),
    .out_valid(r_ov), .out_ready(r_or), .out_flit(r_of));

  logic                     dsram_we, wsram_we, cmd_valid, cmd_ready, res_valid, res_ready;
  logic [$clog2(DEPTH)-1:0] sram_waddr;
  vec_t                     sram_wdata, res_data;
  pe_cmd_t                  cmd;
  pkt_type_e                res_kind;
  logic [1:0]               res_bank;
  logic [AW-1:0]            res_addr;

  network_interface #(.NODE(NODE), .DEPTH(DEPTH)) u_ni (
    .clk, .rst_n,
    .rx_valid(r_ov[P_LOCAL]), .rx_ready(r_or[P_LOCAL]), .rx_flit(r_of[P_LOCAL]),
    .tx_valid(r_iv[P_LOCAL]), .tx_ready(r_ir[P_LOCAL]), .tx_flit(r_if[P_LOCAL]),
    .dsram_we, .wsram_we, .sram_waddr, .sram_wdata, .cmd_valid, .cmd_ready, .cmd,
    .res_valid, .res_ready, .res_kind, .res_bank, .res_addr, .res_data);

  pe #(.NODE(NODE), .HAS_NL(HAS_NL), .DEPTH(DEPTH)) u_pe (
    .clk, .rst_n, .dsram_we, .wsram_we, .sram_waddr, .sram_wdata,
    .cmd_valid, .cmd_ready, .cmd,
    .res_valid, .res_ready, .res_kind, .res_bank, .res_addr, .res_data);
endmodule
