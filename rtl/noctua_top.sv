// noctua_top: the NOCTUA accelerator (Fig. 2). A central controller, a data
// memory on the west edge and a weight memory on the north edge of a 4x4 mesh
// of tiles; each tile holds a router, a network interface and a PE. The PEs of
// the leftmost column (x = 0), next to the data memory, carry the softmax,
// layer normalisation and GELU units; the others only the systolic array and
// GELU (this design keeps the element-wise GELU in every PE's result path).
//
// The host loads the memories through the host_d_* / host_w_* ports, then
// gives one cmd_t on host_cmd (one cycle with host_cmd_valid while
// host_busy is low) and waits until host_busy falls; results are read back
// through host_d_re / host_d_rdata (one cycle of latency). The host must not
// access the memories while host_busy is high.
// Mesh links are valid/ready flit channels; flits enter the mesh at the West
// ports of column 0 (from data memory) and the North ports of row 0 (from
// weight memory) and leave only at the West ports of column 0, toward the
// data memory. The outer North/East/South outputs are never used by the
// routing; their ready inputs are tied high.
module noctua_top
  import noctua_pkg::*;
#(
  parameter int DDEPTH = 2560,   // words per data memory bank
  parameter int WDEPTH = 2560,   // words per weight memory bank
  parameter int PDEPTH = 256     // words per PE SRAM
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      host_cmd_valid,
  input  cmd_t                      host_cmd,
  output logic                      host_busy,
  input  logic                      host_d_we,
  input  logic                      host_d_re,
  input  logic [1:0]                host_d_bank,
  input  logic [$clog2(DDEPTH)-1:0] host_d_addr,
  input  vec_t                      host_d_wdata,
  output vec_t                      host_d_rdata,
  input  logic                      host_w_we,
  input  logic [1:0]                host_w_bank,
  input  logic [$clog2(WDEPTH)-1:0] host_w_addr,
  input  vec_t                      host_w_wdata
);
  // link bundles per tile, index 0..3 = North, East, South, West
  logic  t_iv [MESH][MESH][4];
  logic  t_ir [MESH][MESH][4];
  flit_t t_if [MESH][MESH][4];
  logic  t_ov [MESH][MESH][4];
  logic  t_or [MESH][MESH][4];
  flit_t t_of [MESH][MESH][4];

  // controller
  logic                      d_re, w_re, inj_valid, inj_ready, inj_west;
  logic [1:0]                d_bank, w_bank, inj_idx;
  logic [$clog2(DDEPTH)-1:0] d_addr;
  logic [$clog2(WDEPTH)-1:0] w_addr;
  vec_t                      d_rdata, w_rdata;
  flit_t                     inj_flit;
  logic                      done_valid [MESH];
  logic [3:0]                done_src   [MESH];

  central_controller #(.DDEPTH(DDEPTH), .WDEPTH(WDEPTH), .KCHUNK(PDEPTH)) u_ctrl (
    .clk, .rst_n, .cmd_valid(host_cmd_valid), .cmd(host_cmd), .busy(host_busy),
    .d_re, .d_bank, .d_addr, .d_rdata, .w_re, .w_bank, .w_addr, .w_rdata,
    .inj_valid, .inj_ready, .inj_flit, .inj_west, .inj_idx, .done_valid);

  // memories
  logic  dm_rx_valid [MESH];
  logic  dm_rx_ready [MESH];
  flit_t dm_rx_flit  [MESH];

  data_memory #(.DEPTH(DDEPTH)) u_dmem (
    .clk, .rst_n, .rx_valid(dm_rx_valid), .rx_ready(dm_rx_ready), .rx_flit(dm_rx_flit),
    .done_valid, .done_src,
    .c_re(d_re), .c_bank(d_bank), .c_addr(d_addr),
    .host_we(host_d_we), .host_re(host_d_re), .host_bank(host_d_bank), .host_addr(host_d_addr),
    .host_wdata(host_d_wdata), .rdata(d_rdata));
  assign host_d_rdata = d_rdata;

  weight_memory #(.DEPTH(WDEPTH)) u_wmem (
    .clk, .rst_n, .c_re(w_re), .c_bank(w_bank), .c_addr(w_addr), .rdata(w_rdata),
    .host_we(host_w_we), .host_bank(host_w_bank), .host_addr(host_w_addr), .host_wdata(host_w_wdata));

  assign inj_ready = inj_west ? t_ir[inj_idx][0][3] : t_ir[0][inj_idx][0];

  // mesh
  for (genvar y = 0; y < MESH; y++) begin : g_row
    for (genvar x = 0; x < MESH; x++) begin : g_col
      // North input
      if (y > 0) begin : g_n
        assign t_iv[y][x][0] = t_ov[y-1][x][2];
        assign t_if[y][x][0] = t_of[y-1][x][2];
        assign t_or[y][x][0] = t_ir[y-1][x][2];
      end else begin : g_n_edge
        assign t_iv[y][x][0] = inj_valid && !inj_west && int'(inj_idx) == x;
        assign t_if[y][x][0] = inj_flit;
        assign t_or[y][x][0] = 1'b1;
      end
      // South input
      if (y < MESH - 1) begin : g_s
        assign t_iv[y][x][2] = t_ov[y+1][x][0];
        assign t_if[y][x][2] = t_of[y+1][x][0];
        assign t_or[y][x][2] = t_ir[y+1][x][0];
      end else begin : g_s_edge
        assign t_iv[y][x][2] = 1'b0;
        assign t_if[y][x][2] = '0;
        assign t_or[y][x][2] = 1'b1;
      end
      // East input
      if (x < MESH - 1) begin : g_e
        assign t_iv[y][x][1] = t_ov[y][x+1][3];
        assign t_if[y][x][1] = t_of[y][x+1][3];
        assign t_or[y][x][1] = t_ir[y][x+1][3];
      end else begin : g_e_edge
        assign t_iv[y][x][1] = 1'b0;
        assign t_if[y][x][1] = '0;
        assign t_or[y][x][1] = 1'b1;
      end
      // West input
      if (x > 0) begin : g_w
        assign t_iv[y][x][3] = t_ov[y][x-1][1];
        assign t_if[y][x][3] = t_of[y][x-1][1];
        assign t_or[y][x][3] = t_ir[y][x-1][1];
      end else begin : g_w_edge
        assign t_iv[y][x][3] = inj_valid && inj_west && int'(inj_idx) == y;
        assign t_if[y][x][3] = inj_flit;
        assign dm_rx_valid[y] = t_ov[y][x][3];
        assign dm_rx_flit[y]  = t_of[y][x][3];
        assign t_or[y][x][3]  = dm_rx_ready[y];
      end

      tile #(.X(x), .Y(y), .HAS_NL(x == 0), .DEPTH(PDEPTH)) u_tile (
        .clk, .rst_n,
        .in_valid(t_iv[y][x]), .in_ready(t_ir[y][x]), .in_flit(t_if[y][x]),
        .out_valid(t_ov[y][x]), .out_ready(t_or[y][x]), .out_flit(t_of[y][x]));
    end
  end

  // flits never leave the mesh at the outer North, East or South edges
  for (genvar i = 0; i < MESH; i++) begin : g_edge_chk
    a_no_north: assert property (@(posedge clk) disable iff (!rst_n) !t_ov[0][i][0]);
    a_no_south: assert property (@(posedge clk) disable iff (!rst_n) !t_ov[MESH-1][i][2]);
    a_no_east:  assert property (@(posedge clk) disable iff (!rst_n) !t_ov[i][MESH-1][1]);
  end
endmodule
