// network_interface: the NI of a tile, a depacketizer for flits arriving from
// the router and a packetizer for results leaving the PE (Fig. 2 tile inset).
// See depacketizer.sv and packetizer.sv for the timing of each direction.
module network_interface
  import noctua_pkg::*;
#(
  parameter int NODE  = 0,
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // router Local port
  input  logic                     rx_valid,
  output logic                     rx_ready,
  input  flit_t                    rx_flit,
  output logic                     tx_valid,
  input  logic                     tx_ready,
  output flit_t                    tx_flit,
  // PE side
  output logic                     dsram_we,
  output logic                     wsram_we,
  output logic [$clog2(DEPTH)-1:0] sram_waddr,
  output vec_t                     sram_wdata,
  output logic                     cmd_valid,
  input  logic                     cmd_ready,
  output pe_cmd_t                  cmd,
  input  logic                     res_valid,
  output logic                     res_ready,
  input  pkt_type_e                res_kind,
  input  logic [1:0]               res_bank,
  input  logic [AW-1:0]            res_addr,
  input  vec_t                     res_data
);
  depacketizer #(.DEPTH(DEPTH)) u_depkt (
    .flit_valid(rx_valid), .flit_ready(rx_ready), .flit(rx_flit),
    .dsram_we, .wsram_we, .sram_waddr, .sram_wdata,
    .cmd_valid, .cmd_ready, .cmd);

  packetizer #(.NODE(NODE)) u_pkt (
    .clk, .rst_n,
    .pe_valid(res_valid), .pe_ready(res_ready), .pe_kind(res_kind),
    .pe_bank(res_bank), .pe_addr(res_addr), .pe_data(res_data),
    .flit_valid(tx_valid), .flit_ready(tx_ready), .flit(tx_flit));
endmodule
