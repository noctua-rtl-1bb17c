// depacketizer: receive side of the network interface.
// Takes flits from the router's Local output and turns them into PE actions:
// PKT_DATA writes the payload into the Data SRAM row given by addr, PKT_WEIGHT
// into the Weight SRAM, and PKT_CMD hands the command in the payload to the PE
// controller. SRAM writes are accepted every cycle; a command is accepted only
// when the PE controller raises cmd_ready (it is idle), which back-pressures
// the NoC. Zero latency: the write strobes are combinational from the flit.
// The document names the depacketizer; the packet types are this design's own.
module depacketizer
  import noctua_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic                     flit_valid,
  output logic                     flit_ready,
  input  flit_t                    flit,
  output logic                     dsram_we,
  output logic                     wsram_we,
  output logic [$clog2(DEPTH)-1:0] sram_waddr,
  output vec_t                     sram_wdata,
  output logic                     cmd_valid,
  input  logic                     cmd_ready,
  output pe_cmd_t                  cmd
);
  always_comb begin
    sram_waddr = flit.addr[$clog2(DEPTH)-1:0];
    sram_wdata = flit.data;
    cmd        = pe_cmd_t'(flit.data[$bits(pe_cmd_t)-1:0]);
    dsram_we   = flit_valid && flit.ptype == PKT_DATA;
    wsram_we   = flit_valid && flit.ptype == PKT_WEIGHT;
    cmd_valid  = flit_valid && flit.ptype == PKT_CMD;
    flit_ready = (flit.ptype == PKT_CMD) ? cmd_ready : 1'b1;
  end
endmodule
