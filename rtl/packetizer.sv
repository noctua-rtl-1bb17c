// packetizer: send side of the network interface.
// The PE offers a result vector (kind PKT_RESULT, data memory bank and row) or
// its completion event (PKT_DONE). The packetizer adds the header (memory
// destination, source tile) and holds the flit in a one-entry output register
// until the router's Local input takes it. pe_ready is high while the register
// is empty or being emptied, so one flit per cycle can pass.
// The document names the packetizer; the header layout is this design's own.
module packetizer
  import noctua_pkg::*;
#(
  parameter int NODE = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pe_valid,
  output logic          pe_ready,
  input  pkt_type_e     pe_kind,
  input  logic [1:0]    pe_bank,
  input  logic [AW-1:0] pe_addr,
  input  vec_t          pe_data,
  output logic          flit_valid,
  input  logic          flit_ready,
  output flit_t         flit
);
  assign pe_ready = !flit_valid || flit_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flit_valid <= 1'b0;
      flit       <= '0;
    end else if (pe_ready) begin
      flit_valid <= pe_valid;
      if (pe_valid) begin
        flit.dst    <= '0;
        flit.to_mem <= 1'b1;
        flit.bank   <= pe_bank;
        flit.ptype  <= pe_kind;
        flit.src    <= 4'(NODE);
        flit.addr   <= pe_addr;
        flit.data   <= pe_data;
      end
    end
  end
endmodule
