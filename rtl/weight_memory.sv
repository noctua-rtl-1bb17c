// weight_memory: on-chip weight memory on the north edge of the mesh (Fig. 2),
// BANKS banks of DEPTH 256-bit words, bank b feeding the North port of the
// router in mesh column b through the controller's injection path. The host
// writes it; the central controller reads one word per request with one cycle
// of latency. Size and banking are this design's choices.
module weight_memory
  import noctua_pkg::*;
#(
  parameter int BANKS = MESH,
  parameter int DEPTH = 2560
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     c_re,
  input  logic [1:0]               c_bank,
  input  logic [$clog2(DEPTH)-1:0] c_addr,
  output vec_t                     rdata,
  input  logic                     host_we,
  input  logic [1:0]               host_bank,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  vec_t                     host_wdata
);
  vec_t       b_rd [BANKS];
  logic [1:0] rbank_q;
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sram #(.W(VW), .DEPTH(DEPTH)) u_bank (.clk,
      .we(host_we && int'(host_bank) == b), .waddr(host_addr), .wdata(host_wdata),
      .re(c_re && int'(c_bank) == b), .raddr(c_addr), .rdata(b_rd[b]));
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rbank_q <= '0;
    else        rbank_q <= c_bank;
  assign rdata = b_rd[rbank_q];
endmodule
