// data_memory: on-chip activation memory on the west edge of the mesh (Fig. 2),
// BANKS banks of DEPTH 256-bit words, bank b wired to the West port of the
// router in mesh row b. Each bank has one write and one read port.
//  - NoC side: a PKT_RESULT flit arriving from row b is written into bank b at
//    its addr; a PKT_DONE flit raises done_valid[b] with its source tile for the
//    central controller. NoC writes yield to host writes to the same bank.
//  - Read side: one shared read request (bank, addr) from the controller or,
//    when host_re is high, from the host; data is returned one cycle later.
//  - Host side: a write port for loading inputs.
// The memory and its position follow the document; its size, banking and
// ports are this design's choices: 320 KB here, which with the 320 KB weight
// memory and 16 x 24 KB of PE SRAM makes 1024 KB on chip.
module data_memory
  import noctua_pkg::*;
#(
  parameter int BANKS = MESH,
  parameter int DEPTH = 2560
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // NoC receive, one per bank
  input  logic                     rx_valid [BANKS],
  output logic                     rx_ready [BANKS],
  input  flit_t                    rx_flit  [BANKS],
  output logic                     done_valid [BANKS],
  output logic [3:0]               done_src   [BANKS],
  // controller read port
  input  logic                     c_re,
  input  logic [1:0]               c_bank,
  input  logic [$clog2(DEPTH)-1:0] c_addr,
  // host ports
  input  logic                     host_we,
  input  logic                     host_re,
  input  logic [1:0]               host_bank,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  vec_t                     host_wdata,
  output vec_t                     rdata
);
  localparam int DA = $clog2(DEPTH);
  vec_t       b_rd [BANKS];
  logic [1:0] rbank_q;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic          we, re;
    logic [DA-1:0] wa, ra;
    vec_t          wd;
    wire host_here = host_we && int'(host_bank) == b;
    wire noc_wr    = rx_valid[b] && rx_flit[b].ptype == PKT_RESULT;
    assign rx_ready[b]   = !host_here;
    assign we            = host_here || noc_wr;
    assign wa            = host_here ? host_addr : rx_flit[b].addr[DA-1:0];
    assign wd            = host_here ? host_wdata : rx_flit[b].data;
    assign re            = host_re ? int'(host_bank) == b : (c_re && int'(c_bank) == b);
    assign ra            = host_re ? host_addr : c_addr;
    assign done_valid[b] = rx_valid[b] && rx_ready[b] && rx_flit[b].ptype == PKT_DONE;
    assign done_src[b]   = rx_flit[b].src;
    sram #(.W(VW), .DEPTH(DEPTH)) u_bank (.clk, .we,
      .waddr(wa), .wdata(wd), .re, .raddr(ra), .rdata(b_rd[b]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rbank_q <= '0;
    else        rbank_q <= host_re ? host_bank : c_bank;

  assign rdata = b_rd[rbank_q];
endmodule
