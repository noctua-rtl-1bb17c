// sram: synchronous memory with one write port and one read port.
// Models the Data, Weight and Output SRAMs of a PE and the banks of the data
// and weight memories. Reads have one cycle of latency (rdata is valid the
// cycle after re). The document names these memories but not their macro
// type; a 1W1R synchronous array is this design's choice.
module sram #(
  parameter int W     = 256,
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
