// tb_sram: writes random words to random addresses, keeps a software copy and
// reads them back, checking the one-cycle read latency and that a read with re
// low keeps the previous output.
module tb_sram;
  localparam int W = 64, DEPTH = 128;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  logic         known [DEPTH];
  sram #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) known[i] = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 7'($urandom); wdata = {$urandom, $urandom};
      re = 1'($urandom); raddr = 7'($urandom);
      if (re && we && raddr == waddr) re = 1'b0;
      begin
        automatic logic r = re;
        automatic logic [6:0] ra = raddr;
        automatic logic [W-1:0] prev = rdata;
        automatic logic [W-1:0] exp = shadow[ra];
        automatic logic k = known[ra];
        if (we) begin shadow[waddr] = wdata; known[waddr] = 1'b1; end
        @(negedge clk);
        we = 0; re = 0;
        if (r && k) begin checks++; if (rdata !== exp) failures++; end
        if (!r) begin checks++; if (rdata !== prev) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
