// tb_data_memory: host writes and reads every bank, result flits from the
// NoC are written into the bank of the port they arrive on, a host write to
// the same bank holds the NoC flit back for a cycle, PKT_DONE flits raise
// done_valid with their source, and the controller read port returns data
// one cycle after the request.
module tb_data_memory;
  import noctua_pkg::*;
  localparam int DEPTH = 64;
  int checks = 0, failures = 0, n_block = 0, n_done = 0;
  logic clk = 0, rst_n = 0;
  logic rx_valid [MESH], rx_ready [MESH], done_valid [MESH];
  flit_t rx_flit [MESH];
  logic [3:0] done_src [MESH];
  logic c_re = 0, host_we = 0, host_re = 0;
  logic [1:0] c_bank = '0, host_bank = '0;
  logic [5:0] c_addr = '0, host_addr = '0;
  vec_t host_wdata = '0, rdata;
  vec_t shadow [MESH][DEPTH];
  data_memory #(.BANKS(MESH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n)
    for (int b = 0; b < MESH; b++) begin
      if (rx_valid[b] && !rx_ready[b]) n_block++;
      if (done_valid[b]) begin
        n_done++; checks++;
        if (done_src[b] != 4'(b + 4)) failures++;
      end
    end

  task automatic rd(bit host, int b, int a, output vec_t v);
    @(negedge clk);
    if (host) begin host_re = 1; host_bank = 2'(b); host_addr = 6'(a); end
    else begin c_re = 1; c_bank = 2'(b); c_addr = 6'(a); end
    @(negedge clk);
    host_re = 0; c_re = 0;
    v = rdata;
  endtask

  initial begin
    for (int b = 0; b < MESH; b++) begin rx_valid[b] = 0; rx_flit[b] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < MESH; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        host_we = 1; host_bank = 2'(b); host_addr = 6'(a); host_wdata = {8{$urandom}};
        shadow[b][a] = host_wdata;
      end
    @(negedge clk); host_we = 0;
    // NoC writes on all four ports, with a host write colliding on bank 1
    @(negedge clk);
    for (int b = 0; b < MESH; b++) begin
      rx_valid[b] = 1; rx_flit[b] = '0; rx_flit[b].ptype = PKT_RESULT; rx_flit[b].to_mem = 1;
      rx_flit[b].bank = 2'(b); rx_flit[b].addr = AW'(5 + b); rx_flit[b].data = {8{32'(b + 77)}};
      shadow[b][5 + b] = rx_flit[b].data;
    end
    host_we = 1; host_bank = 2'd1; host_addr = 6'd40; host_wdata = '1; shadow[1][40] = '1;
    @(negedge clk);
    host_we = 0;
    for (int b = 0; b < MESH; b++) if (b != 1) rx_valid[b] = 0;
    @(negedge clk);
    rx_valid[1] = 0;
    // completion events
    for (int b = 0; b < MESH; b++) begin
      rx_valid[b] = 1; rx_flit[b] = '0; rx_flit[b].ptype = PKT_DONE; rx_flit[b].src = 4'(b + 4);
      rx_flit[b].addr = AW'(9);
    end
    @(negedge clk);
    for (int b = 0; b < MESH; b++) rx_valid[b] = 0;
    for (int b = 0; b < MESH; b++)
      for (int a = 0; a < DEPTH; a++) begin
        vec_t v;
        rd((a % 2) == 0, b, a, v);
        checks++;
        if (v !== shadow[b][a]) begin failures++; $display("FAIL bank %0d addr %0d", b, a); end
      end
    checks++;
    if (n_block != 1 || n_done != 4) begin failures++; $display("FAIL block=%0d done=%0d", n_block, n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
