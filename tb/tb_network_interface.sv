// tb_network_interface: drives the NI from both sides at once: flits from the
// router become SRAM writes and commands, result requests from the PE become
// flits toward the data memory. Checks both directions and their counts.
module tb_network_interface;
  import noctua_pkg::*;
  localparam int NODE = 6;
  int checks = 0, failures = 0, nres = 0, nwr = 0, ncmd = 0;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 1;
  flit_t rx_flit = '0, tx_flit;
  logic dsram_we, wsram_we, cmd_valid, cmd_ready = 0, res_valid = 0, res_ready;
  logic [7:0] sram_waddr;
  vec_t sram_wdata, res_data = '0;
  pe_cmd_t cmd;
  pkt_type_e res_kind = PKT_RESULT;
  logic [1:0] res_bank = 2'd2;
  logic [AW-1:0] res_addr = '0;
  network_interface #(.NODE(NODE), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dsram_we || wsram_we) begin
      nwr++; checks++;
      if (sram_waddr != rx_flit.addr[7:0] || sram_wdata != rx_flit.data) failures++;
      checks++;
      if (dsram_we != (rx_flit.ptype == PKT_DATA) || wsram_we != (rx_flit.ptype == PKT_WEIGHT)) failures++;
    end
    if (cmd_valid && cmd_ready) begin
      ncmd++; checks++;
      if (cmd.len != rx_flit.addr) failures++;
    end
    if (tx_valid && tx_ready) begin
      checks++;
      if (tx_flit.src != 4'(NODE) || !tx_flit.to_mem || tx_flit.bank != 2'd2 ||
          tx_flit.addr != AW'(nres) || tx_flit.data != {8{32'(nres)}}) failures++;
      nres++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        rx_flit = '0;
        rx_flit.ptype = pkt_type_e'(n % 3);
        rx_flit.addr = AW'(n);
        rx_flit.data = {8{$urandom}};
        if (n % 3 == 2) begin
          automatic pe_cmd_t pc = '0;
          pc.len = AW'(n);
          rx_flit.data = VW'(pc);
        end
        rx_valid = 1;
        cmd_ready = 1'($urandom);
        @(posedge clk);
        while (!rx_ready) begin @(negedge clk); cmd_ready = 1'($urandom); @(posedge clk); end
        @(negedge clk); rx_valid = 0;
      end
      for (int n = 0; n < 50; n++) begin
        @(negedge clk);
        res_valid = 1; res_addr = AW'(n); res_data = {8{32'(n)}};
        @(posedge clk);
        while (!res_ready) @(posedge clk);
        @(negedge clk); res_valid = 0;
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (nwr != 67 || ncmd != 33 || nres != 50) begin
      failures++; $display("FAIL counts wr=%0d cmd=%0d res=%0d", nwr, ncmd, nres);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
