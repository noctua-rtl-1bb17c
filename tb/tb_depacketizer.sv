// tb_depacketizer: offers random flits of every type and checks the decoded
// SRAM write strobes, address and data, the command hand-over and that a
// command flit is held back (flit_ready low) while the PE is busy.
module tb_depacketizer;
  import noctua_pkg::*;
  int checks = 0, failures = 0, n_block = 0;
  logic flit_valid, flit_ready, dsram_we, wsram_we, cmd_valid, cmd_ready;
  flit_t flit;
  logic [7:0] sram_waddr;
  vec_t sram_wdata;
  pe_cmd_t cmd;
  depacketizer #(.DEPTH(256)) dut (.*);

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic int t = int'($urandom % 3);
      flit = '0;
      flit.ptype = pkt_type_e'(t);
      flit.addr  = AW'($urandom);
      flit.data  = {8{$urandom}};
      flit_valid = 1'($urandom);
      cmd_ready  = 1'($urandom);
      #1;
      checks += 4;
      if (dsram_we !== (flit_valid && t == 0)) failures++;
      if (wsram_we !== (flit_valid && t == 1)) failures++;
      if (cmd_valid !== (flit_valid && t == 2)) failures++;
      if (flit_ready !== ((t == 2) ? cmd_ready : 1'b1)) failures++;
      if (t == 2 && !cmd_ready && flit_valid) n_block++;
      checks += 3;
      if (sram_waddr !== flit.addr[7:0]) failures++;
      if (sram_wdata !== flit.data) failures++;
      if (cmd !== pe_cmd_t'(flit.data[$bits(pe_cmd_t)-1:0])) failures++;
    end
    checks++;
    if (n_block == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
