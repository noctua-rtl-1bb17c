// tb_packetizer: streams result vectors and a completion event through the
// packetizer with random back-pressure and checks every flit header (memory
// destination, bank, type, source tile, address) and payload, their order,
// and that back-pressure never drops or repeats a flit.
module tb_packetizer;
  import noctua_pkg::*;
  localparam int NODE = 9, N = 300;
  int checks = 0, failures = 0, n_stall = 0, nsent = 0, nrecv = 0;
  logic clk = 0, rst_n = 0;
  logic pe_valid = 0, pe_ready, flit_valid, flit_ready = 0;
  pkt_type_e pe_kind = PKT_RESULT;
  logic [1:0] pe_bank = '0;
  logic [AW-1:0] pe_addr = '0;
  vec_t pe_data = '0;
  flit_t flit;
  packetizer #(.NODE(NODE)) dut (.*);
  always #5 clk = ~clk;

  function automatic vec_t pat(int i);
    return {8{32'(i * 32'h9e3779b9)}};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pe_valid && pe_ready) nsent <= nsent + 1;
    if (flit_valid && !flit_ready) n_stall++;
    if (flit_valid && flit_ready) begin
      checks++;
      if (!flit.to_mem || flit.bank != 2'(nrecv) || flit.src != 4'(NODE) || flit.addr != AW'(nrecv + 7) ||
          flit.data != pat(nrecv) || flit.ptype != ((nrecv == N - 1) ? PKT_DONE : PKT_RESULT)) begin
        failures++; $display("FAIL flit %0d", nrecv);
      end
      nrecv <= nrecv + 1;
    end
  end

  always @(negedge clk) begin
    flit_ready = ($urandom % 3) != 0;
    if (rst_n && nsent < N) begin
      pe_valid = ($urandom % 4) != 0 || pe_valid;
      pe_kind  = (nsent == N - 1) ? PKT_DONE : PKT_RESULT;
      pe_bank  = 2'(nsent);
      pe_addr  = AW'(nsent + 7);
      pe_data  = pat(nsent);
    end else pe_valid = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nrecv == N);
    repeat (10) @(posedge clk);
    checks++;
    if (nrecv != N || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
