// tb_weight_memory: the host fills every bank with random words; the
// controller read port must return each word one cycle after its request.
module tb_weight_memory;
  import noctua_pkg::*;
  localparam int DEPTH = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, c_re = 0, host_we = 0;
  logic [1:0] c_bank = '0, host_bank = '0;
  logic [5:0] c_addr = '0, host_addr = '0;
  vec_t rdata, host_wdata = '0;
  vec_t shadow [MESH][DEPTH];
  weight_memory #(.BANKS(MESH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < MESH; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        host_we = 1; host_bank = 2'(b); host_addr = 6'(a); host_wdata = {8{$urandom}};
        shadow[b][a] = host_wdata;
      end
    @(negedge clk); host_we = 0;
    for (int n = 0; n < 400; n++) begin
      automatic int b = int'($urandom % MESH), a = int'($urandom % DEPTH);
      @(negedge clk); c_re = 1; c_bank = 2'(b); c_addr = 6'(a);
      @(negedge clk); c_re = 0;
      checks++;
      if (rdata !== shadow[b][a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
