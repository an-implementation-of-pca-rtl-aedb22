// tb_grf: writes random values to random registers and checks both the
// parallel output and the host read port against a model; checks reset to 0.
module tb_grf;
  import musra_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [6:0] waddr = 0, raddr = 0;
  word_t wdata = 0, rdata;
  word_t regs [GRF_DEPTH];
  grf dut (.clk, .rst_n, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr),
           .rdata_o(rdata), .regs_o(regs));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  word_t m [GRF_DEPTH];
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < GRF_DEPTH; i++) begin m[i] = 0; checks++; if (regs[i] != 0) failures++; end
    for (int n = 0; n < 2000; n++) begin
      we = $urandom_range(1); waddr = 7'($urandom); wdata = word_t'($urandom); raddr = 7'($urandom);
      #1; checks++; if (rdata != m[raddr]) failures++;
      @(negedge clk);
      if (we) m[waddr] = wdata;
      for (int i = 0; i < GRF_DEPTH; i++) begin checks++; if (regs[i] != m[i]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
