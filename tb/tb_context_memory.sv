// tb_context_memory: fills all 8 contexts of 128 words, reads every word
// back (data one clock after the read) and checks random write/read mixes.
module tb_context_memory;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  context_memory dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .re_i(re),
                      .raddr_i(raddr), .rdata_o(rdata));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] m [1024];
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      we = 1; waddr = 10'(i); wdata = $urandom; m[i] = wdata; @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 1024; i++) begin
      re = 1; raddr = 10'(1023 - i); @(negedge clk);
      checks++; if (rdata != m[1023 - i]) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      we = $urandom_range(1); waddr = 10'($urandom); wdata = $urandom;
      re = 1; raddr = 10'($urandom);
      begin
        logic [31:0] e;
        e = m[raddr];
        @(negedge clk);
        checks++; if (rdata != e) failures++;
      end
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
