// tb_data_memory: full-row and masked 32-bit word writes against a model,
// read back one clock after the request, over all 256 rows.
module tb_data_memory;
  logic clk = 0, re = 0, we = 0;
  logic [7:0] raddr = 0, waddr = 0;
  logic [15:0] wmask = 0;
  logic [511:0] wdata = 0, rdata;
  data_memory dut (.clk, .re_i(re), .raddr_i(raddr), .rdata_o(rdata), .we_i(we),
                   .waddr_i(waddr), .wmask_i(wmask), .wdata_i(wdata));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [511:0] m [256];
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk);
    for (int r = 0; r < 256; r++) begin
      we = 1; waddr = 8'(r); wmask = 16'hFFFF;
      for (int w = 0; w < 16; w++) wdata[w*32 +: 32] = $urandom;
      m[r] = wdata; @(negedge clk);
    end
    for (int n = 0; n < 3000; n++) begin
      logic [511:0] e;
      we = $urandom_range(1); waddr = 8'($urandom); wmask = 16'($urandom);
      for (int w = 0; w < 16; w++) wdata[w*32 +: 32] = $urandom;
      re = 1; raddr = 8'($urandom);
      e = m[raddr];
      @(negedge clk);
      checks++; if (rdata != e) failures++;
      if (we) for (int w = 0; w < 16; w++) if (wmask[w]) m[waddr][w*32 +: 32] = wdata[w*32 +: 32];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
