// tb_output_dma: the DMA drains a FIFO model into memory rows. Checks each
// written row's address and data, that nothing is popped or written while
// the grant is withheld or the FIFO is empty, the done pulse after exactly
// COUNT rows, and one row per clock when data and grant are always there.
module tb_output_dma;
  logic clk = 0, rst_n = 0, start = 0, busy, done, empty, pop, grant = 1, we;
  logic [7:0] base = 0, waddr;
  logic [15:0] count = 0;
  logic [511:0] frdata, wdata;
  output_dma dut (.clk, .rst_n, .start_i(start), .base_i(base), .count_i(count), .busy_o(busy),
                  .done_o(done), .fifo_empty_i(empty), .fifo_rdata_i(frdata), .pop_o(pop),
                  .grant_i(grant), .we_o(we), .waddr_o(waddr), .wdata_o(wdata));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, head = 0, avail = 0, nw = 0, ndone = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  assign empty  = (avail == 0);
  assign frdata = {16{32'(head)}};
  always @(posedge clk) if (rst_n) begin
    if (we) begin
      checks++;
      if (!grant || empty || waddr != 8'(base + nw) || wdata[31:0] != 32'(head)) begin failures++; if (failures < 5) $display("FAIL g%0d e%0d a%0d/%0d d%0d/%0d", grant, empty, waddr, base+nw, wdata[31:0], head); end
      nw <= nw + 1; head <= head + 1; avail <= avail - 1;
    end
    if (done) begin
      ndone <= ndone + 1;
      checks++; if (nw != int'(count)) failures++;   // done right after the last row
    end
  end
  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    base = 8'd20; count = 16'd30; avail = 1000; start = 1; @(negedge clk); start = 0;
    t0 = $time;
    while (busy) @(negedge clk);
    checks++; if (($time - t0) / 10 > 31) failures++;
    repeat (2) @(negedge clk);
    checks++; if (nw != 30 || ndone != 1) failures++;
    base = 8'd70; count = 16'd50; nw = 0; ndone = 0; avail = 0; start = 1; @(negedge clk); start = 0;
    while (busy) begin
      grant = ($urandom_range(2) != 0);
      if ($urandom_range(2) == 0) avail = avail + 1;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++; if (nw != 50 || ndone != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
