// tb_input_dma: the DMA streams COUNT rows from a memory model (one-clock
// read latency) into a FIFO model that is drained at random. Checks the row
// order and addresses, that the FIFO never overflows (room counted with the
// read in flight), that a withheld grant delays requests, busy, and that a
// full-speed transfer reaches one row per clock.
module tb_input_dma;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, req, grant = 1, push;
  logic [7:0] base = 0, raddr;
  logic [15:0] count = 0;
  logic [511:0] rdata, wdata;
  logic [3:0] fcount;
  input_dma dut (.clk, .rst_n, .start_i(start), .base_i(base), .count_i(count), .busy_o(busy),
                 .req_o(req), .grant_i(grant), .raddr_o(raddr), .rdata_i(rdata),
                 .push_o(push), .wdata_o(wdata), .fifo_count_i(fcount));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // memory model: row r holds r in every word
  always_ff @(posedge clk) if (req && grant) rdata <= {16{24'd0, raddr}};
  int q = 0, expect_row = 0, got = 0, drain = 1;
  always @(posedge clk) if (rst_n) begin
    if (push) begin
      checks++; if (wdata[7:0] != 8'(expect_row)) failures++;
      expect_row <= expect_row + 1; got <= got + 1;
    end
    q <= q + (push ? 1 : 0) - ((q > 0 && drain) ? 1 : 0);
    checks++; if (q > D) failures++;
  end
  assign fcount = 4'(q);
  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    // full speed: drain every cycle
    base = 8'd10; count = 16'd40; expect_row = 10; start = 1; @(negedge clk); start = 0;
    t0 = $time;
    while (busy) @(negedge clk);
    checks++; if (got != 40) failures++;
    checks++; if (($time - t0) / 10 > 42) failures++;
    // slow drain and withheld grants
    got = 0; base = 8'd100; count = 16'd60; expect_row = 100; start = 1; @(negedge clk); start = 0;
    while (busy) begin
      drain = ($urandom_range(3) == 0);
      grant = ($urandom_range(3) != 0);
      @(negedge clk);
    end
    grant = 1; drain = 1;
    checks++; if (got != 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
