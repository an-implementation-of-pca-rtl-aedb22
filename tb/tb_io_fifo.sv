// tb_io_fifo: random push/pop against a queue model at the default size
// (512 bits, 8 entries); checks data order, empty/full/count, simultaneous
// push and pop when full, and that full and empty are both reached.
module tb_io_fifo;
  localparam int W = 512, D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [3:0] count;
  io_fifo dut (.clk, .rst_n, .push_i(push), .wdata_i(wdata), .pop_i(pop),
               .rdata_o(rdata), .empty_o(empty), .full_o(full), .count_o(count));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_full = 0, n_both_full = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [W-1:0] q [$];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int bias;
      bias = (n / 500) % 2;   // phases that favour filling or draining
      push = ($urandom_range(3) < (bias ? 3 : 1)) && (!full || 1);
      pop  = ($urandom_range(3) < (bias ? 1 : 3)) && !empty;
      if (full && !pop) push = 0;
      if (full && push && pop) n_both_full++;
      for (int i = 0; i < W/32; i++) wdata[i*32 +: 32] = $urandom;
      checks++;
      if (!empty && rdata !== q[0]) failures++;
      checks++;
      if (count != 4'(q.size()) || empty != (q.size() == 0) || full != (q.size() == D)) failures++;
      if (full) n_full++;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++; if (n_full == 0 || n_both_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
