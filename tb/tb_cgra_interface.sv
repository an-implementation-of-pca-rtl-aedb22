// tb_cgra_interface: address decoding of the host bus. Checks the start and
// preload pulses with their context number, GRF/context-memory/data-memory write strobes
// with their addresses, data and word masks, one-clock read returns of
// STATUS, GRF and data-memory words, and the sticky done interrupt.
module tb_cgra_interface;
  import musra_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, re = 0, rvalid, irq, start, preload, busy = 0, done = 0;
  logic [15:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [2:0] ctx;
  logic grf_we, cm_we, dm_re, dm_we;
  logic [6:0] grf_addr;
  word_t grf_wdata, grf_rdata;
  logic [9:0] cm_waddr;
  logic [31:0] cm_wdata;
  logic [7:0] dm_addr;
  logic [15:0] dm_wmask;
  logic [511:0] dm_wdata, dm_rdata;
  cgra_interface dut (.clk, .rst_n, .addr_i(addr), .wdata_i(wdata), .we_i(we), .re_i(re),
    .rdata_o(rdata), .rvalid_o(rvalid), .irq_o(irq), .start_o(start), .preload_o(preload), .ctx_o(ctx), .busy_i(busy),
    .done_i(done), .grf_we_o(grf_we), .grf_addr_o(grf_addr), .grf_wdata_o(grf_wdata),
    .grf_rdata_i(grf_rdata), .cm_we_o(cm_we), .cm_waddr_o(cm_waddr), .cm_wdata_o(cm_wdata),
    .dm_re_o(dm_re), .dm_we_o(dm_we), .dm_addr_o(dm_addr), .dm_wmask_o(dm_wmask),
    .dm_wdata_o(dm_wdata), .dm_rdata_i(dm_rdata));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  // simple models behind the interface
  word_t g [128];
  always_ff @(posedge clk) if (grf_we) g[grf_addr] <= grf_wdata;
  assign grf_rdata = g[grf_addr];
  logic [511:0] dmrow;
  always_ff @(posedge clk) if (dm_re) dm_rdata <= {16{8'hA5, dm_addr, 16'(dm_addr) * 16'd3}};
  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 128; i++) g[i] = 0;
    // start
    addr = 16'h0000; wdata = 32'h0501; we = 1; #1;
    check(start && !preload && ctx == 3'd5, "start with context 5");
    @(negedge clk); we = 0; #1; check(!start, "start is a pulse");
    addr = 16'h0000; wdata = 32'h0302; we = 1; #1;
    check(preload && !start && ctx == 3'd3, "preload of context 3");
    @(negedge clk); we = 0; #1; check(!preload, "preload is a pulse");
    // GRF write and read back
    for (int i = 0; i < 20; i++) begin
      int a;
      logic [15:0] v;
      a = $urandom_range(127);
      v = 16'($urandom);
      addr = 16'(16'h0100 + a); wdata = {16'hFFFF, v}; we = 1; #1;
      check(grf_we && grf_addr == 7'(a) && grf_wdata == v && !cm_we && !dm_we, "GRF write strobe");
      @(negedge clk); we = 0; re = 1; @(negedge clk); re = 0;
      check(rvalid && rdata == {{16{v[15]}}, v}, "GRF read back");
    end
    // context memory
    addr = 16'h1234; wdata = 32'hDEADBEEF; we = 1; #1;
    check(cm_we && cm_waddr == 10'h234 && cm_wdata == 32'hDEADBEEF && !grf_we && !dm_we, "context write");
    @(negedge clk); we = 0;
    // data memory write: row 0x2B, word 9
    addr = 16'h8000 + 16'h2B*16 + 9; wdata = 32'h12345678; we = 1; #1;
    check(dm_we && dm_addr == 8'h2B && dm_wmask == 16'h0200 && dm_wdata[9*32 +: 32] == 32'h12345678,
          "data memory word write");
    @(negedge clk); we = 0;
    // data memory read: row 0x41, word 3
    addr = 16'h8000 + 16'h41*16 + 3; re = 1; #1; check(dm_re && dm_addr == 8'h41, "data memory read strobe");
    @(negedge clk); re = 0;
    check(rvalid && rdata == {8'hA5, 8'h41, 16'h41 * 16'd3}, "data memory word read");
    // status and interrupt
    busy = 1; addr = 16'h0001; re = 1; @(negedge clk); re = 0;
    check(rdata == 32'h1 && !irq, "status busy");
    done = 1; @(negedge clk); done = 0; busy = 0;
    check(irq, "irq set by done");
    repeat (3) @(negedge clk); check(irq, "irq is sticky");
    addr = 16'h0001; re = 1; @(negedge clk); re = 0; check(rdata == 32'h2, "status done");
    wdata = 32'h2; we = 1; @(negedge clk); we = 0; check(!irq, "irq cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
