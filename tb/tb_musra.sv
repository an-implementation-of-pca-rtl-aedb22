// tb_musra: the MUSRA core running a small loop through its host bus.
//
// The loop body is the one of the loop-mapping example: per iteration two
// input pairs (x, y) and (z, t), v = ((x * y) + z) & t - GRF[0] with
// GRF[0] = 35, and a second output w computed from v (taken here as |v|).
// The host writes the context and 50 input rows, starts the context, waits
// for the interrupt and reads v and w of every iteration back from the data
// memory. A second context with a different loop (x - y, x + y) then runs
// from the other configuration layer, and the first context is run again to
// show that reloading gives the same results. Run times are checked against
// load + one iteration per clock + pipeline depth.
module tb_musra;
  import musra_pkg::*;
  import ann_map_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, re = 0, rvalid, irq, done, resv;
  logic [15:0] addr = 0; logic [31:0] wdata = 0, rdata;
  word_t res [3];
  musra dut (.clk, .rst_n, .bus_addr_i(addr), .bus_wdata_i(wdata), .bus_we_i(we), .bus_re_i(re),
             .bus_rdata_o(rdata), .bus_rvalid_o(rvalid), .irq_o(irq), .done_o(done),
             .res_valid_o(resv), .res_o(res));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  task automatic wr(int a, logic [31:0] d);
    addr = 16'(a); wdata = d; we = 1; @(negedge clk); we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    addr = 16'(a); re = 1; @(negedge clk); re = 0; d = rdata;
  endtask
  localparam int N = 50;
  shortint xs [N], ys [N], zs [N], ts [N];

  task automatic run(int id, output int cycles);
    int t0;
    t0 = $time / 10;
    wr(0, 32'(1 | (id << 8)));
    while (!irq) @(negedge clk);
    cycles = $time / 10 - t0;
    wr(1, 2);
  endtask

  initial begin
    ctx_t cx;
    int cyc;
    logic [31:0] d;
    int n_resv = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // context 0: the example loop, results in lanes 0 (v) and 1 (w)
    idle(cx);
    cx[0*8+0] = rcw(OP_MUL,  L(0),   L(1), Z, 0, LOR_HOLD);   // x * y
    cx[1*8+0] = rcw(OP_ADD,  PPE(0), L(2), Z, 0, LOR_HOLD);   // + z
    cx[2*8+0] = rcw(OP_AND,  PPE(0), L(3), Z, 0, LOR_HOLD);   // & t
    cx[3*8+0] = rcw(OP_SUB,  PPE(0), G(0), Z, 0, LOR_HOLD);   // - GRF(0)
    cx[4*8+0] = rcw(OP_PASS, PPE(0), Z,    Z, 0, LOR_HOLD);   // v
    cx[4*8+1] = rcw(OP_ABS,  PPE(0), Z,    Z, 0, LOR_HOLD);   // w
    for (int r = 5; r < 8; r++) begin
      cx[r*8+0] = rcw(OP_PASS, PPE(0), Z, Z, 0, LOR_HOLD);
      cx[r*8+1] = rcw(OP_PASS, PPE(1), Z, Z, 0, LOR_HOLD);
    end
    ctrl(cx, N, 1, 0, 100, 0, 0, 1, N);
    for (int i = 0; i < 72; i++) wr(32'h1000 + i, cx[i]);
    // context 1: x - y and x + y
    idle(cx);
    cx[0] = rcw(OP_SUB, L(0), L(1), Z, 0, LOR_HOLD);
    cx[1] = rcw(OP_ADD, L(0), L(1), Z, 0, LOR_HOLD);
    for (int r = 1; r < 8; r++) begin
      cx[r*8+0] = rcw(OP_PASS, PPE(0), Z, Z, 0, LOR_HOLD);
      cx[r*8+1] = rcw(OP_PASS, PPE(1), Z, Z, 0, LOR_HOLD);
    end
    ctrl(cx, N, 1, 0, 160, 0, 0, 3, N);
    for (int i = 0; i < 72; i++) wr(32'h1000 + 128 + i, cx[i]);
    wr(32'h0100, 35);
    for (int i = 0; i < N; i++) begin
      xs[i] = shortint'($urandom_range(200)) - 100; ys[i] = shortint'($urandom_range(200)) - 100;
      zs[i] = shortint'($urandom); ts[i] = shortint'($urandom);
      wr(32'h8000 + i*16 + 0, {16'(ys[i]), 16'(xs[i])});
      wr(32'h8000 + i*16 + 1, {16'(ts[i]), 16'(zs[i])});
    end
    for (int pass = 0; pass < 2; pass++) begin
      run(0, cyc);
      check(cyc <= 73 + 1 + N + RCA_ROWS + 8, $sformatf("loop took %0d cycles", cyc));
      for (int i = 0; i < N; i++) begin
        shortint v, w;
        v = shortint'((shortint'(xs[i] * ys[i]) + zs[i]) & ts[i]) - 35;
        w = (v < 0) ? -v : v;
        rd(32'h8000 + (100 + i)*16, d);
        check(d == {16'(w), 16'(v)}, $sformatf("iteration %0d: %h vs v=%0d w=%0d", i, d, v, w));
      end
      if (pass == 0) begin
        fork
          begin run(1, cyc); end
          begin repeat (200) begin @(posedge clk); if (resv) n_resv++; end end
        join
        for (int i = 0; i < N; i++) begin
          rd(32'h8000 + (160 + i)*16, d);
          check(d == {16'(shortint'(xs[i] + ys[i])), 16'(shortint'(xs[i] - ys[i]))}, "second context");
        end
        check(n_resv == N, "decide flag forwards every written row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
