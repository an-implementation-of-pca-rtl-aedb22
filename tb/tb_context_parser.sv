// tb_context_parser: the parser runs two contexts from a context-memory
// model. Checks every RC configuration write (index, data, idle layer), the
// switch of the active layer, the DMA start values taken from the control
// words, the packet tags (first/last of each group, GRF base stepping), that
// packets are popped only when the FIFO has data and the array is enabled,
// the number of packets, done after the output DMA's done, and the load time.
// Ping-pong: a context preloaded while another runs writes only the idle
// layer, and its later start skips the load (DMAs start within 3 clocks,
// no configuration writes at the start).
module tb_context_parser;
  import musra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, preload = 0, busy, done;
  logic [2:0] ctx = 0;
  logic cm_re; logic [9:0] cm_raddr; logic [31:0] cm_rdata;
  logic cfg_we, cfg_layer, act; logic [5:0] cfg_idx; rc_cfg_t cfg_data;
  logic istart, ostart, odone = 0; logic [7:0] ibase, obase; logic [15:0] icount, ocount;
  logic enable = 1, empty = 1, pop, pv, pf, pl, out_all, decide; logic [6:0] pg;
  context_parser dut (.clk, .rst_n, .start_i(start), .preload_i(preload), .ctx_i(ctx), .busy_o(busy), .done_o(done),
    .cm_re_o(cm_re), .cm_raddr_o(cm_raddr), .cm_rdata_i(cm_rdata),
    .cfg_we_o(cfg_we), .cfg_idx_o(cfg_idx), .cfg_layer_o(cfg_layer), .cfg_data_o(cfg_data),
    .act_layer_o(act), .idma_start_o(istart), .idma_base_o(ibase), .idma_count_o(icount),
    .odma_start_o(ostart), .odma_base_o(obase), .odma_count_o(ocount), .odma_done_i(odone),
    .enable_i(enable), .fifo_empty_i(empty), .fifo_pop_o(pop), .rca_valid_o(pv),
    .rca_first_o(pf), .rca_last_o(pl), .rca_gbase_o(pg), .out_all_o(out_all), .decide_o(decide));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  logic [31:0] mem [1024];
  always_ff @(posedge clk) if (cm_re) cm_rdata <= mem[cm_raddr];

  int ncfg = 0, npk = 0, ncfg_bad = 0, bad_tag = 0, bad_pop = 0;
  int grp = 1, gb0 = 0, gst = 0;
  logic exp_layer;
  int chk_ctx = 0;   // context whose words the configuration writes carry
  always @(posedge clk) if (rst_n) begin
    if (cfg_we) begin
      if (cfg_layer != exp_layer || cfg_data != rc_cfg_t'(mem[chk_ctx*128 + int'(cfg_idx)]) ||
          int'(cfg_idx) != ncfg) ncfg_bad++;
      ncfg++;
    end
    if (pop) begin
      int p;
      p = npk % grp;
      if (empty || !enable) bad_pop++;
      if (pf != (p == 0) || pl != (p == grp - 1) || int'(pg) != (gb0 + p * gst) % 128 || !pv) bad_tag++;
      npk++;
    end
  end

  int c_niter [8], c_group [8], c_inb [8], c_outb [8], c_gbase [8], c_gstep [8], c_flags [8];

  task automatic setup(int id, int niter, int group, int inb, int outb, int gbase, int gstep, int flags);
    for (int i = 0; i < 64; i++) mem[id*128 + i] = $urandom;
    mem[id*128 + 64] = niter; mem[id*128 + 65] = group; mem[id*128 + 66] = inb;
    mem[id*128 + 67] = outb; mem[id*128 + 68] = gbase; mem[id*128 + 69] = gstep;
    mem[id*128 + 70] = flags; mem[id*128 + 71] = niter / group;
    c_niter[id] = niter; c_group[id] = group; c_inb[id] = inb; c_outb[id] = outb;
    c_gbase[id] = gbase; c_gstep[id] = gstep; c_flags[id] = flags;
  endtask

  // start context id; it was preloaded if preloaded is set; while it runs,
  // preload context pre_id (if >= 0)
  task automatic run(int id, bit preloaded, int pre_id);
    int t0, tload, niter, group;
    niter = c_niter[id]; group = c_group[id];
    grp = group; gb0 = c_gbase[id]; gst = c_gstep[id]; npk = 0;
    if (!preloaded) begin ncfg = 0; chk_ctx = id; exp_layer = ~act; end
    ctx = 3'(id); start = 1; @(negedge clk); start = 0;
    t0 = $time;
    while (!istart) @(negedge clk);
    tload = ($time - t0) / 10;
    if (preloaded) begin
      check(tload <= 3, $sformatf("preloaded start took %0d cycles", tload));
      check(ncfg == 64 && ncfg_bad == 0, "no configuration writes at a preloaded start");
    end else begin
      check(tload <= 76, $sformatf("load took %0d cycles", tload));
      check(ncfg == 64 && ncfg_bad == 0, "64 RC configurations written to the idle layer");
    end
    #1; check(act == exp_layer, "active layer switched to the new one");
    check(ostart && int'(ibase) == c_inb[id] && int'(icount) == niter && int'(obase) == c_outb[id] &&
          int'(ocount) == niter / group, "DMA start values");
    check(out_all == c_flags[id][0] && decide == c_flags[id][1], "flags");
    if (pre_id >= 0) begin
      @(negedge clk);
      ncfg = 0; chk_ctx = pre_id; exp_layer = ~act;
      ctx = 3'(pre_id); preload = 1; @(negedge clk); preload = 0;
    end
    // feed with random empty FIFO and stalls
    while (npk < niter) begin
      @(negedge clk);
      empty = ($urandom_range(3) == 0); enable = ($urandom_range(4) != 0);
    end
    @(negedge clk); empty = 0; enable = 1;
    repeat (80) @(negedge clk);
    check(npk == niter, "no packet beyond NITER");
    check(busy, "busy until the output DMA is done");
    if (pre_id >= 0) check(ncfg == 64 && ncfg_bad == 0 && act != exp_layer,
                           "preload wrote the idle layer while the context ran");
    odone = 1; @(negedge clk); odone = 0;
    check(done, "done follows the output DMA");
    @(negedge clk); check(!busy, "idle again");
    empty = 1;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    setup(2, 40, 4, 5, 100, 8, 32, 2);
    setup(6, 25, 1, 0, 30, 96, 0, 1);
    setup(5, 12, 3, 50, 60, 0, 32, 0);
    run(2, 1'b0, -1);
    run(6, 1'b0, 5);
    run(5, 1'b1, -1);
    run(2, 1'b0, -1);
    check(bad_tag == 0 && bad_pop == 0, "packet tags and pop rule");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
