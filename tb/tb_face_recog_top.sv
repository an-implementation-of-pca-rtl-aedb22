// tb_face_recog_top: end-to-end run of the face recognition classifier.
//
// The testbench plays the host CPU. It builds a 30-120-3 network (the
// configuration evaluated for the design: 30 PCA features, 120 hidden
// neurons, 3 output neurons) with pseudo-random Q6.10 weights, loads four
// contexts (hidden-layer dot products, sigmoid, output-layer dot products in
// groups of four packets, sigmoid with the decide flag) and classifies four
// feature vectors. For each one it runs the four contexts, moving each
// layer's results from data memory into the next layer's inputs as the CPU
// would, and checks every dot product, every activation, the three outputs
// and the decision against a reference model computed here. The output
// biases of each case are set so that the four cases give the first,
// second and third person and a stranger. Activations are also checked
// against the true sigmoid (within 0.03).
//
// Mechanisms counted, each must occur: host-caused pipeline stalls, input
// bubbles, configuration layer switches, multi-packet accumulation groups,
// sigmoid on negative inputs and on saturated inputs (|x| >= 4), interrupts,
// preloaded starts (the next context written into the idle configuration
// layer while one runs) and ordinary starts, and each of the four decisions.
// The sigmoid context's run time is checked
// against load (72 words) + switch + one packet per clock + pipeline depth.
// Every parameter of the top is at its default.
module tb_face_recog_top;
  import musra_pkg::*;
  import ann_map_pkg::*;

  localparam int NIN = 30, NHID = 120, NOUT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic we = 1'b0, re = 1'b0, rvalid, irq, finish, dvalid;
  word_t ann_out [3];
  logic [2:0] decision;

  face_recog_top dut (
    .clk, .rst_n, .bus_addr_i(addr), .bus_wdata_i(wdata), .bus_we_i(we), .bus_re_i(re),
    .bus_rdata_o(rdata), .bus_rvalid_o(rvalid), .irq_o(irq), .finish_o(finish),
    .ann_out_o(ann_out), .decision_o(decision), .decision_valid_o(dvalid)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #4_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- bus access (all aligned to the falling edge) ----------
  task automatic wr(int a, logic [31:0] d);
    addr = 16'(a); wdata = d; we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    addr = 16'(a); re = 1'b1;
    @(negedge clk);
    re = 1'b0;
    d = rdata;
  endtask

  function automatic int dm(int row, int w); return 32'h8000 + row*16 + w; endfunction

  task automatic wr_lanes(int row, shortint v [32], int nlanes);
    for (int w = 0; w < (nlanes + 1) / 2; w++)
      wr(dm(row, w), {16'(v[2*w+1]), 16'(v[2*w])});
  endtask

  task automatic rd_lane(int row, int lane, output shortint v);
    logic [31:0] d;
    rd(dm(row, lane / 2), d);
    v = shortint'((lane % 2) ? d[31:16] : d[15:0]);
  endtask

  task automatic load_ctx(int id, ctx_t cx);
    for (int i = 0; i < 72; i++) wr(32'h1000 + id*128 + i, cx[i]);
  endtask

  // ---------------- mechanism counters -------------------------------------
  int n_stall = 0, n_bubble = 0, n_switch = 0, n_group = 0, n_irq = 0;
  int n_fast = 0, n_slow = 0;   // starts of a preloaded / not preloaded context
  int n_neg = 0, n_sat = 0;
  int n_dec [4] = '{0, 0, 0, 0};
  logic act_prev = 1'b0, irq_prev = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_musra.u_parser.state_q == dut.u_musra.u_parser.S_RUN) begin
      if (!dut.u_musra.rca_enable) n_stall++;
      if (dut.u_musra.rca_enable && !dut.u_musra.pk_valid &&
          dut.u_musra.u_parser.fed_q != dut.u_musra.u_parser.niter_q) n_bubble++;
      if (dut.u_musra.pk_valid && !dut.u_musra.pk_first) n_group++;
    end
    if (dut.u_musra.u_parser.state_q == dut.u_musra.u_parser.S_IDLE && dut.u_musra.start) begin
      // preloaded, or its preload still under way (the start waits for it)
      if (dut.u_musra.u_parser.hit) n_fast++;
      else n_slow++;
    end
    if (dut.u_musra.act_layer != act_prev) n_switch++;
    act_prev <= dut.u_musra.act_layer;
    if (irq && !irq_prev) n_irq++;
    irq_prev <= irq;
  end

  // start context id; with preload_next set, the context that follows it is
  // loaded into the idle configuration layer while this one runs
  bit preload_next = 1'b0;
  task automatic run_ctx(int id, bit disturb, output int cycles);
    int t0;
    logic [31:0] d;
    t0 = cyc;
    wr(32'h0000, 32'(1 | (id << 8)));
    if (preload_next) wr(32'h0000, 32'(2 | (((id + 1) % 4) << 8)));
    if (disturb) begin
      // host traffic while the array runs: reads delay the input DMA,
      // a burst of writes blocks the output DMA until the array stalls
      repeat (90) @(negedge clk);
      for (int i = 0; i < 6; i++) rd(dm(250, 0), d);
      for (int i = 0; i < 40; i++) wr(dm(255, i % 16), 32'(i));
    end
    while (!irq) @(negedge clk);
    cycles = cyc - t0;
    wr(32'h0001, 32'h2);   // clear done
    check(!irq, "irq cleared");
  endtask

  // ---------------- network ------------------------------------------------
  shortint w1 [NHID][NIN]; shortint b1 [NHID];
  shortint w2 [NOUT][NHID]; shortint b2 [NOUT];
  shortint x  [NIN];

  function automatic shortint rnd(int span);   // uniform in [-span, span)
    return shortint'(int'($urandom_range(2*span - 1)) - span);
  endfunction

  initial begin
    ctx_t cx;
    shortint row [32];
    shortint s1 [NHID], h [NHID], s2 [NOUT], o [NOUT], got;
    int cycles;
    logic [2:0] exp_dec;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // contexts
    dot_rc(cx); ctrl(cx, NHID, 1, 0, 128, 0, 0, 0, NHID);          load_ctx(0, cx);
    sig_rc(cx); ctrl(cx, NHID/8, 1, 0, 16, SIG_GRF_BASE, 0, 1, NHID/8); load_ctx(1, cx);
    dot_rc(cx); ctrl(cx, 4*NOUT, 4, 32, 48, 0, 32, 0, NOUT);      load_ctx(2, cx);
    sig_rc(cx); ctrl(cx, 1, 1, 52, 53, SIG_GRF_BASE, 0, 3, 1);    load_ctx(3, cx);

    // weights: hidden layer in rows 0..119 (30 weights, bias, 0)
    for (int i = 0; i < NHID; i++) begin
      for (int j = 0; j < NIN; j++) w1[i][j] = rnd(1024);     // [-1, 1)
      b1[i] = rnd(1024);
    end
    for (int i = 0; i < NOUT; i++)
      for (int j = 0; j < NHID; j++) w2[i][j] = rnd(64);      // [-1/16, 1/16)

    // sigmoid constants in the GRF
    wr(32'h0100 + 122, 32'(A_Q)); wr(32'h0100 + 123, B_Q); wr(32'h0100 + 124, C_Q);
    wr(32'h0100 + 125, FOUR);     wr(32'h0100 + 126, ONE);

    for (int img = 0; img < 4; img++) begin
      // output biases choose the class: +6 for the target neuron, -6 otherwise
      for (int k = 0; k < NOUT; k++)
        b2[k] = (img < 3 && k == 2 - img) ? shortint'(6144) : shortint'(-6144);
      if (img == 3) begin b2[0] = -6144; b2[1] = 0; b2[2] = -6144; end
      for (int j = 0; j < NIN; j++) x[j] = rnd(2048);          // [-2, 2)

      // ---- reference ----
      for (int i = 0; i < NHID; i++) begin
        shortint acc;
        acc = 0;
        for (int j = 0; j < NIN; j++) acc += qmul(w1[i][j], x[j]);
        acc += qmul(b1[i], shortint'(ONE));
        s1[i] = acc; h[i] = sig_ref(acc);
      end
      for (int k = 0; k < NOUT; k++) begin
        shortint acc;
        acc = 0;
        for (int j = 0; j < NHID; j++) acc += qmul(w2[k][j], h[j]);
        acc += qmul(b2[k], shortint'(ONE));
        s2[k] = acc; o[k] = sig_ref(acc);
      end
      exp_dec = 3'b000;
      for (int k = 0; k < 3; k++)
        if (o[k] > 921 && o[(k+1)%3] < 102 && o[(k+2)%3] < 102) exp_dec = 3'(1 << k);

      // image 1 runs without preloading, the others preload each next context
      preload_next = (img != 1);
      // ---- hidden layer ----
      // the data memory is reused between layers, so the weights are loaded
      // for every image (as the host's data DMA would)
      for (int i = 0; i < NHID; i++) begin
          for (int j = 0; j < 32; j++) row[j] = (j < NIN) ? w1[i][j] : (j == NIN) ? b1[i] : 0;
          wr_lanes(i, row, 32);
        end
      for (int j = 0; j < 32; j++)
        wr(32'h0100 + j, 32'((j < NIN) ? x[j] : (j == NIN) ? ONE : 0));
      run_ctx(0, img == 0, cycles);
      for (int i = 0; i < NHID; i++) begin
        rd_lane(128 + i, 0, got);
        check(got == s1[i], $sformatf("img %0d hidden sum %0d: %0d vs %0d", img, i, got, s1[i]));
      end

      for (int q = 0; q < NHID/8; q++) begin
        for (int j = 0; j < 32; j++) row[j] = (j < 8) ? s1[8*q + j] : 0;
        wr_lanes(q, row, 8);
      end
      run_ctx(1, 1'b0, cycles);
      // preloaded: only the layer switch precedes the loop
      check(cycles <= (preload_next ? 2 : 75) + NHID/8 + RCA_ROWS + 12,
            $sformatf("sigmoid context took %0d cycles", cycles));
      for (int i = 0; i < NHID; i++) begin
        real tr, xr;
        rd_lane(16 + i/8, i % 8, got);
        check(got == h[i], $sformatf("img %0d activation %0d: %0d vs %0d", img, i, got, h[i]));
        xr = real'(s1[i]) / 1024.0;
        tr = 1.0 / (1.0 + $exp(-xr));
        check((real'(got) / 1024.0 - tr) < 0.03 && (tr - real'(got) / 1024.0) < 0.03,
              $sformatf("activation %0d far from sigmoid", i));
        if (s1[i] < 0) n_neg++;
        if (s1[i] >= FOUR || s1[i] <= -FOUR) n_sat++;
      end

      // ---- output layer: GRF = activations, weights in groups of 4 rows ----
      for (int j = 0; j < NHID; j++) wr(32'h0100 + j, 32'(h[j]));
      wr(32'h0100 + NHID, ONE);
      for (int k = 0; k < NOUT; k++)
        for (int p = 0; p < 4; p++) begin
          for (int j = 0; j < 32; j++) begin
            int idx;
            idx = 32*p + j;
            row[j] = (idx < NHID) ? w2[k][idx] : (idx == NHID) ? b2[k] : 0;
          end
          wr_lanes(32 + 4*k + p, row, 32);
        end
      run_ctx(2, 1'b0, cycles);
      for (int k = 0; k < NOUT; k++) begin
        rd_lane(48 + k, 0, got);
        check(got == s2[k], $sformatf("img %0d output sum %0d: %0d vs %0d", img, k, got, s2[k]));
      end

      for (int j = 0; j < 32; j++) row[j] = (j < NOUT) ? s2[j] : 0;
      wr_lanes(52, row, 8);
      run_ctx(3, 1'b0, cycles);
      for (int k = 0; k < NOUT; k++)
        check(ann_out[k] == o[k], $sformatf("img %0d output %0d: %0d vs %0d", img, k, ann_out[k], o[k]));
      check(decision == exp_dec, $sformatf("img %0d decision %b vs %b", img, decision, exp_dec));
      check(exp_dec == ((img < 3) ? 3'(3'b100 >> img) : 3'b000), "test case yields intended class");
      case (decision)
        3'b100: n_dec[0]++;
        3'b010: n_dec[1]++;
        3'b001: n_dec[2]++;
        default: n_dec[3]++;
      endcase
      $display("image %0d: output {%0d} {%0d} {%0d} decision %b", img, ann_out[2], ann_out[1], ann_out[0], decision);
    end

    $display("stalls=%0d bubbles=%0d switches=%0d group_packets=%0d irqs=%0d neg=%0d sat=%0d preloaded=%0d loaded=%0d",
             n_stall, n_bubble, n_switch, n_group, n_irq, n_neg, n_sat, n_fast, n_slow);
    check(n_stall > 0,  "a pipeline stall happened");
    check(n_bubble > 0, "an input bubble happened");
    check(n_switch >= 16, "configuration layers switched per context");
    check(n_group > 0,  "multi-packet accumulation happened");
    check(n_irq == 16,  "one interrupt per context");
    check(n_fast > 0 && n_slow > 0 && n_fast + n_slow == 16, "preloaded and loaded starts");
    check(n_neg > 0,    "sigmoid of negative inputs");
    check(n_sat > 0,    "sigmoid of saturated inputs");
    for (int k = 0; k < 4; k++) check(n_dec[k] > 0, $sformatf("decision class %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
