// tb_face_recog_sizes: the classifier at the hidden-layer sizes 30, 60, 90
// and 120.
//
// The same 30-input, 3-output network is built with each hidden-layer size
// and one face is classified with each, on the top at its default
// parameters. Only the loop controls of the contexts change with the size:
//   hidden dot products  N packets, one result row each;
//   hidden sigmoid       ceil(N/8) packets of eight sums;
//   output dot products  3 groups of P = ceil((N+1)/32) packets (N
//                        activations and the 1.0 bias input in the GRF);
//   output sigmoid       one packet, results to the decision stage.
// Every hidden sum, activation, output sum, output and the decision are
// compared with the reference arithmetic of ann_map_pkg; the output biases
// are set so that the four sizes give the four decisions (first, second,
// third person, stranger). The hidden dot-product context's run time is
// checked against load + switch + one packet per clock + pipeline depth.
// Sizes above 127 hidden neurons need more GRF entries than the default
// 128 and are not run.
module tb_face_recog_sizes;
  import musra_pkg::*;
  import ann_map_pkg::*;

  localparam int NIN = 30, NOUT = 3, NMAX = 120;
  localparam int SIZES [4] = '{30, 60, 90, 120};

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

  // bus access, aligned to the falling edge
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
    v = shortint'((lane % 2 != 0) ? d[31:16] : d[15:0]);
  endtask

  task automatic load_ctx(int id, ctx_t cx);
    for (int i = 0; i < 72; i++) wr(32'h1000 + id*128 + i, cx[i]);
  endtask

  task automatic run_ctx(int id, output int cycles);
    int t0;
    t0 = cyc;
    wr(32'h0000, 32'(1 | (id << 8)));
    while (!irq) @(negedge clk);
    cycles = cyc - t0;
    wr(32'h0001, 32'h2);
  endtask

  function automatic shortint rnd(int span);   // uniform in [-span, span)
    return shortint'(int'($urandom_range(2*span - 1)) - span);
  endfunction

  shortint w1 [NMAX][NIN]; shortint b1 [NMAX];
  shortint w2 [NOUT][NMAX]; shortint b2 [NOUT];
  shortint x  [NIN];

  initial begin
    ctx_t cx;
    shortint row [32];
    shortint s1 [NMAX], h [NMAX], s2 [NOUT], o [NOUT], got;
    int cycles, n, ns, np;
    logic [2:0] exp_dec;
    int n_dec [4];

    n_dec = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // sigmoid constants (GRF base 96 + 26..30)
    wr(32'h0100 + 122, 32'(A_Q)); wr(32'h0100 + 123, B_Q); wr(32'h0100 + 124, C_Q);
    wr(32'h0100 + 125, FOUR);     wr(32'h0100 + 126, ONE);

    for (int s = 0; s < 4; s++) begin
      n  = SIZES[s];
      ns = (n + 7) / 8;
      np = (n + 1 + 31) / 32;

      dot_rc(cx); ctrl(cx, n, 1, 0, 128, 0, 0, 0, n);                 load_ctx(0, cx);
      sig_rc(cx); ctrl(cx, ns, 1, 0, 16, SIG_GRF_BASE, 0, 1, ns);     load_ctx(1, cx);
      dot_rc(cx); ctrl(cx, np*NOUT, np, 32, 48, 0, 32, 0, NOUT);      load_ctx(2, cx);
      sig_rc(cx); ctrl(cx, 1, 1, 52, 53, SIG_GRF_BASE, 0, 3, 1);      load_ctx(3, cx);

      for (int i = 0; i < n; i++) begin
        for (int j = 0; j < NIN; j++) w1[i][j] = rnd(1024);
        b1[i] = rnd(1024);
      end
      for (int k = 0; k < NOUT; k++) begin
        for (int j = 0; j < n; j++) w2[k][j] = rnd(64);
        b2[k] = (s < 3 && k == 2 - s) ? shortint'(6144) : shortint'(-6144);
      end
      if (s == 3) begin b2[0] = -6144; b2[1] = 0; b2[2] = -6144; end
      for (int j = 0; j < NIN; j++) x[j] = rnd(2048);

      // reference
      for (int i = 0; i < n; i++) begin
        shortint acc;
        acc = 0;
        for (int j = 0; j < NIN; j++) acc += qmul(w1[i][j], x[j]);
        acc += qmul(b1[i], shortint'(ONE));
        s1[i] = acc; h[i] = sig_ref(acc);
      end
      for (int k = 0; k < NOUT; k++) begin
        shortint acc;
        acc = 0;
        for (int j = 0; j < n; j++) acc += qmul(w2[k][j], h[j]);
        acc += qmul(b2[k], shortint'(ONE));
        s2[k] = acc; o[k] = sig_ref(acc);
      end
      exp_dec = 3'b000;
      for (int k = 0; k < 3; k++)
        if (o[k] > 921 && o[(k+1)%3] < 102 && o[(k+2)%3] < 102) exp_dec = 3'(1 << k);

      // hidden layer
      for (int i = 0; i < n; i++) begin
        for (int j = 0; j < 32; j++) row[j] = (j < NIN) ? w1[i][j] : (j == NIN) ? b1[i] : 0;
        wr_lanes(i, row, 32);
      end
      for (int j = 0; j < 32; j++)
        wr(32'h0100 + j, 32'((j < NIN) ? x[j] : (j == NIN) ? ONE : 0));
      run_ctx(0, cycles);
      check(cycles <= 73 + 1 + n + RCA_ROWS + 12,
            $sformatf("N=%0d hidden context took %0d cycles", n, cycles));
      for (int i = 0; i < n; i++) begin
        rd_lane(128 + i, 0, got);
        check(got == s1[i], $sformatf("N=%0d hidden sum %0d: %0d vs %0d", n, i, got, s1[i]));
      end

      for (int q = 0; q < ns; q++) begin
        for (int j = 0; j < 32; j++) row[j] = (j < 8 && 8*q + j < n) ? s1[8*q + j] : shortint'(0);
        wr_lanes(q, row, 8);
      end
      run_ctx(1, cycles);
      for (int i = 0; i < n; i++) begin
        rd_lane(16 + i/8, i % 8, got);
        check(got == h[i], $sformatf("N=%0d activation %0d: %0d vs %0d", n, i, got, h[i]));
      end

      // output layer: activations and 1.0 in the GRF, P packets per neuron;
      // the sigmoid constants from GRF[122] up stay untouched
      for (int j = 0; j < 32*np && j < 122; j++)
        wr(32'h0100 + j, 32'((j < n) ? h[j] : (j == n) ? ONE : 0));
      for (int k = 0; k < NOUT; k++)
        for (int p = 0; p < np; p++) begin
          for (int j = 0; j < 32; j++) begin
            int idx;
            idx = 32*p + j;
            row[j] = (idx < n) ? w2[k][idx] : (idx == n) ? b2[k] : 0;
          end
          wr_lanes(32 + np*k + p, row, 32);
        end
      run_ctx(2, cycles);
      for (int k = 0; k < NOUT; k++) begin
        rd_lane(48 + k, 0, got);
        check(got == s2[k], $sformatf("N=%0d output sum %0d: %0d vs %0d", n, k, got, s2[k]));
      end

      for (int j = 0; j < 32; j++) row[j] = (j < NOUT) ? s2[j] : 0;
      wr_lanes(52, row, 8);
      run_ctx(3, cycles);
      for (int k = 0; k < NOUT; k++)
        check(ann_out[k] == o[k], $sformatf("N=%0d output %0d: %0d vs %0d", n, k, ann_out[k], o[k]));
      check(decision == exp_dec, $sformatf("N=%0d decision %b vs %b", n, decision, exp_dec));
      check(exp_dec == ((s < 3) ? 3'(3'b100 >> s) : 3'b000), "test case yields intended class");
      case (decision)
        3'b100: n_dec[0]++;
        3'b010: n_dec[1]++;
        3'b001: n_dec[2]++;
        default: n_dec[3]++;
      endcase
      $display("N=%0d: output {%0d} {%0d} {%0d} decision %b", n, ann_out[2], ann_out[1], ann_out[0], decision);
    end
    for (int k = 0; k < 4; k++) check(n_dec[k] > 0, $sformatf("decision class %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
