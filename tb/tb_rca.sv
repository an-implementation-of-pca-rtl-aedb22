// tb_rca: the 8x8 array running the two ANN contexts directly.
//
// 1. The dot-product context in layer 1: 30 groups of 3 packets, GRF base
//    stepping by 32 within a group, random bubbles and random stalls
//    (enable low). Each group's result must equal the sum over its 96
//    lanes of the truncated Q6.10 products lane * GRF.
// 2. While that context is active the sigmoid context is written into layer
//    0, then the layers are switched and 40 packets of 8 values run through;
//    every output lane must equal the reference sigmoid.
// 3. Latency: with no stall a packet's result leaves exactly RCA_ROWS clocks
//    after it entered.
module tb_rca;
  import musra_pkg::*;
  import ann_map_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, cfg_we = 0, cfg_layer = 0, act = 0;
  logic [5:0] cfg_idx = 0; rc_cfg_t cfg_data = '0;
  word_t grf [GRF_DEPTH];
  logic in_valid = 0, in_first = 0, in_last = 0; row_t in_row = '0; logic [6:0] in_gbase = 0;
  logic ov, of, ol; line_t oline;
  rca dut (.clk, .rst_n, .enable_i(enable), .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx),
    .cfg_layer_i(cfg_layer), .cfg_data_i(cfg_data), .act_layer_i(act), .grf_i(grf),
    .in_valid_i(in_valid), .in_row_i(in_row), .in_first_i(in_first), .in_last_i(in_last),
    .in_gbase_i(in_gbase), .out_valid_o(ov), .out_first_o(of), .out_last_o(ol), .out_line_o(oline));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // expected results, queued in order
  shortint exp_q [$];
  bit      mode_sig = 0;
  int      n_out = 0, n_stall = 0;
  always @(posedge clk) if (rst_n && enable && ov && (mode_sig || ol)) begin
    if (mode_sig) begin
      for (int k = 0; k < 8; k++) begin
        shortint e;
        e = exp_q.pop_front();
        check(oline[k] == e, $sformatf("sigmoid lane %0d: %0d vs %0d", k, oline[k], e));
      end
    end else begin
      shortint e;
      e = exp_q.pop_front();
      check(oline[0] == e, $sformatf("group sum %0d vs %0d", oline[0], e));
    end
    n_out <= n_out + 1;
  end

  task automatic load(bit layer, ctx_t cx);
    for (int i = 0; i < 64; i++) begin
      cfg_we = 1; cfg_layer = layer; cfg_idx = 6'(i); cfg_data = rc_cfg_t'(cx[i]);
      @(negedge clk);
    end
    cfg_we = 0;
  endtask

  task automatic send(row_t r, bit f, bit l, int gb);
    // random bubbles and stalls before the packet
    while ($urandom_range(3) == 0) begin
      in_valid = 0; enable = ($urandom_range(2) != 0); if (!enable) n_stall++;
      @(negedge clk);
    end
    enable = 1;
    in_valid = 1; in_row = r; in_first = f; in_last = l; in_gbase = 7'(gb);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    ctx_t cx;
    row_t r;
    int t_in, t_out;
    for (int i = 0; i < GRF_DEPTH; i++) grf[i] = word_t'(int'($urandom_range(2047)) - 1024);
    repeat (2) @(negedge clk); rst_n = 1;
    dot_rc(cx); load(1, cx); act = 1;
    for (int g = 0; g < 30; g++) begin
      shortint acc;
      acc = 0;
      for (int p = 0; p < 3; p++) begin
        for (int k = 0; k < 32; k++) begin
          r[k] = word_t'(int'($urandom_range(2047)) - 1024);
          acc += qmul(r[k], grf[32*p + k]);
        end
        send(r, p == 0, p == 2, 32 * p);
      end
      exp_q.push_back(acc);
    end
    repeat (12) @(negedge clk);
    check(n_out == 30, "30 group results");
    // sigmoid context into the idle layer, then switch
    sig_rc(cx); load(0, cx);
    for (int i = 122; i < 127; i++) grf[i] = 0;
    grf[122] = word_t'(A_Q); grf[123] = word_t'(B_Q); grf[124] = word_t'(C_Q);
    grf[125] = word_t'(FOUR); grf[126] = word_t'(ONE);
    act = 0; mode_sig = 1; n_out = 0;
    for (int n = 0; n < 40; n++) begin
      for (int k = 0; k < 32; k++) r[k] = word_t'(int'($urandom_range(16383)) - 8192);
      for (int k = 0; k < 8; k++) exp_q.push_back(sig_ref(shortint'(r[k])));
      send(r, 1, 1, SIG_GRF_BASE);
    end
    repeat (12) @(negedge clk);
    check(n_out == 40 && exp_q.size() == 0, "40 sigmoid packets");
    // latency without stalls
    enable = 1; in_valid = 1; in_row = '0; in_first = 1; in_last = 1; in_gbase = 7'(SIG_GRF_BASE);
    exp_q.push_back(512); for (int k = 1; k < 8; k++) exp_q.push_back(512);
    t_in = $time / 10;
    @(negedge clk); in_valid = 0;
    while (!ov) @(negedge clk);
    t_out = $time / 10;
    check(t_out - t_in == RCA_ROWS, $sformatf("latency %0d", t_out - t_in));
    @(negedge clk);
    check(n_stall > 0, "stalls applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
