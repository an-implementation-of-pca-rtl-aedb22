// tb_sigmoid_sweep: accuracy of the sigmoid context over (-8, 8).
//
// The sigmoid context of the classifier (piecewise quadratic on |x|, clamped
// at 4, mirrored for negative x) is run on the top at its default parameters
// for x = -8 ... 8 - 1/64 in steps of 1/64 (1024 values, 128 packets of
// eight). Every result is compared bit for bit with the reference arithmetic
// of ann_map_pkg, and the error against the true sigmoid 1/(1+exp(-x)) is
// measured. The approximation itself has a maximum error of 0.0216 and an
// average error of 0.0077 on this range; the check allows 0.0005 more for
// the Q6.10 truncation. The run time is checked against load + switch + one
// packet per clock + pipeline depth.
module tb_sigmoid_sweep;
  import musra_pkg::*;
  import ann_map_pkg::*;

  localparam int NPK = 128;

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

  initial begin
    ctx_t cx;
    shortint row [32], x, got;
    int cycles;
    real err, max_err, sum_err;

    max_err = 0.0; sum_err = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    wr(32'h0100 + 122, 32'(A_Q)); wr(32'h0100 + 123, B_Q); wr(32'h0100 + 124, C_Q);
    wr(32'h0100 + 125, FOUR);     wr(32'h0100 + 126, ONE);
    sig_rc(cx); ctrl(cx, NPK, 1, 0, 128, SIG_GRF_BASE, 0, 1, NPK); load_ctx(0, cx);

    // x = -8192 + 16 * i in Q6.10, i = 0..1023, eight per row
    for (int q = 0; q < NPK; q++) begin
      for (int j = 0; j < 32; j++) row[j] = (j < 8) ? shortint'(-8192 + 16 * (8*q + j)) : shortint'(0);
      wr_lanes(q, row, 8);
    end
    run_ctx(0, cycles);
    check(cycles <= 75 + NPK + RCA_ROWS + 12, $sformatf("sweep took %0d cycles", cycles));

    for (int i = 0; i < 8 * NPK; i++) begin
      real tr;
      x = shortint'(-8192 + 16 * i);
      rd_lane(128 + i/8, i % 8, got);
      check(got == sig_ref(x), $sformatf("x=%0d: %0d vs %0d", x, got, sig_ref(x)));
      tr  = 1.0 / (1.0 + $exp(-real'(x) / 1024.0));
      err = real'(got) / 1024.0 - tr;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      sum_err += err;
    end
    $display("sigmoid over (-8, 8): maximum error %f, average error %f", max_err, sum_err / (8.0 * NPK));
    check(max_err <= 0.02163 + 0.0005, "maximum error");
    check(sum_err / (8.0 * NPK) <= 0.00774 + 0.0005, "average error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
