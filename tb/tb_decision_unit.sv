// tb_decision_unit: the four cases of the decision table as printed values
// ([1003;3;0] first person, [69;983;0] second, [1;0;1024] third,
// [43;387;0] stranger, listed as output(2), output(1), output(0)), the
// threshold edges (921/922 and 101/102) and random outputs against a model.
module tb_decision_unit;
  import musra_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, vout;
  word_t oi [3], oo [3];
  logic [2:0] dec;
  decision_unit dut (.clk, .rst_n, .valid_i(valid), .out_i(oi), .out_o(oo), .decision_o(dec), .valid_o(vout));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic apply(int o2, int o1, int o0, logic [2:0] e);
    oi[2] = word_t'(o2); oi[1] = word_t'(o1); oi[0] = word_t'(o0); valid = 1;
    @(negedge clk); valid = 0;
    checks++;
    if (!(vout && dec == e && oo[2] == word_t'(o2) && oo[0] == word_t'(o0))) begin
      failures++; $display("FAIL [%0d;%0d;%0d] -> %b want %b", o2, o1, o0, dec, e);
    end
  endtask
  function automatic logic [2:0] model(int o2, int o1, int o0);
    if (o2 > 921 && o1 < 102 && o0 < 102) return 3'b100;
    if (o2 < 102 && o1 > 921 && o0 < 102) return 3'b010;
    if (o2 < 102 && o1 < 102 && o0 > 921) return 3'b001;
    return 3'b000;
  endfunction
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    apply(1003, 3, 0, 3'b100);
    apply(69, 983, 0, 3'b010);
    apply(1, 0, 1024, 3'b001);
    apply(43, 387, 0, 3'b000);
    apply(921, 0, 0, 3'b000);
    apply(922, 101, 101, 3'b100);
    apply(922, 102, 0, 3'b000);
    apply(1024, 1024, 0, 3'b000);
    for (int n = 0; n < 2000; n++) begin
      int v [3];
      for (int k = 0; k < 3; k++)
        v[k] = ($urandom_range(1)) ? $urandom_range(1024) : (($urandom_range(1)) ? $urandom_range(101) : 922 + $urandom_range(102));
      apply(v[2], v[1], v[0], model(v[2], v[1], v[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
