// decision_unit: turns the three ANN outputs into a recognition decision.
//
// Each output is a Q6.10 value (1.0 = 1024). An output above HI (921, i.e.
// 0.9) counts as 1, one below LO (102, i.e. 0.1) as 0. The decision is
// person k (decision_o bit k set) when output k is above HI and the other two
// are below LO; any other pattern gives 3'b000, "stranger". Thus 3'b100 is
// the first person (output 2 high), 3'b010 the second and 3'b001 the third.
// valid_i loads the outputs; out_o and decision_o are registered and
// valid_o pulses one clock later. The thresholds and the rule follow the
// source's decision table; there the CPU applies it, here it is a small
// hardware stage after the array.
module decision_unit
  import musra_pkg::*;
#(
  parameter int signed HI = 921,
  parameter int signed LO = 102
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     valid_i,
  input  word_t    out_i [3],
  output word_t    out_o [3],
  output logic [2:0] decision_o,
  output logic     valid_o
);

  logic [2:0] hi, lo, dec;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      hi[k] = int'(out_i[k]) > HI;
      lo[k] = int'(out_i[k]) < LO;
    end
    dec = 3'b000;
    for (int k = 0; k < 3; k++) begin
      if (hi[k] && lo[(k+1)%3] && lo[(k+2)%3]) dec = 3'(1 << k);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_o      <= '{default: '0};
      decision_o <= '0;
      valid_o    <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        out_o      <= out_i;
        decision_o <= dec;
      end
    end
  end

endmodule
