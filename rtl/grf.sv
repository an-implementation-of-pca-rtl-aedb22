// grf: the Global Register File shared by all RCs.
//
// DEPTH 16-bit registers, written one at a time by the host (we_i, waddr_i,
// wdata_i; takes effect at the clock edge) and read by every RC operand at
// once, so the whole file is presented on regs_o. A host read port (raddr_i,
// rdata_o) is combinational. Registers reset to zero. The source names the
// GRF as an operand source for the RCs but gives no size or write path; the
// depth of 128 (enough for a 120-neuron layer's inputs plus bias input and
// constants) and the host write port are this design's choices.
module grf
  import musra_pkg::*;
#(
  parameter int unsigned DEPTH = GRF_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  word_t                    wdata_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output word_t                    rdata_o,
  output word_t                    regs_o [DEPTH]
);

  word_t r_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) r_q[i] <= '0;
    end else if (we_i) begin
      r_q[waddr_i] <= wdata_i;
    end
  end

  assign regs_o  = r_q;
  assign rdata_o = r_q[raddr_i];

endmodule
