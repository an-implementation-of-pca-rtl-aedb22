// context_memory: storage for MUSRA contexts.
//
// N_CTX contexts of CTX_WORDS 32-bit words, one write port (host or context
// DMA: we_i, waddr_i, wdata_i) and one synchronous read port for the context
// parser (re_i, raddr_i; rdata_o valid the cycle after). Word address =
// context number * CTX_WORDS + word. The 128-word context length follows the
// source; the number of contexts held (8) is this design's choice, the source
// gives none.
module context_memory #(
  parameter int unsigned N_CTX     = 8,
  parameter int unsigned CTX_WORDS = 128,
  localparam int unsigned AW       = $clog2(N_CTX * CTX_WORDS)
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [31:0]   wdata_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output logic [31:0]   rdata_o
);

  logic [31:0] mem [N_CTX * CTX_WORDS];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
