// data_memory: the MUSRA's internal data memory.
//
// ROWS rows of 512 bits, one row per FIFO entry so the input and output DMAs
// move a whole row per clock. One synchronous read port (re_i, raddr_i;
// rdata_o valid the next cycle) and one write port with a mask per 32-bit
// word (wmask_i), so the host or the data DMA can write single words. The
// depth (256 rows, 16 KiB) and the port arrangement are this design's
// choices; the source gives the memory's role but not its organisation.
module data_memory #(
  parameter int unsigned ROWS  = 256,
  parameter int unsigned WIDTH = 512,
  localparam int unsigned AW   = $clog2(ROWS),
  localparam int unsigned NW   = WIDTH / 32
) (
  input  logic             clk,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [NW-1:0]    wmask_i,
  input  logic [WIDTH-1:0] wdata_i
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we_i) begin
      for (int w = 0; w < int'(NW); w++)
        if (wmask_i[w]) mem[waddr_i][w*32 +: 32] <= wdata_i[w*32 +: 32];
    end
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
