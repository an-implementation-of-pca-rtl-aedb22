// input_dma: streams rows of the data memory into the input FIFO.
//
// start_i loads a first row (base_i) and a row count (count_i); the DMA then
// requests one row per clock (req_o) while the FIFO has room for it counting
// the read still in flight. A request is taken when grant_i is high (the
// host has priority on the memory read port); the row arrives a cycle later
// and is pushed into the FIFO. busy_o stays high until the last row has been
// pushed. The source names this block; its behaviour here is the simplest
// that feeds the RCA at one entry per clock.
module input_dma #(
  parameter int unsigned AW    = 8,
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start_i,
  input  logic [AW-1:0]              base_i,
  input  logic [15:0]                count_i,
  output logic                       busy_o,
  // data memory read port
  output logic                       req_o,
  input  logic                       grant_i,
  output logic [AW-1:0]              raddr_o,
  input  logic [WIDTH-1:0]           rdata_i,
  // input FIFO
  output logic                       push_o,
  output logic [WIDTH-1:0]           wdata_o,
  input  logic [$clog2(DEPTH+1)-1:0] fifo_count_i
);

  logic [AW-1:0] addr_q;
  logic [15:0]   left_q;   // rows not yet requested
  logic          pend_q;   // a read was taken last cycle
  logic          take;

  assign req_o   = (left_q != 0) &&
                   (32'(fifo_count_i) + (pend_q ? 32'd1 : 32'd0) < DEPTH);
  assign take    = req_o && grant_i;
  assign raddr_o = addr_q;
  assign push_o  = pend_q;
  assign wdata_o = rdata_i;
  assign busy_o  = (left_q != 0) || pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      left_q <= '0;
      pend_q <= 1'b0;
    end else begin
      pend_q <= take;
      if (start_i) begin
        addr_q <= base_i;
        left_q <= count_i;
      end else if (take) begin
        addr_q <= addr_q + 1'b1;
        left_q <= left_q - 1'b1;
      end
    end
  end

endmodule
