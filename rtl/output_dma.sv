// output_dma: drains the output FIFO into rows of the data memory.
//
// start_i loads a first row (base_i) and the number of rows to write
// (count_i). Whenever the FIFO holds an entry and the memory write port is
// granted (grant_i; host writes have priority) the DMA pops one entry and
// writes it to the next row, one row per clock. done_o pulses the cycle the
// last row is written; busy_o is high from start until then. The source
// names this block; this behaviour is this design's simplest choice.
module output_dma #(
  parameter int unsigned AW    = 8,
  parameter int unsigned WIDTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic [AW-1:0]    base_i,
  input  logic [15:0]      count_i,
  output logic             busy_o,
  output logic             done_o,
  // output FIFO
  input  logic             fifo_empty_i,
  input  logic [WIDTH-1:0] fifo_rdata_i,
  output logic             pop_o,
  // data memory write port
  input  logic             grant_i,
  output logic             we_o,
  output logic [AW-1:0]    waddr_o,
  output logic [WIDTH-1:0] wdata_o
);

  logic [AW-1:0] addr_q;
  logic [15:0]   left_q;

  assign busy_o  = (left_q != 0);
  assign pop_o   = busy_o && !fifo_empty_i && grant_i;
  assign we_o    = pop_o;
  assign waddr_o = addr_q;
  assign wdata_o = fifo_rdata_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      left_q <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= pop_o && (left_q == 16'd1);
      if (start_i) begin
        addr_q <= base_i;
        left_q <= count_i;
      end else if (pop_o) begin
        addr_q <= addr_q + 1'b1;
        left_q <= left_q - 1'b1;
      end
    end
  end

endmodule
