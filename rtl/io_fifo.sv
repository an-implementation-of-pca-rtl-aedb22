// io_fifo: synchronous first-word-fall-through FIFO, used as the MUSRA input
// FIFO (data memory -> RCA) and output FIFO (RCA -> data memory).
//
// rdata_o always shows the oldest entry while empty_o is low; pop_i removes
// it on the clock edge. push_i writes wdata_i. Pushing and popping in the
// same cycle is allowed, also when full (the pop frees the place). count_o is
// the number of entries held. The 512-bit width and 8-entry depth are the
// source's numbers; the first-word-fall-through read is this design's choice.
module io_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_i,
  input  logic [WIDTH-1:0]           wdata_i,
  input  logic                       pop_i,
  output logic [WIDTH-1:0]           rdata_o,
  output logic                       empty_o,
  output logic                       full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0]           mem [DEPTH];
  logic [AW-1:0]              wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic                       do_push, do_pop;

  assign empty_o = (cnt == 0);
  assign full_o  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count_o = cnt;
  assign rdata_o = mem[rptr];
  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && (!full_o || do_pop);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      cnt <= cnt + {{($clog2(DEPTH+1)-1){1'b0}}, do_push} - {{($clog2(DEPTH+1)-1){1'b0}}, do_pop};
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata_i;
  end

  // usage rules: no push into a full FIFO without a pop, no pop when empty
  assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o && !pop_i))
    else $error("io_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop_i && empty_o))
    else $error("io_fifo: pop while empty");

endmodule
