// rc: one reconfigurable cell of the MUSRA array.
//
// The cell has three operand multiplexers (A, B, C), a 16-bit signed
// fixed-point datapath, an output register OUT_REG (pe_out_o) and a local
// register LOR (lor_out_o). Each operand may come from any lane of the input
// FIFO entry broadcast to this row, from the GRF, from the row above through
// the crossbar (already selected outside, xa_i/xb_i/xc_i), from its own LOR or
// be zero. Two configuration layers are held; cfg_we writes the layer named by
// cfg_layer_i while act_layer_i selects the one that drives the datapath, so a
// new context can be written while the other layer runs (ping-pong).
//
// Timing: OUT_REG is loaded on every enabled clock, so a result appears one
// cycle after its operands. LOR loads (operand A, operand B or the result, per
// lor_mode) only on an enabled clock that carries a valid packet, so pipeline
// bubbles do not disturb an accumulation. enable low freezes the cell (stall).
//
// The structure (three muxes, datapath, OUT_REG, LOR, two layers, ENABLE)
// follows the source's RC figure; the opcode set is the source's list of
// operation kinds (arithmetic, logic, multiply, barrel shift, shift-and-round,
// absolute difference) in this design's own encoding. Operations are signed
// 16-bit, unsigned 16-bit (MULU, SHRL, MINU, MAXU, ABSDIFFU) or 8-bit, the
// latter working on the two bytes of a word independently (ADD8, SUB8,
// ABSDIFF8) or on the low bytes (MUL8). Arithmetic wraps at 16 bits (8 bits
// per byte for the 8-bit operations); multiplies keep the low 16 bits of the
// shifted product (truncation).
module rc
  import musra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              valid_i,     // a packet occupies this row
  input  logic              first_i,     // packet is the first of its group
  // configuration
  input  logic              cfg_we,
  input  logic              cfg_layer_i,
  input  rc_cfg_t           cfg_data_i,
  input  logic              act_layer_i,
  output rc_cfg_t           cfg_o,       // active configuration (for the crossbar)
  // operand sources
  input  row_t              lanes_i,     // input FIFO entry at this row
  input  word_t             grf_i [GRF_DEPTH],
  input  logic [GRF_AW-1:0] grf_base_i,
  input  word_t             xa_i,        // crossbar choice for A
  input  word_t             xb_i,        // crossbar choice for B
  input  word_t             xc_i,        // crossbar choice for C
  output word_t             pe_out_o,
  output word_t             lor_out_o
);

  rc_cfg_t layer_q [2];
  rc_cfg_t cfg;
  word_t   a, b, c, res;
  word_t   out_q, lor_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      layer_q[0] <= '0;
      layer_q[1] <= '0;
    end else if (cfg_we) begin
      layer_q[cfg_layer_i] <= cfg_data_i;
    end
  end

  assign cfg   = layer_q[act_layer_i];
  assign cfg_o = cfg;

  function automatic word_t pick(input logic [6:0] code, input word_t x);
    logic [GRF_AW-1:0] gi;
    gi = grf_base_i + GRF_AW'(code[4:0]);
    if (code < SRC_GRF)       return lanes_i[code[4:0]];
    else if (code < SRC_PPE)  return grf_i[gi];
    else if (code < SRC_LOR)  return x;
    else if (code == SRC_LOR) return lor_q;
    else                      return '0;
  endfunction

  always_comb begin
    logic signed [DW:0]     ma, mb;   // multiplier operands, sign- or zero-extended
    logic signed [2*DW-1:0] prod;     // low 32 bits suffice: sh <= 15
    logic signed [DW:0]     diff;
    logic [7:0]             d8 [2];
    a    = pick(cfg.src_a, xa_i);
    b    = pick(cfg.src_b, xb_i);
    c    = pick(cfg.src_c, xc_i);
    // one 17x17 signed multiplier serves the signed, unsigned and 8-bit
    // multiplies; the unsigned product is never negative, so the arithmetic
    // shift also serves as its logical shift
    unique case (cfg.op)
      OP_MULU: begin ma = {1'b0, a}; mb = {1'b0, b}; end
      OP_MUL8: begin ma = (DW+1)'(signed'(a[7:0])); mb = (DW+1)'(signed'(b[7:0])); end
      default: begin ma = {a[DW-1], a}; mb = {b[DW-1], b}; end
    endcase
    prod = ((2*DW)'(ma) * (2*DW)'(mb)) >>> cfg.sh;
    diff = 17'(a) - 17'(b);
    for (int k = 0; k < 2; k++)
      d8[k] = (a[8*k +: 8] > b[8*k +: 8]) ? a[8*k +: 8] - b[8*k +: 8] : b[8*k +: 8] - a[8*k +: 8];
    unique case (cfg.op)
      OP_PASS:    res = a;
      OP_ADD:     res = a + b;
      OP_SUB:     res = a - b;
      OP_MUL:     res = prod[DW-1:0];
      OP_MAC:     res = prod[DW-1:0] + c;
      OP_ADD3:    res = a + b + c;
      OP_AND:     res = a & b;
      OP_OR:      res = a | b;
      OP_XOR:     res = a ^ b;
      OP_ABS:     res = a[DW-1] ? -a : a;
      OP_ABSDIFF: res = diff[DW] ? word_t'(-diff) : word_t'(diff);
      OP_SHL:     res = a <<< cfg.sh;
      OP_SHRA:    res = a >>> cfg.sh;
      OP_SHRND:   res = (cfg.sh == 0) ? a
                      : word_t'((17'(a) + (17'(1) <<< (cfg.sh - 4'd1))) >>> cfg.sh);
      OP_MIN:     res = (a < b) ? a : b;
      OP_MAX:     res = (a > b) ? a : b;
      OP_SELN:    res = c[DW-1] ? a : b;
      OP_ACC:     res = (first_i ? word_t'(0) : lor_q) + a;
      OP_MULU:    res = prod[DW-1:0];
      OP_SHRL:    res = a >> cfg.sh;
      OP_MINU:    res = ($unsigned(a) < $unsigned(b)) ? a : b;
      OP_MAXU:    res = ($unsigned(a) > $unsigned(b)) ? a : b;
      OP_ABSDIFFU:res = ($unsigned(a) > $unsigned(b)) ? a - b : b - a;
      OP_ADD8:    res = {a[15:8] + b[15:8], a[7:0] + b[7:0]};
      OP_SUB8:    res = {a[15:8] - b[15:8], a[7:0] - b[7:0]};
      OP_ABSDIFF8:res = {d8[1], d8[0]};
      OP_MUL8:    res = prod[DW-1:0];
      default:    res = a;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      lor_q <= '0;
    end else if (enable) begin
      out_q <= res;
      if (valid_i) begin
        unique case (cfg.lor_mode)
          LOR_OPA:  lor_q <= a;
          LOR_OPB:  lor_q <= b;
          LOR_RES:  lor_q <= res;
          default:  lor_q <= lor_q;
        endcase
      end
    end
  end

  assign pe_out_o  = out_q;
  assign lor_out_o = lor_q;

endmodule
