// cgra_interface: the host side of the MUSRA.
//
// A simple word-addressed register bus stands in for the AXI/CGRA bridge of
// the platform: one access per clock, writes take effect at the clock edge,
// a read returns rdata_o with rvalid_o one clock later. Word address map:
//   0x0000        CTRL    write: bit0 = start a context, bit1 = preload a
//                         context (when bit0 is 0), bits 10:8 = context
//   0x0001        STATUS  read: bit0 busy, bit1 done; write bit1 = 1 clears done
//   0x0100+i      GRF register i (read/write)
//   0x1000+i      context memory word i (write)
//   0x8000+16r+w  data memory row r, 32-bit word w (read/write)
// irq_o is the sticky done flag: it rises when a context finishes and stays
// until cleared through STATUS, which is how the array signals the CPU.
// The source names the interface and the interrupt; the bus, map and flag
// behaviour are this design's; the bus takes the place of an AXI slave port.
module cgra_interface
  import musra_pkg::*;
#(
  parameter int unsigned N_CTX   = 8,
  parameter int unsigned DMEM_AW = 8,
  localparam int unsigned CM_AW  = $clog2(N_CTX * CTX_WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host bus
  input  logic [15:0]              addr_i,
  input  logic [31:0]              wdata_i,
  input  logic                     we_i,
  input  logic                     re_i,
  output logic [31:0]              rdata_o,
  output logic                     rvalid_o,
  output logic                     irq_o,
  // control
  output logic                     start_o,
  output logic                     preload_o,
  output logic [$clog2(N_CTX)-1:0] ctx_o,
  input  logic                     busy_i,
  input  logic                     done_i,
  // GRF
  output logic                     grf_we_o,
  output logic [GRF_AW-1:0]        grf_addr_o,
  output word_t                    grf_wdata_o,
  input  word_t                    grf_rdata_i,
  // context memory
  output logic                     cm_we_o,
  output logic [CM_AW-1:0]         cm_waddr_o,
  output logic [31:0]              cm_wdata_o,
  // data memory
  output logic                     dm_re_o,
  output logic                     dm_we_o,
  output logic [DMEM_AW-1:0]       dm_addr_o,
  output logic [15:0]              dm_wmask_o,
  output logic [511:0]             dm_wdata_o,
  input  logic [511:0]             dm_rdata_i
);

  logic is_ctrl, is_stat, is_grf, is_cm, is_dm;
  assign is_ctrl = (addr_i == 16'h0000);
  assign is_stat = (addr_i == 16'h0001);
  assign is_grf  = (addr_i[15:8] == 8'h01) && (addr_i[7:0] < 8'(GRF_DEPTH));
  assign is_cm   = (addr_i[15:12] == 4'h1);
  assign is_dm   = addr_i[15];

  logic done_q;
  assign irq_o = done_q;

  assign start_o     = we_i && is_ctrl && wdata_i[0];
  assign preload_o   = we_i && is_ctrl && wdata_i[1] && !wdata_i[0];
  assign ctx_o       = wdata_i[8 +: $clog2(N_CTX)];
  assign grf_we_o    = we_i && is_grf;
  assign grf_addr_o  = addr_i[GRF_AW-1:0];
  assign grf_wdata_o = wdata_i[15:0];
  assign cm_we_o     = we_i && is_cm;
  assign cm_waddr_o  = addr_i[CM_AW-1:0];
  assign cm_wdata_o  = wdata_i;
  assign dm_re_o     = re_i && is_dm;
  assign dm_we_o     = we_i && is_dm;
  assign dm_addr_o   = addr_i[4 +: DMEM_AW];
  assign dm_wmask_o  = 16'(1) << addr_i[3:0];
  assign dm_wdata_o  = {16{wdata_i}};

  // read return, one clock after the request
  typedef enum logic [1:0] {RD_REG, RD_DM} rd_src_e;
  rd_src_e     rsrc_q;
  logic [3:0]  rword_q;
  logic [31:0] rreg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q   <= 1'b0;
      rvalid_o <= 1'b0;
      rsrc_q   <= RD_REG;
      rword_q  <= '0;
      rreg_q   <= '0;
    end else begin
      if (done_i)                                 done_q <= 1'b1;
      else if (we_i && is_stat && wdata_i[1])     done_q <= 1'b0;
      rvalid_o <= re_i;
      if (re_i) begin
        rsrc_q  <= is_dm ? RD_DM : RD_REG;
        rword_q <= addr_i[3:0];
        if (is_stat)     rreg_q <= {30'd0, done_q, busy_i};
        else if (is_grf) rreg_q <= {{16{grf_rdata_i[15]}}, grf_rdata_i};
        else             rreg_q <= '0;
      end
    end
  end

  assign rdata_o = (rsrc_q == RD_DM) ? dm_rdata_i[rword_q*32 +: 32] : rreg_q;

endmodule
