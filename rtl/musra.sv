// musra: the coarse-grained reconfigurable array core.
//
// The host loads contexts into the context memory, operands into the GRF and
// data rows into the data memory through cgra_interface, then starts a
// context. The context parser writes the RC configurations into the idle
// layer of the RCA, switches layers and runs the loop: the input DMA streams
// data-memory rows into the input FIFO, each FIFO entry is broadcast into the
// RCA pipeline, the bottom row's eight results go into the output FIFO (for
// every packet, or only for the last packet of each accumulation group), and
// the output DMA writes them back to data-memory rows (words 0..7 of the row
// hold the eight results). When the last row is written the done interrupt is
// raised.
//
// Memory ports are shared with the host, which has priority: a host read
// holds the input DMA for a clock (a bubble enters the RCA), a host write
// holds the output DMA; if that lets the output FIFO fill, the whole RCA is
// stalled (rca_enable low) until there is room again.
//
// res_valid_o / res_o present the first three results of each row written by
// a context whose "decide" flag is set, for the decision stage.
// Composition (RCA, FIFOs, GRF, context and data memory, DMAs, parser,
// interface) follows the source's MUSRA block diagram; the arbitration and
// the result port are this design's choices.
module musra
  import musra_pkg::*;
#(
  parameter int unsigned N_CTX     = 8,
  parameter int unsigned DMEM_ROWS = 256,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned DMEM_AW  = $clog2(DMEM_ROWS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] bus_addr_i,
  input  logic [31:0] bus_wdata_i,
  input  logic        bus_we_i,
  input  logic        bus_re_i,
  output logic [31:0] bus_rdata_o,
  output logic        bus_rvalid_o,
  output logic        irq_o,
  output logic        done_o,
  output logic        res_valid_o,
  output word_t       res_o [3]
);

  localparam int unsigned CM_AW = $clog2(N_CTX * CTX_WORDS);
  localparam int unsigned CW    = $clog2(FIFO_DEPTH + 1);

  // ---------------- host interface ----------------
  logic                     start, preload, busy;
  logic [$clog2(N_CTX)-1:0] ctx;
  logic                     grf_we;
  logic [GRF_AW-1:0]        grf_addr;
  word_t                    grf_wdata, grf_rdata;
  word_t                    grf_regs [GRF_DEPTH];
  logic                     hcm_we;
  logic [CM_AW-1:0]         hcm_waddr;
  logic [31:0]              hcm_wdata;
  logic                     hdm_re, hdm_we;
  logic [DMEM_AW-1:0]       hdm_addr;
  logic [15:0]              hdm_wmask;
  logic [511:0]             hdm_wdata, dm_rdata;

  cgra_interface #(.N_CTX(N_CTX), .DMEM_AW(DMEM_AW)) u_if (
    .clk, .rst_n,
    .addr_i(bus_addr_i), .wdata_i(bus_wdata_i), .we_i(bus_we_i), .re_i(bus_re_i),
    .rdata_o(bus_rdata_o), .rvalid_o(bus_rvalid_o), .irq_o,
    .start_o(start), .preload_o(preload), .ctx_o(ctx), .busy_i(busy), .done_i(done_o),
    .grf_we_o(grf_we), .grf_addr_o(grf_addr), .grf_wdata_o(grf_wdata), .grf_rdata_i(grf_rdata),
    .cm_we_o(hcm_we), .cm_waddr_o(hcm_waddr), .cm_wdata_o(hcm_wdata),
    .dm_re_o(hdm_re), .dm_we_o(hdm_we), .dm_addr_o(hdm_addr), .dm_wmask_o(hdm_wmask),
    .dm_wdata_o(hdm_wdata), .dm_rdata_i(dm_rdata)
  );

  grf u_grf (
    .clk, .rst_n, .we_i(grf_we), .waddr_i(grf_addr), .wdata_i(grf_wdata),
    .raddr_i(grf_addr), .rdata_o(grf_rdata), .regs_o(grf_regs)
  );

  // ---------------- context memory and parser ----------------
  logic             cm_re;
  logic [CM_AW-1:0] cm_raddr;
  logic [31:0]      cm_rdata;

  context_memory #(.N_CTX(N_CTX), .CTX_WORDS(CTX_WORDS)) u_cm (
    .clk, .we_i(hcm_we), .waddr_i(hcm_waddr), .wdata_i(hcm_wdata),
    .re_i(cm_re), .raddr_i(cm_raddr), .rdata_o(cm_rdata)
  );

  logic               cfg_we, cfg_layer, act_layer;
  logic [5:0]         cfg_idx;
  rc_cfg_t            cfg_data;
  logic               idma_start, odma_start, odma_done;
  logic [DMEM_AW-1:0] idma_base, odma_base;
  logic [15:0]        idma_count, odma_count;
  logic               rca_enable;
  logic               ifi_empty, ifi_pop;
  logic               pk_valid, pk_first, pk_last;
  logic [GRF_AW-1:0]  pk_gbase;
  logic               out_all, decide;

  context_parser #(.N_CTX(N_CTX), .DMEM_AW(DMEM_AW)) u_parser (
    .clk, .rst_n, .start_i(start), .preload_i(preload), .ctx_i(ctx), .busy_o(busy), .done_o(done_o),
    .cm_re_o(cm_re), .cm_raddr_o(cm_raddr), .cm_rdata_i(cm_rdata),
    .cfg_we_o(cfg_we), .cfg_idx_o(cfg_idx), .cfg_layer_o(cfg_layer), .cfg_data_o(cfg_data),
    .act_layer_o(act_layer),
    .idma_start_o(idma_start), .idma_base_o(idma_base), .idma_count_o(idma_count),
    .odma_start_o(odma_start), .odma_base_o(odma_base), .odma_count_o(odma_count),
    .odma_done_i(odma_done),
    .enable_i(rca_enable), .fifo_empty_i(ifi_empty), .fifo_pop_o(ifi_pop),
    .rca_valid_o(pk_valid), .rca_first_o(pk_first), .rca_last_o(pk_last),
    .rca_gbase_o(pk_gbase), .out_all_o(out_all), .decide_o(decide)
  );

  // ---------------- data memory with host-priority ports ----------------
  logic               idma_req, idma_push;
  logic [DMEM_AW-1:0] idma_raddr;
  logic [511:0]       idma_wdata;
  logic               odma_we;
  logic [DMEM_AW-1:0] odma_waddr;
  logic [511:0]       odma_wdata;
  logic [CW-1:0]      ifi_count;

  data_memory #(.ROWS(DMEM_ROWS), .WIDTH(512)) u_dmem (
    .clk,
    .re_i   (hdm_re || idma_req),
    .raddr_i(hdm_re ? hdm_addr : idma_raddr),
    .rdata_o(dm_rdata),
    .we_i   (hdm_we || odma_we),
    .waddr_i(hdm_we ? hdm_addr : odma_waddr),
    .wmask_i(hdm_we ? hdm_wmask : 16'hFFFF),
    .wdata_i(hdm_we ? hdm_wdata : odma_wdata)
  );

  input_dma #(.AW(DMEM_AW), .WIDTH(512), .DEPTH(FIFO_DEPTH)) u_idma (
    .clk, .rst_n, .start_i(idma_start), .base_i(idma_base), .count_i(idma_count),
    .busy_o(),
    .req_o(idma_req), .grant_i(!hdm_re), .raddr_o(idma_raddr), .rdata_i(dm_rdata),
    .push_o(idma_push), .wdata_o(idma_wdata), .fifo_count_i(ifi_count)
  );

  // ---------------- FIFOs and array ----------------
  logic [511:0] ifi_rdata, ofi_rdata, ofi_wdata;
  logic         ofi_empty, ofi_full, ofi_push, ofi_pop;
  logic         rca_ovalid, rca_ofirst, rca_olast;
  line_t        rca_oline;

  io_fifo #(.WIDTH(512), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .push_i(idma_push), .wdata_i(idma_wdata), .pop_i(ifi_pop),
    .rdata_o(ifi_rdata), .empty_o(ifi_empty), .full_o(), .count_o(ifi_count)
  );

  rca u_rca (
    .clk, .rst_n, .enable_i(rca_enable),
    .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx), .cfg_layer_i(cfg_layer), .cfg_data_i(cfg_data),
    .act_layer_i(act_layer), .grf_i(grf_regs),
    .in_valid_i(pk_valid), .in_row_i(row_t'(ifi_rdata)), .in_first_i(pk_first),
    .in_last_i(pk_last), .in_gbase_i(pk_gbase),
    .out_valid_o(rca_ovalid), .out_first_o(rca_ofirst), .out_last_o(rca_olast),
    .out_line_o(rca_oline)
  );

  // stall: the array advances only if a result leaving it can be stored
  assign rca_enable = !ofi_full || ofi_pop;
  assign ofi_push   = rca_enable && rca_ovalid && (out_all || rca_olast);
  assign ofi_wdata  = {384'd0, rca_oline};

  io_fifo #(.WIDTH(512), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push_i(ofi_push), .wdata_i(ofi_wdata), .pop_i(ofi_pop),
    .rdata_o(ofi_rdata), .empty_o(ofi_empty), .full_o(ofi_full), .count_o()
  );

  output_dma #(.AW(DMEM_AW), .WIDTH(512)) u_odma (
    .clk, .rst_n, .start_i(odma_start), .base_i(odma_base), .count_i(odma_count),
    .busy_o(), .done_o(odma_done),
    .fifo_empty_i(ofi_empty), .fifo_rdata_i(ofi_rdata), .pop_o(ofi_pop),
    .grant_i(!hdm_we), .we_o(odma_we), .waddr_o(odma_waddr), .wdata_o(odma_wdata)
  );

  // results for the decision stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid_o <= 1'b0;
      res_o       <= '{default: '0};
    end else begin
      res_valid_o <= odma_we && decide;
      if (odma_we && decide) begin
        for (int k = 0; k < 3; k++) res_o[k] <= word_t'(odma_wdata[k*DW +: DW]);
      end
    end
  end

endmodule
