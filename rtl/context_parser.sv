// context_parser: loads a context into the RCA and runs its loop.
//
// A loader reads a context from the context memory, word by word (one read
// per clock, data one clock later). Words 0..63 are written as RC
// configurations into the configuration layer that is not in use; words
// 64..71, the loop control parameters (see musra_pkg), go into shadow
// registers. The loader runs on start_i for context ctx_i, or ahead of time
// on preload_i: a preload request is held until the parser is idle or a
// context runs (the loader then writes only the idle layer), so the host may
// issue it right after a start. A start of the
// context that has been preloaded skips the load (ping-pong use of the two
// layers); any other start loads first. When the idle layer holds the
// context, the parser switches the active layer and copies the shadow
// control words (one clock), starts the input DMA (NITER rows from INBASE)
// and the output DMA (NOUT rows to OUTBASE), and feeds the RCA: every clock
// on which the array is enabled and the input FIFO holds an entry, one entry
// is popped and issued with its tags. Packet k of the loop is number
// p = k mod GROUP within its group: first = (p == 0), last = (p == GROUP-1),
// GRF base = GRFBASE + p * GRFSTEP. When the output DMA reports its last row,
// done_o pulses and the parser is idle again.
//
// Loading takes 73 clocks (72 words + read latency), the switch one more,
// so a start reaches the DMAs 2 clocks later when preloaded and 75 otherwise; the loop then
// runs at one packet per clock when the FIFO keeps up, and ends RCA_ROWS plus
// a few clocks after the last packet entered. That the parser decodes a
// context read from context memory and drives the RCA follows the source; the
// context layout, the control words and this sequencing are this design's.
module context_parser
  import musra_pkg::*;
#(
  parameter int unsigned N_CTX   = 8,
  parameter int unsigned DMEM_AW = 8,
  localparam int unsigned CM_AW  = $clog2(N_CTX * CTX_WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start_i,
  input  logic                     preload_i,
  input  logic [$clog2(N_CTX)-1:0] ctx_i,
  output logic                     busy_o,
  output logic                     done_o,
  // context memory read port
  output logic                     cm_re_o,
  output logic [CM_AW-1:0]         cm_raddr_o,
  input  logic [31:0]              cm_rdata_i,
  // RCA configuration
  output logic                     cfg_we_o,
  output logic [5:0]               cfg_idx_o,
  output logic                     cfg_layer_o,
  output rc_cfg_t                  cfg_data_o,
  output logic                     act_layer_o,
  // DMAs
  output logic                     idma_start_o,
  output logic [DMEM_AW-1:0]       idma_base_o,
  output logic [15:0]              idma_count_o,
  output logic                     odma_start_o,
  output logic [DMEM_AW-1:0]       odma_base_o,
  output logic [15:0]              odma_count_o,
  input  logic                     odma_done_i,
  // feeding the RCA
  input  logic                     enable_i,
  input  logic                     fifo_empty_i,
  output logic                     fifo_pop_o,
  output logic                     rca_valid_o,
  output logic                     rca_first_o,
  output logic                     rca_last_o,
  output logic [GRF_AW-1:0]        rca_gbase_o,
  // loop flags for the datapath around the RCA
  output logic                     out_all_o,
  output logic                     decide_o
);

  localparam int unsigned NWORDS = CW_NOUT + 1;   // words read per context

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SWAP, S_RUN} state_e;
  state_e state_q;

  logic [$clog2(N_CTX)-1:0] ctx_q;     // context being started
  logic act_q;

  // loader
  logic                     ld_busy_q;
  logic [$clog2(N_CTX)-1:0] ld_ctx_q;
  logic [6:0]  rd_q;        // next word to read
  logic        rvld_q;      // a word arrives this cycle
  logic [6:0]  rword_q;     // index of the arriving word
  logic                     pre_valid_q;  // idle layer + shadows hold pre_ctx_q
  logic [$clog2(N_CTX)-1:0] pre_ctx_q;
  logic        ld_go;
  logic [$clog2(N_CTX)-1:0] ld_go_ctx;
  logic        hit;         // the context to start is (or is being) loaded
  logic        pend_q;      // preload request waiting for the loader
  logic [$clog2(N_CTX)-1:0] pend_ctx_q;
  logic        pend_take;

  // shadow control words, filled by the loader
  logic [15:0] s_niter_q, s_inbase_q, s_outbase_q, s_nout_q;
  logic [7:0]  s_group_q, s_grfbase_q, s_grfstep_q;
  logic [1:0]  s_flags_q;

  // active control words
  logic [15:0] niter_q, inbase_q, outbase_q, nout_q, fed_q;
  logic [7:0]  group_q, grfbase_q, grfstep_q, pidx_q;
  logic [GRF_AW-1:0] gbase_q;
  logic [1:0]  flags_q;

  assign busy_o     = (state_q != S_IDLE);
  assign cm_re_o    = ld_busy_q && (rd_q < 7'(NWORDS));
  assign cm_raddr_o = CM_AW'({ld_ctx_q, 7'(0)}) + CM_AW'(rd_q);

  assign cfg_we_o    = rvld_q && (rword_q < 7'(N_RC));
  assign cfg_idx_o   = rword_q[5:0];
  assign cfg_layer_o = ~act_q;
  assign cfg_data_o  = rc_cfg_t'(cm_rdata_i);
  assign act_layer_o = act_q;

  // which load to begin this clock: a start that misses the preloaded
  // context, else a waiting preload while idle or running
  always_comb begin
    hit       = (pre_valid_q && pre_ctx_q == ctx_i) || (ld_busy_q && ld_ctx_q == ctx_i);
    ld_go     = 1'b0;
    ld_go_ctx = ctx_i;
    pend_take = 1'b0;
    if (state_q == S_IDLE && start_i) begin
      ld_go     = !hit;
      pend_take = pend_q && pend_ctx_q == ctx_i;
    end else if ((state_q == S_IDLE || state_q == S_RUN) && pend_q && !ld_busy_q) begin
      ld_go     = 1'b1;
      ld_go_ctx = pend_ctx_q;
      pend_take = 1'b1;
    end
  end

  assign idma_base_o  = DMEM_AW'(inbase_q);
  assign idma_count_o = niter_q;
  assign odma_base_o  = DMEM_AW'(outbase_q);
  assign odma_count_o = nout_q;

  assign fifo_pop_o  = (state_q == S_RUN) && enable_i && !fifo_empty_i && (fed_q != niter_q);
  assign rca_valid_o = fifo_pop_o;
  assign rca_first_o = (pidx_q == 8'd0);
  assign rca_last_o  = (pidx_q == group_q - 8'd1);
  assign rca_gbase_o = gbase_q;

  assign out_all_o = flags_q[0];
  assign decide_o  = flags_q[1];

  // loader
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_busy_q   <= 1'b0;
      ld_ctx_q    <= '0;
      rd_q        <= '0;
      rvld_q      <= 1'b0;
      rword_q     <= '0;
      pre_valid_q <= 1'b0;
      pre_ctx_q   <= '0;
      pend_q      <= 1'b0;
      pend_ctx_q  <= '0;
      s_niter_q <= '0; s_inbase_q <= '0; s_outbase_q <= '0; s_nout_q <= '0;
      s_group_q <= 8'd1; s_grfbase_q <= '0; s_grfstep_q <= '0; s_flags_q <= '0;
    end else begin
      rvld_q  <= cm_re_o;
      rword_q <= rd_q;
      if (cm_re_o) rd_q <= rd_q + 7'd1;
      if (rvld_q) begin
        unique case (int'(rword_q))
          CW_NITER:   s_niter_q   <= cm_rdata_i[15:0];
          CW_GROUP:   s_group_q   <= (cm_rdata_i[7:0] == 8'd0) ? 8'd1 : cm_rdata_i[7:0];
          CW_INBASE:  s_inbase_q  <= cm_rdata_i[15:0];
          CW_OUTBASE: s_outbase_q <= cm_rdata_i[15:0];
          CW_GRFBASE: s_grfbase_q <= cm_rdata_i[7:0];
          CW_GRFSTEP: s_grfstep_q <= cm_rdata_i[7:0];
          CW_FLAGS:   s_flags_q   <= cm_rdata_i[1:0];
          CW_NOUT:    s_nout_q    <= cm_rdata_i[15:0];
          default: ;
        endcase
        if (int'(rword_q) == NWORDS - 1) begin
          ld_busy_q   <= 1'b0;
          pre_valid_q <= 1'b1;
          pre_ctx_q   <= ld_ctx_q;
        end
      end
      // the swap makes the idle layer active: it no longer holds a preload
      if (state_q == S_SWAP) pre_valid_q <= 1'b0;
      if (pend_take) pend_q <= 1'b0;
      if (preload_i) begin
        pend_q     <= 1'b1;
        pend_ctx_q <= ctx_i;
      end
      if (ld_go) begin
        ld_busy_q   <= 1'b1;
        ld_ctx_q    <= ld_go_ctx;
        rd_q        <= '0;
        rvld_q      <= 1'b0;
        pre_valid_q <= 1'b0;
      end
    end
  end

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      ctx_q   <= '0;
      act_q   <= 1'b0;
      niter_q <= '0; inbase_q <= '0; outbase_q <= '0; nout_q <= '0; fed_q <= '0;
      group_q <= 8'd1; grfbase_q <= '0; grfstep_q <= '0; pidx_q <= '0;
      gbase_q <= '0; flags_q <= '0;
      idma_start_o <= 1'b0;
      odma_start_o <= 1'b0;
      done_o  <= 1'b0;
    end else begin
      idma_start_o <= 1'b0;
      odma_start_o <= 1'b0;
      done_o       <= 1'b0;

      unique case (state_q)
        S_IDLE: if (start_i) begin
          ctx_q   <= ctx_i;
          state_q <= (pre_valid_q && pre_ctx_q == ctx_i && !ld_busy_q) ? S_SWAP : S_LOAD;
        end
        S_LOAD: if ((pre_valid_q && pre_ctx_q == ctx_q && !ld_busy_q) ||
                    (rvld_q && int'(rword_q) == NWORDS - 1 && ld_ctx_q == ctx_q)) begin
          state_q <= S_SWAP;
        end
        S_SWAP: begin
          act_q        <= ~act_q;
          niter_q      <= s_niter_q;
          group_q      <= s_group_q;
          inbase_q     <= s_inbase_q;
          outbase_q    <= s_outbase_q;
          grfbase_q    <= s_grfbase_q;
          grfstep_q    <= s_grfstep_q;
          flags_q      <= s_flags_q;
          nout_q       <= s_nout_q;
          idma_start_o <= 1'b1;
          odma_start_o <= 1'b1;
          fed_q        <= '0;
          pidx_q       <= '0;
          gbase_q      <= GRF_AW'(s_grfbase_q);
          state_q      <= S_RUN;
        end
        S_RUN: begin
          if (fifo_pop_o) begin
            fed_q <= fed_q + 16'd1;
            if (rca_last_o) begin
              pidx_q  <= '0;
              gbase_q <= GRF_AW'(grfbase_q);
            end else begin
              pidx_q  <= pidx_q + 8'd1;
              gbase_q <= gbase_q + GRF_AW'(grfstep_q);
            end
          end
          if (odma_done_i) begin
            state_q <= S_IDLE;
            done_o  <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
