// rca: the Reconfigurable Computing Array, RCA_ROWS x RCA_COLS cells.
//
// Each row of RCs is one pipeline stage. An input FIFO entry (a "packet" of
// 32 words) enters row 0 together with its tags (valid, first/last of an
// accumulation group, GRF base) and then moves down one row per clock beside
// the results, so every row sees the entry its own iteration read: this is
// how the FIFO's broadcast reaches RCs in later stages (the source's loop
// figure feeds a second input pair to stage 2). Between rows sits an
// rc_crossbar; row 0 sees zeros from above.
//
// Interface: in_valid_i with in_row_i/in_first_i/in_last_i/in_gbase_i is
// taken on each enabled clock. out_valid_o marks, RCA_ROWS cycles later, the
// bottom row's outputs (out_line_o) and the packet's tags. enable_i low
// freezes the whole array and its tag pipeline (stall). Configuration: cfg_we_i
// writes RC cfg_idx_i (row-major) in layer cfg_layer_i; act_layer_i selects
// the layer in use. Latency is RCA_ROWS cycles, one packet per cycle.
module rca
  import musra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable_i,
  input  logic              cfg_we_i,
  input  logic [5:0]        cfg_idx_i,
  input  logic              cfg_layer_i,
  input  rc_cfg_t           cfg_data_i,
  input  logic              act_layer_i,
  input  word_t             grf_i [GRF_DEPTH],
  input  logic              in_valid_i,
  input  row_t              in_row_i,
  input  logic              in_first_i,
  input  logic              in_last_i,
  input  logic [GRF_AW-1:0] in_gbase_i,
  output logic              out_valid_o,
  output logic              out_first_o,
  output logic              out_last_o,
  output line_t             out_line_o
);

  // tag and packet pipeline, index = row that uses it
  row_t              pk_row   [RCA_ROWS+1];
  logic              pk_valid [RCA_ROWS+1];
  logic              pk_first [RCA_ROWS+1];
  logic              pk_last  [RCA_ROWS+1];
  logic [GRF_AW-1:0] pk_gbase [RCA_ROWS+1];

  assign pk_row[0]   = in_row_i;
  assign pk_valid[0] = in_valid_i;
  assign pk_first[0] = in_first_i;
  assign pk_last[0]  = in_last_i;
  assign pk_gbase[0] = in_gbase_i;

  for (genvar r = 0; r < RCA_ROWS; r++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pk_row[r+1]   <= '0;
        pk_valid[r+1] <= 1'b0;
        pk_first[r+1] <= 1'b0;
        pk_last[r+1]  <= 1'b0;
        pk_gbase[r+1] <= '0;
      end else if (enable_i) begin
        pk_row[r+1]   <= pk_row[r];
        pk_valid[r+1] <= pk_valid[r];
        pk_first[r+1] <= pk_first[r];
        pk_last[r+1]  <= pk_last[r];
        pk_gbase[r+1] <= pk_gbase[r];
      end
    end
  end

  line_t   pe   [RCA_ROWS];
  line_t   lor  [RCA_ROWS];
  rc_cfg_t cfg  [RCA_ROWS][RCA_COLS];

  for (genvar r = 0; r < RCA_ROWS; r++) begin : g_row
    line_t xa, xb, xc;
    line_t above_pe, above_lor;
    if (r == 0) begin : g_top
      assign above_pe  = '0;
      assign above_lor = '0;
    end else begin : g_mid
      assign above_pe  = pe[r-1];
      assign above_lor = lor[r-1];
    end
    rc_crossbar u_xbar (
      .pe_i (above_pe), .lor_i(above_lor), .cfg_i(cfg[r]),
      .xa_o (xa), .xb_o(xb), .xc_o(xc)
    );
    for (genvar c = 0; c < RCA_COLS; c++) begin : g_col
      rc u_rc (
        .clk, .rst_n,
        .enable      (enable_i),
        .valid_i     (pk_valid[r]),
        .first_i     (pk_first[r]),
        .cfg_we      (cfg_we_i && cfg_idx_i == 6'(r*RCA_COLS + c)),
        .cfg_layer_i (cfg_layer_i),
        .cfg_data_i  (cfg_data_i),
        .act_layer_i (act_layer_i),
        .cfg_o       (cfg[r][c]),
        .lanes_i     (pk_row[r]),
        .grf_i       (grf_i),
        .grf_base_i  (pk_gbase[r]),
        .xa_i        (xa[c]),
        .xb_i        (xb[c]),
        .xc_i        (xc[c]),
        .pe_out_o    (pe[r][c]),
        .lor_out_o   (lor[r][c])
      );
    end
  end

  assign out_valid_o = pk_valid[RCA_ROWS];
  assign out_first_o = pk_first[RCA_ROWS];
  assign out_last_o  = pk_last[RCA_ROWS];
  assign out_line_o  = pe[RCA_ROWS-1];

endmodule
