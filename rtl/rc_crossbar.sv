// rc_crossbar: the switch between two neighbouring rows of the RCA.
//
// Every RC of the lower row has three operands; for each one this crossbar
// selects, from the source code in that RC's active configuration, the
// PE_OUT (codes 64..71) or LOR_OUT (codes 72..79) of any RC in the row above.
// Codes outside that range give zero here (the RC then takes its operand from
// elsewhere). Purely combinational. That an RC can reach any RC of the row
// above follows the source; carrying LOR_OUT as well as PE_OUT through the
// switch is this design's reading of the source's loop-mapping figure, where
// an LOR output feeds the next row.
module rc_crossbar
  import musra_pkg::*;
(
  input  line_t      pe_i,              // PE_OUT of the row above
  input  line_t      lor_i,             // LOR_OUT of the row above
  input  rc_cfg_t    cfg_i [RCA_COLS],  // active configuration of the row below
  output line_t      xa_o,
  output line_t      xb_o,
  output line_t      xc_o
);

  function automatic word_t sel(input logic [6:0] code);
    if (code >= SRC_PPE && code < SRC_PLOR)      return pe_i[code[2:0]];
    else if (code >= SRC_PLOR && code < SRC_LOR) return lor_i[code[2:0]];
    else                                         return '0;
  endfunction

  always_comb begin
    for (int c = 0; c < RCA_COLS; c++) begin
      xa_o[c] = sel(cfg_i[c].src_a);
      xb_o[c] = sel(cfg_i[c].src_b);
      xc_o[c] = sel(cfg_i[c].src_c);
    end
  end

endmodule
