// tb_rc_crossbar: checks that every operand of every RC picks the PE_OUT or
// LOR_OUT of the RC named by its source code, and zero for other codes.
module tb_rc_crossbar;
  import musra_pkg::*;
  line_t pe, lor, xa, xb, xc;
  rc_cfg_t cfg [RCA_COLS];
  rc_crossbar dut (.pe_i(pe), .lor_i(lor), .cfg_i(cfg), .xa_o(xa), .xb_o(xb), .xc_o(xc));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic word_t ref_sel(logic [6:0] code);
    if (code inside {[64:71]}) return pe[int'(code) - 64];
    if (code inside {[72:79]}) return lor[int'(code) - 72];
    return '0;
  endfunction
  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int c = 0; c < RCA_COLS; c++) begin
        pe[c] = word_t'($urandom); lor[c] = word_t'($urandom);
        cfg[c] = rc_cfg_t'($urandom);
        if ($urandom_range(1)) cfg[c].src_a = 7'(64 + $urandom_range(15));
        if ($urandom_range(1)) cfg[c].src_b = 7'(64 + $urandom_range(15));
        if ($urandom_range(1)) cfg[c].src_c = 7'(64 + $urandom_range(15));
      end
      #1;
      for (int c = 0; c < RCA_COLS; c++) begin
        checks += 3;
        if (xa[c] !== ref_sel(cfg[c].src_a)) failures++;
        if (xb[c] !== ref_sel(cfg[c].src_b)) failures++;
        if (xc[c] !== ref_sel(cfg[c].src_c)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
