// tb_rc: self-checking test of one reconfigurable cell.
//
// Random operations (signed, unsigned and 8-bit) with random operand
// sources (input lanes, GRF with a
// base offset, crossbar inputs, own LOR, zero) are compared, one clock after
// they are applied, with an integer model of each opcode. Also checked: the
// three LOR load modes and that LOR ignores bubbles, the group accumulate
// (ACC with first), that enable low freezes both registers, and that writing
// the idle configuration layer leaves the active one in force until the
// layers are switched.
module tb_rc;
  import musra_pkg::*;

  logic clk = 0, rst_n = 0, enable = 1, valid = 1, first = 0;
  logic cfg_we = 0, cfg_layer = 0, act_layer = 0;
  rc_cfg_t cfg_data, cfg_o;
  row_t lanes;
  word_t grf [GRF_DEPTH];
  logic [GRF_AW-1:0] gbase = 0;
  word_t xa, xb, xc, pe, lor;

  rc dut (.clk, .rst_n, .enable, .valid_i(valid), .first_i(first), .cfg_we,
          .cfg_layer_i(cfg_layer), .cfg_data_i(cfg_data), .act_layer_i(act_layer), .cfg_o,
          .lanes_i(lanes), .grf_i(grf), .grf_base_i(gbase), .xa_i(xa), .xb_i(xb), .xc_i(xc),
          .pe_out_o(pe), .lor_out_o(lor));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  int lor_m = 0;   // model of LOR

  function automatic int val(logic [6:0] code, int lane_sel);
    if (code < 32) return int'(lanes[code]);
    if (code < 64) return int'(grf[(int'(gbase) + int'(code) - 32) % GRF_DEPTH]);
    if (code < 72 || (code >= 72 && code < 80)) return lane_sel;
    if (code == 80) return lor_m;
    return 0;
  endfunction

  function automatic int w16(longint v); return int'(shortint'(v)); endfunction
  function automatic int u16(int v); return v & 32'hFFFF; endfunction
  function automatic int by(int v, int k); return (v >> (8*k)) & 255; endfunction
  function automatic int sb(int v); return int'(byte'(v)); endfunction
  function automatic int ad(int x, int y); return x > y ? x - y : y - x; endfunction

  function automatic int model(op_e op, int a, int b, int c, int sh, bit f);
    case (op)
      OP_PASS:    return a;
      OP_ADD:     return w16(a + b);
      OP_SUB:     return w16(a - b);
      OP_MUL:     return w16((longint'(a) * b) >>> sh);
      OP_MAC:     return w16(((longint'(a) * b) >>> sh) + c);
      OP_ADD3:    return w16(a + b + c);
      OP_AND:     return w16(a & b);
      OP_OR:      return w16(a | b);
      OP_XOR:     return w16(a ^ b);
      OP_ABS:     return w16(a < 0 ? -a : a);
      OP_ABSDIFF: return w16(a - b < 0 ? b - a : a - b);
      OP_SHL:     return w16(a << sh);
      OP_SHRA:    return w16(a >>> sh);
      OP_SHRND:   return (sh == 0) ? a : w16((a + (1 << (sh - 1))) >>> sh);
      OP_MIN:     return a < b ? a : b;
      OP_MAX:     return a > b ? a : b;
      OP_SELN:    return c < 0 ? a : b;
      OP_ACC:     return w16((f ? 0 : lor_m) + a);
      OP_MULU:    return w16((longint'(u16(a)) * u16(b)) >> sh);
      OP_SHRL:    return w16(u16(a) >> sh);
      OP_MINU:    return u16(a) < u16(b) ? a : b;
      OP_MAXU:    return u16(a) > u16(b) ? a : b;
      OP_ABSDIFFU:return w16(u16(a) > u16(b) ? u16(a) - u16(b) : u16(b) - u16(a));
      OP_ADD8:    return w16((by(a, 1) + by(b, 1)) % 256 * 256 + (by(a, 0) + by(b, 0)) % 256);
      OP_SUB8:    return w16((by(a, 1) - by(b, 1) + 256) % 256 * 256 + (by(a, 0) - by(b, 0) + 256) % 256);
      OP_ABSDIFF8:return w16(ad(by(a, 1), by(b, 1)) * 256 + ad(by(a, 0), by(b, 0)));
      OP_MUL8:    return w16((sb(a) * sb(b)) >>> sh);
      default:    return a;
    endcase
  endfunction

  function automatic logic [6:0] rsrc();
    int k = $urandom_range(9);
    if (k < 3) return 7'($urandom_range(31));
    if (k < 5) return 7'(32 + $urandom_range(31));
    if (k < 7) return 7'(64 + $urandom_range(15));
    if (k < 8) return 7'd80;
    return 7'd81;
  endfunction

  task automatic write_cfg(bit layer, rc_cfg_t c);
    // the cell is held (enable low) while it is being configured
    enable = 0; cfg_we = 1; cfg_layer = layer; cfg_data = c;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    rc_cfg_t c;
    int a, b, cc, exp_res, exp_lor, seen_ops [N_OPS];
    for (int i = 0; i < GRF_DEPTH; i++) grf[i] = word_t'($urandom);
    lanes = '0; xa = 0; xb = 0; xc = 0; cfg_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(pe == 0 && lor == 0, "reset values");

    for (int n = 0; n < 4500; n++) begin
      c.op = op_e'($urandom_range(N_OPS - 1)); c.src_a = rsrc(); c.src_b = rsrc(); c.src_c = rsrc();
      c.sh = 4'($urandom_range(15)); c.lor_mode = lor_mode_e'($urandom_range(3));
      if (c.op == OP_MUL || c.op == OP_MAC || c.op == OP_MULU || c.op == OP_MUL8) c.sh = 4'($urandom_range(12));
      // the cell's active layer alternates; write the idle layer, then switch
      write_cfg(~act_layer, c);
      act_layer = ~act_layer;
      for (int i = 0; i < LANES; i++) lanes[i] = word_t'($urandom);
      xa = word_t'($urandom); xb = word_t'($urandom); xc = word_t'($urandom);
      gbase = GRF_AW'($urandom);
      first = 1'($urandom); valid = ($urandom_range(3) != 0);
      enable = ($urandom_range(7) != 0);
      #1;
      a  = val(c.src_a, int'(xa)); b = val(c.src_b, int'(xb)); cc = val(c.src_c, int'(xc));
      if (c.src_a >= 72 && c.src_a < 80) a = int'(xa);
      if (c.src_b >= 72 && c.src_b < 80) b = int'(xb);
      if (c.src_c >= 72 && c.src_c < 80) cc = int'(xc);
      exp_res = model(c.op, a, b, cc, int'(c.sh), first);
      exp_lor = lor_m;
      if (enable && valid)
        case (c.lor_mode)
          LOR_OPA: exp_lor = a;
          LOR_OPB: exp_lor = b;
          LOR_RES: exp_lor = exp_res;
          default: ;
        endcase
      begin
        int old_pe;
        old_pe = int'(pe);
        @(negedge clk);
        check(cfg_o == c, "active layer holds the written configuration");
        if (enable) check(int'(pe) == exp_res,
            $sformatf("op %s a=%0d b=%0d c=%0d sh=%0d: got %0d want %0d", c.op.name(), a, b, cc, c.sh, pe, exp_res));
        else check(int'(pe) == old_pe, "enable low holds OUT_REG");
        check(int'(lor) == exp_lor, $sformatf("LOR mode %0d: got %0d want %0d", c.lor_mode, lor, exp_lor));
        lor_m = exp_lor;
        if (enable) seen_ops[int'(c.op)]++;
      end
    end
    // ping-pong: writing the idle layer must not change the running one
    c = rc_cfg_t'({OP_ADD, 7'd0, 7'd1, 7'd81, 4'd0, LOR_HOLD});
    write_cfg(~act_layer, rc_cfg_t'({OP_SUB, 7'd0, 7'd1, 7'd81, 4'd0, LOR_HOLD}));
    write_cfg(act_layer, c);
    enable = 1; lanes[0] = 100; lanes[1] = 30;
    @(negedge clk); check(pe == 130, "active layer unaffected by idle-layer write");
    act_layer = ~act_layer;
    @(negedge clk); check(pe == 70, "switched layer takes effect");
    for (int k = 0; k < N_OPS; k++) check(seen_ops[k] > 0, $sformatf("opcode %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
