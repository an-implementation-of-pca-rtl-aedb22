// ann_map_pkg: contexts that map the face-recognition ANN onto the MUSRA
// array, plus bit-exact reference arithmetic for checking it.
//
// dot_rc(): one neuron per input packet. The packet holds 32 weights; the
// GRF holds the layer's inputs (with 1.0 at the bias position). Rows 0..3
// multiply lane k by GRF[k] and chain eight products each (multiply, then
// multiply-accumulate with the value from the row above), rows 4..5 reduce
// eight partial sums to one with three-input adds, row 6 accumulates the
// partial sums of a group of packets in its LOR (for neurons with more than
// 31 inputs), row 7 passes the result out. Result: word 0 of the output row.
//
// sig_rc(): the sigmoid for eight values per packet (lanes 0..7), using
// f(t) = -0.03125 t^2 + 0.25 t + 0.5 for t = |x| < 4, 1 for |x| >= 4, and
// 1 - f(|x|) for x < 0. Constants come from the GRF at base 96:
// GRF[122] = a, [123] = b, [124] = c, [125] = 4.0, [126] = 1.0.
// The |x| >= 4 case is realised by clamping t to 4.0 before the polynomial,
// which yields exactly 1.0 there.
package ann_map_pkg;
  import musra_pkg::*;

  localparam int A_Q   = -32;    // -0.03125
  localparam int B_Q   = 256;    //  0.25
  localparam int C_Q   = 512;    //  0.5
  localparam int FOUR  = 4096;
  localparam int ONE   = 1024;
  localparam int SIG_GRF_BASE = 96;

  function automatic logic [31:0] rcw(op_e op, int a, int b, int c, int sh, lor_mode_e lm);
    rc_cfg_t w;
    w.op = op; w.src_a = 7'(a); w.src_b = 7'(b); w.src_c = 7'(c);
    w.sh = 4'(sh); w.lor_mode = lm;
    return 32'(w);
  endfunction

  function automatic int L(int k);    return int'(SRC_LANE) + k; endfunction
  function automatic int G(int k);    return int'(SRC_GRF)  + k; endfunction
  function automatic int PPE(int k);  return int'(SRC_PPE)  + k; endfunction
  function automatic int PLOR(int k); return int'(SRC_PLOR) + k; endfunction
  localparam int Z = int'(SRC_ZERO);

  typedef logic [31:0] ctx_t [128];

  function automatic void idle(ref ctx_t cx);
    for (int i = 0; i < 128; i++) cx[i] = (i < 64) ? rcw(OP_PASS, Z, Z, Z, 0, LOR_HOLD) : 32'd0;
  endfunction

  function automatic void dot_rc(ref ctx_t cx);
    idle(cx);
    for (int c = 0; c < 8; c++) begin
      cx[0*8+c] = rcw(OP_MUL, L(c),      G(c),      Z,      FRAC, LOR_HOLD);
      cx[1*8+c] = rcw(OP_MAC, L(8+c),    G(8+c),    PPE(c), FRAC, LOR_HOLD);
      cx[2*8+c] = rcw(OP_MAC, L(16+c),   G(16+c),   PPE(c), FRAC, LOR_HOLD);
      cx[3*8+c] = rcw(OP_MAC, L(24+c),   G(24+c),   PPE(c), FRAC, LOR_HOLD);
    end
    cx[4*8+0] = rcw(OP_ADD3, PPE(0), PPE(1), PPE(2), 0, LOR_HOLD);
    cx[4*8+1] = rcw(OP_ADD3, PPE(3), PPE(4), PPE(5), 0, LOR_HOLD);
    cx[4*8+2] = rcw(OP_ADD,  PPE(6), PPE(7), Z,      0, LOR_HOLD);
    cx[5*8+0] = rcw(OP_ADD3, PPE(0), PPE(1), PPE(2), 0, LOR_HOLD);
    cx[6*8+0] = rcw(OP_ACC,  PPE(0), Z,      Z,      0, LOR_RES);
    cx[7*8+0] = rcw(OP_PASS, PPE(0), Z,      Z,      0, LOR_HOLD);
  endfunction

  function automatic void sig_rc(ref ctx_t cx);
    idle(cx);
    for (int c = 0; c < 8; c++) begin
      cx[0*8+c] = rcw(OP_ABS,  L(c),    Z,       Z,      0,    LOR_HOLD);
      cx[1*8+c] = rcw(OP_MIN,  PPE(c),  G(29),   Z,      0,    LOR_HOLD);
      cx[2*8+c] = rcw(OP_MAC,  PPE(c),  G(26),   G(27),  FRAC, LOR_OPA);
      cx[3*8+c] = rcw(OP_MAC,  PPE(c),  PLOR(c), G(28),  FRAC, LOR_HOLD);
      cx[4*8+c] = rcw(OP_SUB,  G(30),   PPE(c),  Z,      0,    LOR_OPB);
      cx[5*8+c] = rcw(OP_SELN, PPE(c),  PLOR(c), L(c),   0,    LOR_HOLD);
      cx[6*8+c] = rcw(OP_PASS, PPE(c),  Z,       Z,      0,    LOR_HOLD);
      cx[7*8+c] = rcw(OP_PASS, PPE(c),  Z,       Z,      0,    LOR_HOLD);
    end
  endfunction

  function automatic void ctrl(ref ctx_t cx, input int niter, int group, int inbase, int outbase,
                               int grfbase, int grfstep, int flags, int nout);
    cx[CW_NITER] = 32'(niter);   cx[CW_GROUP] = 32'(group);
    cx[CW_INBASE] = 32'(inbase); cx[CW_OUTBASE] = 32'(outbase);
    cx[CW_GRFBASE] = 32'(grfbase); cx[CW_GRFSTEP] = 32'(grfstep);
    cx[CW_FLAGS] = 32'(flags);   cx[CW_NOUT] = 32'(nout);
  endfunction

  // ---- reference arithmetic (16-bit wrap, truncating Q6.10 multiply) ----
  function automatic shortint qmul(shortint a, shortint b);
    int p;
    p = (int'(a) * int'(b)) >>> FRAC;
    return shortint'(p);
  endfunction

  function automatic shortint sig_ref(shortint x);
    shortint t, u, v;
    t = (x < 0) ? -x : x;
    if (t > FOUR) t = FOUR;
    u = shortint'(qmul(shortint'(A_Q), t) + B_Q);
    v = shortint'(qmul(u, t) + C_Q);
    return (x < 0) ? shortint'(ONE - v) : v;
  endfunction

endpackage
