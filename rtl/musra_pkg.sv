// musra_pkg: types and constants shared by the MUSRA coarse-grained array.
//
// Data words are 16-bit signed fixed point; the face recognition mapping uses
// Q6.10 (6 integer bits, 10 fraction bits). A FIFO entry or a data-memory row
// holds 32 such words (512 bits). The RCA is 8x8 reconfigurable cells (RCs).
//
// One RC is configured by one 32-bit word (rc_cfg_t): an opcode, three 7-bit
// operand source codes, a 4-bit shift amount and a 2-bit LOR load mode. A
// context is 128 words: words 0..63 configure the RCs row by row, words 64..71
// are the loop control parameters read by the context parser. The 128-word
// context length and the 8x8 array, 512-bit FIFOs and 16-bit words follow the
// source description; the field layout, opcode set and control words are this
// design's own encoding.
package musra_pkg;

  localparam int unsigned DW         = 16;   // data word width
  localparam int unsigned LANES      = 32;   // 16-bit words per FIFO entry
  localparam int unsigned ROW_W      = DW * LANES;  // 512
  localparam int unsigned RCA_ROWS   = 8;
  localparam int unsigned RCA_COLS   = 8;
  localparam int unsigned N_RC       = RCA_ROWS * RCA_COLS;
  localparam int unsigned CTX_WORDS  = 128;  // 32-bit words per context
  localparam int unsigned GRF_DEPTH  = 128;  // global registers
  localparam int unsigned GRF_AW     = $clog2(GRF_DEPTH);
  localparam int unsigned FRAC       = 10;   // Q6.10

  typedef logic signed [DW-1:0] word_t;
  typedef word_t [LANES-1:0]    row_t;      // one FIFO entry / memory row
  typedef word_t [RCA_COLS-1:0] line_t;     // outputs of one RC row

  typedef enum logic [4:0] {
    OP_PASS    = 5'd0,   // A
    OP_ADD     = 5'd1,   // A + B
    OP_SUB     = 5'd2,   // A - B
    OP_MUL     = 5'd3,   // (A * B) >>> sh
    OP_MAC     = 5'd4,   // ((A * B) >>> sh) + C
    OP_ADD3    = 5'd5,   // A + B + C
    OP_AND     = 5'd6,
    OP_OR      = 5'd7,
    OP_XOR     = 5'd8,
    OP_ABS     = 5'd9,   // |A|
    OP_ABSDIFF = 5'd10,  // |A - B|
    OP_SHL     = 5'd11,  // A << sh
    OP_SHRA    = 5'd12,  // A >>> sh
    OP_SHRND   = 5'd13,  // (A + 2^(sh-1)) >>> sh, shift and round
    OP_MIN     = 5'd14,
    OP_MAX     = 5'd15,
    OP_SELN    = 5'd16,  // C < 0 ? A : B
    OP_ACC     = 5'd17,  // (first ? 0 : LOR) + A, accumulate over a group
    // unsigned 16-bit variants
    OP_MULU    = 5'd18,  // (A * B) >> sh, operands and product unsigned
    OP_SHRL    = 5'd19,  // A >> sh, logical
    OP_MINU    = 5'd20,
    OP_MAXU    = 5'd21,
    OP_ABSDIFFU= 5'd22,  // |A - B| of unsigned operands
    // 8-bit operations: each 16-bit word holds two independent bytes
    OP_ADD8    = 5'd23,  // bytewise A + B (wraps per byte)
    OP_SUB8    = 5'd24,  // bytewise A - B
    OP_ABSDIFF8= 5'd25,  // bytewise |A - B| of unsigned bytes
    OP_MUL8    = 5'd26   // (A[7:0] * B[7:0]) >>> sh, signed bytes, 16-bit result
  } op_e;
  localparam int unsigned N_OPS = 27;

  // Operand source codes (7 bits).
  localparam logic [6:0] SRC_LANE = 7'd0;   // 0..31  : input FIFO lane
  localparam logic [6:0] SRC_GRF  = 7'd32;  // 32..63 : GRF[idx + packet GRF base]
  localparam logic [6:0] SRC_PPE  = 7'd64;  // 64..71 : PE_OUT of RC in row above
  localparam logic [6:0] SRC_PLOR = 7'd72;  // 72..79 : LOR_OUT of RC in row above
  localparam logic [6:0] SRC_LOR  = 7'd80;  // own LOR
  localparam logic [6:0] SRC_ZERO = 7'd81;  // constant 0 (also any code above 81)

  typedef enum logic [1:0] {
    LOR_HOLD = 2'd0, LOR_OPA = 2'd1, LOR_OPB = 2'd2, LOR_RES = 2'd3
  } lor_mode_e;

  typedef struct packed {
    op_e        op;       // [31:27]
    logic [6:0] src_a;    // [26:20]
    logic [6:0] src_b;    // [19:13]
    logic [6:0] src_c;    // [12:6]
    logic [3:0] sh;       // [5:2]
    lor_mode_e  lor_mode; // [1:0]
  } rc_cfg_t;

  // Control words of a context (word index within the context).
  localparam int unsigned CW_NITER  = 64;  // [15:0] input packets to process
  localparam int unsigned CW_GROUP  = 65;  // [7:0]  packets per accumulation group (>=1)
  localparam int unsigned CW_INBASE = 66;  // [15:0] first data-memory row read
  localparam int unsigned CW_OUTBASE= 67;  // [15:0] first data-memory row written
  localparam int unsigned CW_GRFBASE= 68;  // [7:0]  GRF base of the first packet in a group
  localparam int unsigned CW_GRFSTEP= 69;  // [7:0]  GRF base step per packet in a group
  localparam int unsigned CW_FLAGS  = 70;  // bit0: write every packet's result
                                           //       (else only the last of each group)
                                           // bit1: results go to the decision stage
  localparam int unsigned CW_NOUT   = 71;  // [15:0] result rows the output DMA writes
  localparam int unsigned N_CTRL_WORDS = 8;

endpackage
