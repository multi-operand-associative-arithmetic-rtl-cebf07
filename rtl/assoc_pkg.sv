// Shared types for the partitioned associative processor.
//
// A memory cycle of an associative memory carries up to four concurrent
// operations: a tag operation (SETAG or SHIFTAG), a load of the comparand
// register c, a load of the mask register m, and one major operation
// (COMPARE, WRITE or READ). prim_cmd_t bundles those four fields. The tag
// operation SELECT (tag exactly one word, by address) is not one of the
// primitive operations of the associative model; it is this design's own
// addition, used only to move words in and out of the memories.
//
// ctrl_cmd_t is a macro command for the control unit: either one primitive
// cycle on each memory, or one of the bit-serial algorithms (many-to-many
// comparison, multi-operand addition or subtraction, carry propagation,
// field shift) with its bit positions given at run time.
package assoc_pkg;

  localparam int unsigned POS_W  = 8;   // bit positions inside a word (K <= 255)
  localparam int unsigned ADDR_W = 16;  // word addresses (J <= 65536, 64K words)

  typedef enum logic [1:0] {
    TAG_KEEP    = 2'd0,
    TAG_SET     = 2'd1,   // SETAG:   t_j := 1
    TAG_SHIFT   = 2'd2,   // SHIFTAG: t_j := t_(j-1), t_0 := shift-in
    TAG_SELECT  = 2'd3    // t := d(sel), one word by address
  } tag_op_e;

  typedef enum logic [1:0] {
    LD_KEEP = 2'd0,
    LD_ZERO = 2'd1,
    LD_ONE  = 2'd2,
    LD_IN   = 2'd3        // from the input bus i
  } ld_op_e;

  typedef enum logic [1:0] {
    MAJ_NONE    = 2'd0,
    MAJ_COMPARE = 2'd1,
    MAJ_WRITE   = 2'd2,
    MAJ_READ    = 2'd3
  } maj_op_e;

  typedef struct packed {
    tag_op_e tag;
    ld_op_e  ldc;
    ld_op_e  ldm;
    maj_op_e maj;
  } prim_cmd_t;

  localparam prim_cmd_t PRIM_NOP = '{tag: TAG_KEEP, ldc: LD_KEEP, ldm: LD_KEEP, maj: MAJ_NONE};

  typedef enum logic [2:0] {
    OP_PRIM  = 3'd0,   // one primitive cycle on A and on A'
    OP_M2M   = 3'd1,   // many-to-many comparison
    OP_MADD  = 3'd2,   // multi-operand addition
    OP_CPROP = 3'd3,   // carry propagation
    OP_SHIFT = 3'd4,   // shift a field down by one word
    OP_MSUB  = 3'd5    // multi-operand subtraction (two's complement)
  } ctrl_op_e;

  typedef struct packed {
    ctrl_op_e          op;
    prim_cmd_t         a_cmd;     // OP_PRIM: cycle on main memory A
    prim_cmd_t         ap_cmd;    // OP_PRIM: cycle on operand memory A'
    logic [ADDR_W-1:0] a_sel;     // OP_PRIM: word tagged by TAG_SELECT in A
    logic [ADDR_W-1:0] ap_sel;    // OP_PRIM: word tagged by TAG_SELECT in A'
    logic [POS_W-1:0]  a_pos;     // first bit in A (data / target field / FB)
    logic [POS_W-1:0]  ap_pos;    // first bit in A' (comparands / addends)
    logic [POS_W-1:0]  nbits;     // bits to process (M2M, MADD, MSUB, SHIFT)
    logic [POS_W-1:0]  nsplit;    // M2M: bits n >= nsplit (if nonzero) come from a_pos2
    logic [POS_W-1:0]  a_pos2;    // M2M: base of the second data field
    logic [POS_W-1:0]  end_pos;   // CPROP: first bit position not reached
    logic [POS_W-1:0]  carry_col; // carry / scratch column (Tables 2, 5, 6)
    logic [POS_W-1:0]  mark_col;  // candidate-mark column (MADD)
    logic              mark_val;  // MADD/MSUB: value of the mark on words that take part
  } ctrl_cmd_t;

endpackage
