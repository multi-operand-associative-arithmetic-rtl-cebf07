// Fully parallel associative memory (storage array A, comparand c, mask m,
// tag register t).
//
// J words of K bits. Every clock is one memory cycle. The minor operations of
// a cycle (tag operation, LOAD c, LOAD m) act first and the major operation
// (COMPARE, WRITE or READ) then sees their results, so "c := ..; SETAG;
// COMPARE" in one cycle compares all words against the new comparand:
//   SETAG    t_j := 1                     SHIFTAG  t_j := t_(j-1), t_0 := tag_sin
//   LOAD c   c := 0, 1 or i               LOAD m   m := 0, 1 or i
//   COMPARE  t_j := t_j & ~|(m & (a_j ^ c))   (masked bits all equal)
//   WRITE    a_jk := m_k ? c_k : a_jk  on every tagged word
//   READ     o := OR over tagged words of a_j
// c and m can only be loaded from the single input bus i, so when both take
// the bus in one cycle they receive the same data, as the model requires.
// TAG_SELECT (t := one-hot(sel)) is an addition of this design for word I/O;
// tag_sin is the tag shifted into word 0 (a following chip would take t[J-1]).
// The register t and the read register o are outputs; o is valid the cycle
// after READ. The array has no reset: the algorithms clear what they use.
module assoc_mem
  import assoc_pkg::*;
#(
  parameter int unsigned J = 2048,
  parameter int unsigned K = 76
) (
  input  logic          clk,
  input  logic          rst_n,
  input  prim_cmd_t     cmd,
  input  logic [K-1:0]  i,        // input bus
  input  logic [ADDR_W-1:0] sel,  // word tagged by TAG_SELECT
  input  logic          tag_sin,  // shifted into t_0 by SHIFTAG
  output logic [K-1:0]  o,        // output bus (READ result)
  output logic [J-1:0]  t         // tag register
);

  logic [K-1:0] c, m;
  logic [K-1:0] c_n, m_n;
  logic [J-1:0] t_pre;
  logic [J-1:0] match;
  logic [K-1:0] rd_term [J];

  // Minor operations: first half of the cycle.
  always_comb begin
    unique case (cmd.ldc)
      LD_ZERO: c_n = '0;
      LD_ONE:  c_n = '1;
      LD_IN:   c_n = i;
      default: c_n = c;
    endcase
    unique case (cmd.ldm)
      LD_ZERO: m_n = '0;
      LD_ONE:  m_n = '1;
      LD_IN:   m_n = i;
      default: m_n = m;
    endcase
    unique case (cmd.tag)
      TAG_SET:    t_pre = '1;
      TAG_SHIFT:  t_pre = {t[J-2:0], tag_sin};
      TAG_SELECT: t_pre = (32'(sel) < J) ? (J'(1) << sel) : '0;
      default:    t_pre = t;
    endcase
  end

  // One row of the storage array per word: WRITE on tagged words (masked bits
  // only), match detection for COMPARE, gated contribution to READ.
  for (genvar j = 0; j < J; j++) begin : g_word
    logic [K-1:0] a;
    always_ff @(posedge clk) begin
      if (cmd.maj == MAJ_WRITE && t_pre[j]) a <= (a & ~m_n) | (c_n & m_n);
    end
    assign match[j]   = ~|(m_n & (a ^ c_n));
    assign rd_term[j] = t_pre[j] ? a : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
      m <= '0;
      t <= '0;
    end else begin
      c <= c_n;
      m <= m_n;
      t <= (cmd.maj == MAJ_COMPARE) ? (t_pre & match) : t_pre;
    end
  end

  // READ: OR of all tagged words.
  logic [K-1:0] rd_or;
  always_comb begin
    rd_or = '0;
    for (int unsigned j = 0; j < J; j++) rd_or |= rd_term[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   o <= '0;
    else if (cmd.maj == MAJ_READ) o <= rd_or;
  end

endmodule
