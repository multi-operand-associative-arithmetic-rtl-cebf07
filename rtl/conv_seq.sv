// Convolution sequencer: computes hp = h * p (full linear convolution of
// P-element vectors) in main memory A by issuing macro commands to the
// control unit (pap_ctrl). V data vectors are convolved by the same filter at
// once: vector v occupies words 2Pv .. 2Pv+2P-1 (p in the first P words, the
// rest a gap the results grow into), and every memory operation acts on all
// regions together, so V vectors take the time of one.
//
// Main-memory word (bit 0 at the right), K = 2^B + N + 2 + HPW:
//   | flags (2^B) | p (N) | MRK | TMP | hp (HPW) |
// Operand-memory word: | multiple of h (M+B) | code (B) |.
// Phases:
//   1  clear A; read V*P values from p_* (vector by vector) into the first P
//      words of each region with MRK := 1;
//      write the codes 0..2^B-1 into the code field of A'.
//   2  take h_EC from h_*; write f*h_EC into the multiple field of word f of
//      A' (multiples formed here by repeated addition); BG := 0.
//   3  many-to-many compare of p bits B*BG..B*BG+B-1 against the codes:
//      every word is flagged with the code of its current B-bit group.
//   4  multi-operand add of the selected multiple into hp at bit B*BG
//      (marked words only), carry in TMP.
//   5  propagate TMP through hp bits B*(BG+1)+M .. HPW-1.
//   6  BG := BG+1; back to 3 while B*BG < N.
//   7  EC := EC+1; when EC = P go to read-out.
//   8  shift the p field and MRK one word down; back to 2.
// Read-out (this design's addition): words 0..2P-2 of each region are read
// one by one and their hp fields leave on y_* (valid/ready), vector by vector.
// The phase structure follows the associative convolution algorithm; the
// streaming interfaces, the address-select I/O and forming the multiples by
// repeated addition are choices of this design. The macro command goes out on
// cmd_* and the next one is offered only after the control unit has accepted it
// and become ready again.
module conv_seq
  import assoc_pkg::*;
#(
  parameter int unsigned P   = 1024,  // vector length
  parameter int unsigned V   = 1,     // data vectors convolved at once
  parameter int unsigned N   = 16,    // precision of p
  parameter int unsigned M   = 16,    // precision of h
  parameter int unsigned B   = 4,     // multiplier bits per iteration
  parameter int unsigned HPW = M + N + $clog2(P),
  parameter int unsigned F   = 2**B,
  parameter int unsigned K   = F + N + 2 + HPW,
  parameter int unsigned AW  = M + 2*B
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,       // one-cycle pulse at the end
  // data vector in
  input  logic              p_valid,
  output logic              p_ready,
  input  logic [N-1:0]      p_data,
  // filter vector in, one element per major loop
  input  logic              h_valid,
  output logic              h_ready,
  input  logic [M-1:0]      h_data,
  // result out, 2P-1 elements
  output logic              y_valid,
  input  logic              y_ready,
  output logic [HPW-1:0]    y_data,
  // control unit
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output ctrl_cmd_t         cmd,
  output logic [K-1:0]      a_data,
  output logic [AW-1:0]     ap_data,
  input  logic [K-1:0]      a_o          // read register of A
);

  localparam int unsigned HP_POS  = 0;
  localparam int unsigned TMP_POS = HPW;
  localparam int unsigned MRK_POS = HPW + 1;
  localparam int unsigned P_POS   = HPW + 2;
  localparam int unsigned NBG     = (N + B - 1) / B;
  localparam int unsigned EW      = $clog2(2*P + F);
  localparam int unsigned VW      = $clog2(V + 1);

  typedef enum logic [3:0] {
    C_IDLE, C_CLEAR, C_LOADP, C_CMASK, C_CODES, C_GETH, C_HMASK, C_MULTS,
    C_M2M, C_MADD, C_CPROP, C_NEXT, C_SHIFT, C_READ, C_WAITRD, C_OUT
  } state_e;

  state_e            st;
  logic [EW-1:0]     idx;      // word index for load / read-out
  logic [VW-1:0]     vec;      // data vector for load / read-out
  logic [ADDR_W-1:0] vbase;    // first word of that vector's region
  logic [EW-1:0]     ec;       // filter element count
  logic [POS_W-1:0]  bg;       // bit-group count
  logic [M+B-1:0]    hq, mult; // current h and its running multiple
  logic              issued;   // command of this state accepted

  function automatic prim_cmd_t pc(tag_op_e tg, ld_op_e lc, ld_op_e lm, maj_op_e mj);
    return '{tag: tg, ldc: lc, ldm: lm, maj: mj};
  endfunction

  // Command offered in each state.
  always_comb begin
    cmd       = '0;
    cmd.op    = OP_PRIM;
    cmd.a_cmd = PRIM_NOP;
    cmd.ap_cmd= PRIM_NOP;
    cmd_valid = 1'b0;
    a_data    = '0;
    ap_data   = '0;
    p_ready   = 1'b0;
    unique case (st)
      C_CLEAR: begin   // whole memory := 0
        cmd_valid = 1'b1;
        cmd.a_cmd = pc(TAG_SET, LD_ZERO, LD_ONE, MAJ_WRITE);
      end
      C_LOADP: begin   // word idx := {p, MRK}
        cmd_valid = p_valid;
        p_ready   = cmd_ready;
        cmd.a_cmd = pc(TAG_SELECT, LD_IN, LD_ONE, MAJ_WRITE);
        cmd.a_sel = vbase + ADDR_W'(idx);
        a_data    = (K'(p_data) << P_POS) | (K'(1) << MRK_POS);
      end
      C_CMASK: begin   // A': m' := code field
        cmd_valid  = 1'b1;
        cmd.ap_cmd = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_NONE);
        ap_data    = AW'((1 << B) - 1);
      end
      C_CODES: begin   // A' word idx: code := idx
        cmd_valid  = 1'b1;
        cmd.ap_cmd = pc(TAG_SELECT, LD_IN, LD_KEEP, MAJ_WRITE);
        cmd.ap_sel = ADDR_W'(idx);
        ap_data    = AW'(idx);
      end
      C_HMASK: begin   // A': m' := multiple field
        cmd_valid  = 1'b1;
        cmd.ap_cmd = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_NONE);
        ap_data    = ~AW'((1 << B) - 1);
      end
      C_MULTS: begin   // A' word idx: multiple := idx * h
        cmd_valid  = 1'b1;
        cmd.ap_cmd = pc(TAG_SELECT, LD_IN, LD_KEEP, MAJ_WRITE);
        cmd.ap_sel = ADDR_W'(idx);
        ap_data    = AW'(mult) << B;
      end
      C_M2M: begin
        cmd_valid  = !issued;
        cmd.op     = OP_M2M;
        cmd.a_pos  = POS_W'(P_POS + B*bg);
        cmd.ap_pos = '0;
        cmd.nbits  = POS_W'(B);
      end
      C_MADD: begin
        cmd_valid     = !issued;
        cmd.op        = OP_MADD;
        cmd.a_pos     = POS_W'(HP_POS + B*bg);
        cmd.ap_pos    = POS_W'(B);
        cmd.nbits     = POS_W'(M + B);
        cmd.carry_col = POS_W'(TMP_POS);
        cmd.mark_col  = POS_W'(MRK_POS);
        cmd.mark_val  = 1'b1;
      end
      C_CPROP: begin
        cmd_valid     = !issued;
        cmd.op        = OP_CPROP;
        cmd.a_pos     = POS_W'(HP_POS + B*(32'(bg) + 1) + M);
        cmd.end_pos   = POS_W'(HP_POS + HPW);
        cmd.carry_col = POS_W'(TMP_POS);
      end
      C_SHIFT: begin   // p field and marker down one word
        cmd_valid     = !issued;
        cmd.op        = OP_SHIFT;
        cmd.a_pos     = POS_W'(MRK_POS);
        cmd.nbits     = POS_W'(N + 1);
        cmd.carry_col = POS_W'(TMP_POS);
      end
      C_READ: begin
        cmd_valid = 1'b1;
        cmd.a_cmd = pc(TAG_SELECT, LD_KEEP, LD_KEEP, MAJ_READ);
        cmd.a_sel = vbase + ADDR_W'(idx);
      end
      default: ;
    endcase
  end

  logic acc;
  assign acc   = cmd_valid && cmd_ready;
  assign vbase = ADDR_W'(vec) * ADDR_W'(2*P);

  assign busy    = (st != C_IDLE);
  assign h_ready = (st == C_GETH);
  assign y_valid = (st == C_OUT);
  assign y_data  = a_o[HP_POS +: HPW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= C_IDLE;
      idx    <= '0;
      vec    <= '0;
      ec     <= '0;
      bg     <= '0;
      hq     <= '0;
      mult   <= '0;
      issued <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE:  if (start) st <= C_CLEAR;
        C_CLEAR: if (acc) begin st <= C_LOADP; idx <= '0; vec <= '0; end
        C_LOADP: if (acc) begin
          idx <= idx + 1'b1;
          if (idx == EW'(P - 1)) begin
            idx <= '0;
            vec <= vec + 1'b1;
            if (vec == VW'(V - 1)) st <= C_CMASK;
          end
        end
        C_CMASK: if (acc) begin st <= C_CODES; idx <= '0; end
        C_CODES: if (acc) begin
          idx <= idx + 1'b1;
          if (idx == EW'(F - 1)) begin st <= C_GETH; ec <= '0; end
        end
        C_GETH:  if (h_valid) begin hq <= (M+B)'(h_data); st <= C_HMASK; end
        C_HMASK: if (acc) begin st <= C_MULTS; idx <= '0; mult <= '0; end
        C_MULTS: if (acc) begin
          idx  <= idx + 1'b1;
          mult <= mult + hq;
          if (idx == EW'(F - 1)) begin st <= C_M2M; bg <= '0; end
        end
        // Macro commands: wait for acceptance, then for the unit to finish.
        C_M2M, C_MADD, C_CPROP, C_SHIFT: begin
          if (acc) issued <= 1'b1;
          if (issued && cmd_ready) begin
            issued <= 1'b0;
            unique case (st)
              C_M2M:   st <= C_MADD;
              C_MADD:  st <= C_CPROP;
              C_CPROP: st <= C_NEXT;
              default: st <= C_GETH;
            endcase
          end
        end
        C_NEXT: begin
          if (bg + 1'b1 < POS_W'(NBG)) begin
            bg <= bg + 1'b1;
            st <= C_M2M;
          end else if (ec == EW'(P - 1)) begin
            st  <= C_READ;
            idx <= '0;
            vec <= '0;
          end else begin
            ec <= ec + 1'b1;
            st <= C_SHIFT;
          end
        end
        C_READ:   if (acc) st <= C_WAITRD;
        C_WAITRD: if (cmd_ready) st <= C_OUT;
        C_OUT: if (y_ready) begin
          idx <= idx + 1'b1;
          st  <= C_READ;
          if (idx == EW'(2*P - 2)) begin
            idx <= '0;
            vec <= vec + 1'b1;
            if (vec == VW'(V - 1)) begin st <= C_IDLE; done <= 1'b1; end
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
