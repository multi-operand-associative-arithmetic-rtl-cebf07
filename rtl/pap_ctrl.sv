// Control unit of the partitioned associative processor.
//
// It drives the operand memory A' (F words of AW bits) and the main memory A
// (K-bit words whose top F bits are the partition flag field) one memory
// cycle per clock, and routes the tag register t' of A' into the flag field
// of the main-memory input bus: s(t', K-F, 0) = t' placed at bits K-F..K-1.
// A macro command (assoc_pkg::ctrl_cmd_t) is taken with cmd_valid/cmd_ready
// while the unit is idle and runs to completion:
//   OP_PRIM   one cycle with a_cmd on A and ap_cmd on A' (word I/O).
//   OP_M2M    many-to-many comparison: flags of A := 1, then for each of
//             nbits bit positions (A bit a_pos+n against A' bit ap_pos+n)
//             clear the flags of mismatching comparands (4 cycles per bit).
//             With nsplit > 0, A bits n >= nsplit come from a_pos2+n-nsplit,
//             so that one code can combine bits of two fields.
//   OP_MADD   multi-operand addition: for each of nbits bits, add bit
//             ap_pos+n of the addend of each set into bit a_pos+n of the
//             words of that set, carry in column carry_col, only on words
//             whose mark column equals mark_val (8 major + 2 minor steps =
//             9 memory cycles per bit). The final carry stays in carry_col.
//   OP_MSUB   multi-operand subtraction, same steps and time: the addend of
//             each set is subtracted (two's complement, borrow in carry_col).
//   OP_CPROP  propagate carry_col through bits a_pos..end_pos-1
//             (1 minor + 4 major steps = 4.5 cycles per bit).
//   OP_SHIFT  move bits a_pos..a_pos+nbits-1 of every word one word down
//             (word j-1 to word j), carry_col used as scratch (5 cycles per bit).
// Step sequences follow the bit-serial algorithms of the associative model;
// the macro-command interface, the run-time bit positions, the generalised
// mark value and the idle cycle between commands are this design's choices.
// mem_halfcyc counts executed memory time in half cycles: a step with a major
// operation counts 2, a step of minor operations only counts 1.
module pap_ctrl
  import assoc_pkg::*;
#(
  parameter int unsigned K  = 76,   // main-memory word length
  parameter int unsigned F  = 16,   // flags per word = words of A'
  parameter int unsigned AW = 24    // operand-memory word length
) (
  input  logic              clk,
  input  logic              rst_n,
  // macro command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  ctrl_cmd_t         cmd,
  input  logic [K-1:0]      a_data,   // OP_PRIM: input bus of A
  input  logic [AW-1:0]     ap_data,  // OP_PRIM: input bus of A'
  // main memory A
  output prim_cmd_t         a_cmd,
  output logic [K-1:0]      a_i,
  output logic [ADDR_W-1:0] a_sel,
  // operand memory A'
  output prim_cmd_t         ap_cmd,
  output logic [AW-1:0]     ap_i,
  output logic [ADDR_W-1:0] ap_sel,
  input  logic [F-1:0]      ap_t,     // tag register t' of A'
  // status
  output logic [31:0]       mem_halfcyc
);

  typedef enum logic [3:0] {S0, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10} step_e;

  logic             busy;
  ctrl_cmd_t        cur;
  step_e            step;
  logic [POS_W-1:0] cnt;
  logic [K-1:0]     dat_q;
  logic [AW-1:0]    apdat_q;

  // d() operator: ONE at the listed bit positions, ZERO elsewhere.
  function automatic logic [K-1:0] dK(input logic [POS_W-1:0] p);
    return (int'(p) < int'(K)) ? (K'(1) << p) : '0;
  endfunction
  function automatic logic [AW-1:0] dA(input logic [POS_W-1:0] p);
    return (int'(p) < int'(AW)) ? (AW'(1) << p) : '0;
  endfunction

  logic [K-1:0] flags_all, s_tp, mk, dpos, dcar, dmark;
  logic [POS_W-1:0] apos_n, appos_n;
  // M2M may take its bits from two fields: a_pos.. for n < nsplit, then a_pos2..
  assign apos_n  = (cur.op == OP_M2M && cur.nsplit != '0 && cnt >= cur.nsplit)
                 ? cur.a_pos2 + cnt - cur.nsplit : cur.a_pos + cnt;
  assign appos_n = cur.ap_pos + cnt;
  assign flags_all = {{F{1'b1}}, {(K-F){1'b0}}};
  assign s_tp      = {ap_t, {(K-F){1'b0}}};           // s(t', K-F, 0)
  assign dpos      = dK(apos_n);
  assign dcar      = dK(cur.carry_col);
  assign dmark     = dK(cur.mark_col);
  assign mk        = cur.mark_val ? dmark : '0;

  // Comparand/write pattern of the multi-operand add and subtract: carry
  // column := cv, current bit := av, mark column := mark_val.
  logic sub;
  assign sub = (cur.op == OP_MSUB);
  function automatic logic [K-1:0] pat(input logic cv, input logic av);
    return (cv ? dcar : '0) | (av ? dpos : '0) | mk;
  endfunction

  logic last;        // this step ends the command
  logic cnt_inc;

  function automatic prim_cmd_t pc(tag_op_e tg, ld_op_e lc, ld_op_e lm, maj_op_e mj);
    return '{tag: tg, ldc: lc, ldm: lm, maj: mj};
  endfunction

  always_comb begin
    a_cmd   = PRIM_NOP;
    ap_cmd  = PRIM_NOP;
    a_i     = '0;
    ap_i    = '0;
    a_sel   = cur.a_sel;
    ap_sel  = cur.ap_sel;
    last    = 1'b0;
    cnt_inc = 1'b0;
    if (busy) begin
      unique case (cur.op)
        OP_PRIM: begin
          a_cmd  = cur.a_cmd;
          ap_cmd = cur.ap_cmd;
          a_i    = dat_q;
          ap_i   = apdat_q;
          last   = 1'b1;
        end
        OP_M2M: begin
          unique case (step)
            S0: begin  // flags := 1; A': compare bit 0 against ZERO
              a_cmd  = pc(TAG_SET, LD_IN, LD_IN, MAJ_WRITE);  a_i = flags_all;
              ap_cmd = pc(TAG_SET, LD_ZERO, LD_IN, MAJ_COMPARE); ap_i = dA(appos_n);
            end
            S1: begin  // A: words with ONE in the current bit
              a_cmd = pc(TAG_SET, LD_IN, LD_IN, MAJ_COMPARE); a_i = dpos;
            end
            S2: begin  // clear flags of comparands with ZERO; A': compare to ONE
              a_cmd  = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_WRITE); a_i = s_tp;
              ap_cmd = pc(TAG_SET, LD_IN, LD_KEEP, MAJ_COMPARE); ap_i = dA(appos_n);
            end
            S3: begin  // A: words with ZERO in the current bit
              a_cmd = pc(TAG_SET, LD_ZERO, LD_IN, MAJ_COMPARE); a_i = dpos;
              cnt_inc = 1'b1;
            end
            S4: begin  // clear flags of comparands with ONE; A': next bit against ZERO
              a_cmd  = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_WRITE); a_i = s_tp;
              ap_cmd = pc(TAG_SET, LD_ZERO, LD_IN, MAJ_COMPARE); ap_i = dA(appos_n);
              last   = (cnt >= cur.nbits);
            end
            default: ;
          endcase
        end
        OP_MADD, OP_MSUB: begin
          // Four actions per bit, each "compare (carry, a) then write
          // (carry, a)"; addition and subtraction differ only in the values.
          unique case (step)
            S0: begin  // carry := 0; A': current addend bit against ONE
              a_cmd  = pc(TAG_SET, LD_ZERO, LD_IN, MAJ_WRITE); a_i = dcar;
              ap_cmd = pc(TAG_SET, LD_IN, LD_IN, MAJ_COMPARE); ap_i = dA(appos_n);
            end
            // addend bit ZERO (flags of ONE-addends must be ZERO)
            S1: begin a_cmd = pc(TAG_SET,  LD_IN, LD_KEEP, MAJ_NONE);    a_i = pat(1'b1, sub); end
            S2: begin a_cmd = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_COMPARE); a_i = dpos | dcar | dmark | s_tp; end
            S3: begin a_cmd = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_WRITE);   a_i = pat(1'b0, !sub); end
            S4: begin a_cmd = pc(TAG_SET,  LD_IN, LD_KEEP, MAJ_COMPARE); a_i = pat(1'b1, !sub); end
            S5: begin
              a_cmd  = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_WRITE); a_i = pat(1'b1, sub);
              ap_cmd = pc(TAG_SET, LD_ZERO, LD_KEEP, MAJ_COMPARE);
            end
            // addend bit ONE (flags of ZERO-addends must be ZERO)
            S6: begin a_cmd = pc(TAG_SET,  LD_IN, LD_KEEP, MAJ_NONE);    a_i = pat(1'b0, !sub); end
            S7: begin a_cmd = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_COMPARE); a_i = dpos | dcar | dmark | s_tp; end
            S8: begin a_cmd = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_WRITE);   a_i = pat(1'b1, sub); end
            S9: begin a_cmd = pc(TAG_SET,  LD_IN, LD_KEEP, MAJ_COMPARE); a_i = pat(1'b0, sub); end
            S10: begin
              a_cmd  = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_WRITE); a_i = pat(1'b0, !sub);
              ap_cmd = pc(TAG_SET, LD_IN, LD_IN, MAJ_COMPARE);  ap_i = dA(appos_n + 1'b1);
              cnt_inc = 1'b1;
              last    = (cnt + 1'b1 >= cur.nbits);
            end
            default: ;
          endcase
        end
        OP_CPROP: begin
          unique case (step)
            S1: begin a_cmd = pc(TAG_SET,  LD_KEEP, LD_IN, MAJ_NONE);    a_i = dpos | dcar; end
            S2: begin a_cmd = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_COMPARE); a_i = dcar; end
            S3: begin a_cmd = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_WRITE);   a_i = dpos; end
            S4: begin a_cmd = pc(TAG_SET,  LD_IN, LD_KEEP, MAJ_COMPARE); a_i = dpos | dcar; end
            S5: begin
              a_cmd = pc(TAG_KEEP, LD_IN, LD_KEEP, MAJ_WRITE); a_i = dcar;
              cnt_inc = 1'b1;
              last    = (apos_n + 1'b1 >= cur.end_pos);
            end
            default: ;
          endcase
        end
        OP_SHIFT: begin
          unique case (step)
            S1: begin a_cmd = pc(TAG_SET,   LD_ZERO, LD_IN, MAJ_WRITE);   a_i = dcar; end
            S2: begin a_cmd = pc(TAG_KEEP,  LD_IN,   LD_IN, MAJ_COMPARE); a_i = dpos; end
            S3: begin a_cmd = pc(TAG_SHIFT, LD_IN,   LD_IN, MAJ_WRITE);   a_i = dpos | dcar; end
            S4: begin a_cmd = pc(TAG_SET,   LD_ZERO, LD_IN, MAJ_COMPARE); a_i = dcar; end
            S5: begin
              a_cmd = pc(TAG_KEEP, LD_KEEP, LD_IN, MAJ_WRITE); a_i = dpos;
              cnt_inc = 1'b1;
              last    = (cnt + 1'b1 >= cur.nbits);
            end
            default: ;
          endcase
        end
        default: last = 1'b1;
      endcase
    end
  end

  // Next step within the running command.
  function automatic step_e next_step(ctrl_op_e op, step_e s);
    unique case (op)
      OP_M2M:   return (s == S4)  ? S1 : step_e'(s + 1'b1);
      OP_MADD, OP_MSUB: return (s == S10) ? S1 : step_e'(s + 1'b1);
      default:  return (s == S5)  ? S1 : step_e'(s + 1'b1);
    endcase
  endfunction

  // A command with nothing to do (zero bits) finishes without memory cycles.
  function automatic logic empty_cmd(ctrl_cmd_t c);
    unique case (c.op)
      OP_M2M, OP_MADD, OP_MSUB, OP_SHIFT: return c.nbits == '0;
      OP_CPROP:                  return c.a_pos >= c.end_pos;
      default:                   return 1'b0;
    endcase
  endfunction

  assign cmd_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cur         <= '0;
      step        <= S0;
      cnt         <= '0;
      dat_q       <= '0;
      apdat_q     <= '0;
      mem_halfcyc <= '0;
    end else if (!busy) begin
      if (cmd_valid && !empty_cmd(cmd)) begin
        busy    <= 1'b1;
        cur     <= cmd;
        cnt     <= '0;
        dat_q   <= a_data;
        apdat_q <= ap_data;
        // CPROP and SHIFT have no step 0 memory cycle
        step    <= (cmd.op == OP_CPROP || cmd.op == OP_SHIFT) ? S1 : S0;
      end
    end else begin
      if (a_cmd.maj != MAJ_NONE || ap_cmd.maj != MAJ_NONE) mem_halfcyc <= mem_halfcyc + 32'd2;
      else if (a_cmd != PRIM_NOP || ap_cmd != PRIM_NOP)     mem_halfcyc <= mem_halfcyc + 32'd1;
      if (cnt_inc) cnt <= cnt + 1'b1;
      if (last) busy <= 1'b0;
      else      step <= next_step(cur.op, step);
    end
  end

  // The flag field must lie above every other field that the unit addresses.
  initial assert (F < K) else $error("pap_ctrl: F must be below K");

endmodule
