// Self-checking testbench for assoc_mem.
// Drives random primitive-operation cycles (all tag, load and major
// operations, in every combination) into an 8-word x 12-bit memory and
// compares the tag register and read register with a reference model kept
// in the testbench. Stored words are checked by tagging each word with
// SELECT and reading it. A directed check exercises SHIFTAG with shift-in.
module tb_assoc_mem;
  import assoc_pkg::*;
  localparam int unsigned J = 8, K = 12;

  logic clk = 0, rst_n = 0;
  prim_cmd_t cmd;
  logic [K-1:0] i, o;
  logic [ADDR_W-1:0] sel;
  logic tag_sin;
  logic [J-1:0] t;
  int checks = 0, failures = 0;

  assoc_mem #(.J(J), .K(K)) dut (.clk, .rst_n, .cmd, .i, .sel, .tag_sin, .o, .t);

  always #5 clk = ~clk;

  // reference model
  logic [K-1:0] ra [J];
  logic [K-1:0] rc, rm, ro;
  logic [J-1:0] rt;

  task automatic model_step();
    logic [K-1:0] cn, mn;
    logic [J-1:0] tn;
    cn = cmd.ldc == LD_ZERO ? '0 : cmd.ldc == LD_ONE ? '1 : cmd.ldc == LD_IN ? i : rc;
    mn = cmd.ldm == LD_ZERO ? '0 : cmd.ldm == LD_ONE ? '1 : cmd.ldm == LD_IN ? i : rm;
    case (cmd.tag)
      TAG_SET:    tn = '1;
      TAG_SHIFT:  begin tn = rt << 1; tn[0] = tag_sin; end
      TAG_SELECT: begin tn = '0; if (sel < J) tn[sel] = 1'b1; end
      default:    tn = rt;
    endcase
    rc = cn; rm = mn;
    case (cmd.maj)
      MAJ_COMPARE: for (int j = 0; j < J; j++) tn[j] = tn[j] && ((ra[j] & mn) == (cn & mn));
      MAJ_WRITE:   for (int j = 0; j < J; j++) if (tn[j]) for (int k = 0; k < K; k++) if (mn[k]) ra[j][k] = cn[k];
      MAJ_READ:    begin ro = '0; for (int j = 0; j < J; j++) if (tn[j]) ro = ro | ra[j]; end
      default: ;
    endcase
    rt = tn;
  endtask

  task automatic cycle(prim_cmd_t c, logic [K-1:0] d, int s = 0, logic sin = 0);
    cmd = c; i = d; sel = ADDR_W'(s); tag_sin = sin;
    model_step();
    @(posedge clk); #1;
    checks++;
    if (t !== rt || o !== ro) begin
      failures++;
      $display("FAIL cmd=%p t=%b exp %b o=%h exp %h", c, t, rt, o, ro);
    end
  endtask

  task automatic check_contents();
    for (int j = 0; j < J; j++) begin
      cycle('{TAG_SELECT, LD_KEEP, LD_KEEP, MAJ_READ}, '0, j);
      checks++;
      if (o !== ra[j]) begin failures++; $display("FAIL word %0d = %h exp %h", j, o, ra[j]); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = PRIM_NOP; i = '0; sel = '0; tag_sin = 0;
    rc = '0; rm = '0; rt = '0; ro = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // Clear the array: SETAG; c := 0; m := 1; WRITE
    cycle('{TAG_SET, LD_ZERO, LD_ONE, MAJ_WRITE}, '0);
    // Load distinct words by SELECT
    for (int j = 0; j < J; j++)
      cycle('{TAG_SELECT, LD_IN, LD_ONE, MAJ_WRITE}, K'($urandom), j);
    check_contents();
    // Compare: every word against its own value must tag exactly that word
    cycle('{TAG_SET, LD_KEEP, LD_ONE, MAJ_NONE}, '0);
    for (int j = 0; j < J; j++) begin
      cycle('{TAG_SET, LD_IN, LD_KEEP, MAJ_COMPARE}, ra[j]);
      checks++;
      if (!t[j]) begin failures++; $display("FAIL compare did not tag word %0d", j); end
    end
    // Directed SHIFTAG: one tag walks down the register, ONE shifted in at the top
    cycle('{TAG_SELECT, LD_KEEP, LD_KEEP, MAJ_NONE}, '0, 2);
    cycle('{TAG_SHIFT, LD_KEEP, LD_KEEP, MAJ_NONE}, '0, 0, 1'b1);
    checks++;
    if (t !== J'(8'b0000_1001)) begin failures++; $display("FAIL shiftag t=%b", t); end
    // Random cycles
    for (int n = 0; n < 3000; n++) begin
      prim_cmd_t c;
      c.tag = tag_op_e'($urandom_range(3));
      c.ldc = ld_op_e'($urandom_range(3));
      c.ldm = ld_op_e'($urandom_range(3));
      c.maj = maj_op_e'($urandom_range(3));
      cycle(c, K'($urandom), $urandom_range(J - 1), 1'($urandom));
      if (n % 500 == 499) check_contents();
    end
    check_contents();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
