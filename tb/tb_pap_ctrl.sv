// Self-checking testbench for pap_ctrl, run with the two associative
// memories it drives. Main memory: 16 words of 12 bits laid out as
// | flags(4) | mark | carry | number(6) |; operand memory: 4 words of 6 bits.
// Each macro command is run on random data and the memory contents are
// compared with results computed here by ordinary arithmetic; the executed
// memory time is compared with the cycle counts of the algorithms:
// M2M 1+4n cycles, MADD and MSUB 1+9n, CPROP 4.5 per bit, SHIFT 5 per bit.
module tb_pap_ctrl;
  import assoc_pkg::*;
  localparam int unsigned J = 16, NB = 6, F = 4, K = NB + 2 + F, AW = NB;
  localparam int unsigned CAR = NB, MRK = NB + 1, FLG = K - F;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready;
  ctrl_cmd_t cmd;
  logic [K-1:0] a_data, a_i, a_o;
  logic [AW-1:0] ap_data, ap_i, ap_o;
  prim_cmd_t a_cmd, ap_cmd;
  logic [ADDR_W-1:0] a_sel, ap_sel;
  logic [F-1:0] ap_t;
  logic [J-1:0] a_t;
  logic [31:0] halfcyc;
  int checks = 0, failures = 0;

  pap_ctrl #(.K(K), .F(F), .AW(AW)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .a_data, .ap_data,
    .a_cmd, .a_i, .a_sel, .ap_cmd, .ap_i, .ap_sel, .ap_t, .mem_halfcyc(halfcyc));
  assoc_mem #(.J(J), .K(K))  u_a  (.clk, .rst_n, .cmd(a_cmd),  .i(a_i),  .sel(a_sel),  .tag_sin(1'b0), .o(a_o),  .t(a_t));
  assoc_mem #(.J(F), .K(AW)) u_ap (.clk, .rst_n, .cmd(ap_cmd), .i(ap_i), .sel(ap_sel), .tag_sin(1'b0), .o(ap_o), .t(ap_t));

  always #5 clk = ~clk;

  task automatic run(ctrl_cmd_t c, logic [K-1:0] ad = '0, logic [AW-1:0] apd = '0);
    while (!cmd_ready) @(posedge clk);
    cmd = c; a_data = ad; ap_data = apd; cmd_valid = 1;
    @(posedge clk);
    cmd_valid = 0;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
  endtask

  function automatic ctrl_cmd_t prim(prim_cmd_t ac, prim_cmd_t apc, int as = 0, int aps = 0);
    ctrl_cmd_t c = '0;
    c.op = OP_PRIM; c.a_cmd = ac; c.ap_cmd = apc; c.a_sel = ADDR_W'(as); c.ap_sel = ADDR_W'(aps);
    return c;
  endfunction

  task automatic write_a(int j, logic [K-1:0] v);
    run(prim('{TAG_SELECT, LD_IN, LD_ONE, MAJ_WRITE}, PRIM_NOP, j), v);
  endtask
  task automatic write_ap(int f, logic [AW-1:0] v);
    run(prim(PRIM_NOP, '{TAG_SELECT, LD_IN, LD_ONE, MAJ_WRITE}, 0, f), '0, v);
  endtask
  task automatic read_a(int j, output logic [K-1:0] v);
    run(prim('{TAG_SELECT, LD_KEEP, LD_KEEP, MAJ_READ}, PRIM_NOP, j));
    v = a_o;
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  logic [K-1:0] w [J];
  logic [AW-1:0] opnd [F];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_cmd_t c;
    logic [K-1:0] v;
    int unsigned h0;
    cmd_valid = 0; cmd = '0; a_data = '0; ap_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      // ---------------- many-to-many comparison ----------------
      for (int f = 0; f < F; f++) begin
        opnd[f] = AW'($urandom);
        for (int g = 0; g < f; g++) if (opnd[g] == opnd[f]) opnd[f] = opnd[f] + 1'b1;
        write_ap(f, opnd[f]);
      end
      for (int j = 0; j < J; j++) begin
        w[j] = K'($urandom);
        if (j % 2 == 0) w[j][NB-1:0] = opnd[$urandom_range(F-1)];
        write_a(j, w[j]);
      end
      c = '0; c.op = OP_M2M; c.a_pos = 0; c.ap_pos = 0; c.nbits = NB;
      h0 = halfcyc;
      run(c);
      check("M2M half cycles", halfcyc - h0, 2 * (1 + 4 * NB));
      for (int j = 0; j < J; j++) begin
        logic [F-1:0] ef;
        for (int f = 0; f < F; f++) ef[f] = (w[j][NB-1:0] == opnd[f]);
        read_a(j, v);
        check($sformatf("M2M word %0d flags", j), v[K-1 -: F], ef);
        check($sformatf("M2M word %0d rest", j), v[K-F-1:0], w[j][K-F-1:0]);
      end

      // ---------------- multi-operand addition ----------------
      for (int f = 0; f < F; f++) begin opnd[f] = AW'($urandom); write_ap(f, opnd[f]); end
      for (int j = 0; j < J; j++) begin
        int s = $urandom_range(F-1);
        w[j] = '0;
        w[j][FLG + s] = 1'b1;
        w[j][MRK] = ($urandom_range(3) == 0);   // ONE: not a candidate
        w[j][CAR] = 1'($urandom);               // cleared by step 0
        w[j][NB-1:0] = NB'($urandom);
        write_a(j, w[j]);
      end
      c = '0; c.op = OP_MADD; c.a_pos = 0; c.ap_pos = 0; c.nbits = NB;
      c.carry_col = CAR; c.mark_col = MRK; c.mark_val = 1'b0;
      h0 = halfcyc;
      run(c);
      check("MADD half cycles", halfcyc - h0, 2 + 18 * NB);
      for (int j = 0; j < J; j++) begin
        logic [NB:0] sum;
        int s = 0;
        for (int f = 0; f < F; f++) if (w[j][FLG + f]) s = f;
        sum = w[j][MRK] ? {1'b0, w[j][NB-1:0]} : w[j][NB-1:0] + opnd[s];
        read_a(j, v);
        check($sformatf("MADD word %0d number", j), v[NB-1:0], sum[NB-1:0]);
        check($sformatf("MADD word %0d carry", j), v[CAR], w[j][MRK] ? 1'b0 : sum[NB]);
        check($sformatf("MADD word %0d flags/mark", j), v[K-1:MRK], w[j][K-1:MRK]);
      end

      // ---------------- multi-operand subtraction ----------------
      for (int f = 0; f < F; f++) begin opnd[f] = AW'($urandom); write_ap(f, opnd[f]); end
      for (int j = 0; j < J; j++) begin
        int s = $urandom_range(F-1);
        w[j] = '0;
        w[j][FLG + s] = 1'b1;
        w[j][MRK] = ($urandom_range(3) == 0);
        w[j][CAR] = 1'($urandom);
        w[j][NB-1:0] = NB'($urandom);
        write_a(j, w[j]);
      end
      c = '0; c.op = OP_MSUB; c.a_pos = 0; c.ap_pos = 0; c.nbits = NB;
      c.carry_col = CAR; c.mark_col = MRK; c.mark_val = 1'b0;
      h0 = halfcyc;
      run(c);
      check("MSUB half cycles", halfcyc - h0, 2 + 18 * NB);
      for (int j = 0; j < J; j++) begin
        logic [NB:0] dif;
        int s = 0;
        for (int f = 0; f < F; f++) if (w[j][FLG + f]) s = f;
        dif = {1'b0, w[j][NB-1:0]} - {1'b0, opnd[s]};
        read_a(j, v);
        if (w[j][MRK]) begin
          check($sformatf("MSUB word %0d untouched", j), {v[CAR], v[NB-1:0]}, {1'b0, w[j][NB-1:0]});
        end else begin
          check($sformatf("MSUB word %0d difference", j), v[NB-1:0], dif[NB-1:0]);
          check($sformatf("MSUB word %0d borrow", j), v[CAR], dif[NB]);
        end
      end

      // ---------------- carry propagation (bits 2..5) ----------------
      for (int j = 0; j < J; j++) begin
        w[j] = K'($urandom);
        write_a(j, w[j]);
      end
      c = '0; c.op = OP_CPROP; c.a_pos = 2; c.end_pos = NB; c.carry_col = CAR;
      h0 = halfcyc;
      run(c);
      check("CPROP half cycles", halfcyc - h0, 9 * (NB - 2));
      for (int j = 0; j < J; j++) begin
        logic [NB-2:0] s;
        s = w[j][NB-1:2] + w[j][CAR];
        read_a(j, v);
        check($sformatf("CPROP word %0d field", j), v[NB-1:2], s[NB-3:0]);
        check($sformatf("CPROP word %0d carry", j), v[CAR], s[NB-2]);
        check($sformatf("CPROP word %0d low bits", j), v[1:0], w[j][1:0]);
      end

      // ---------------- field shift (bits 1..4 down one word) ----------------
      for (int j = 0; j < J; j++) begin
        w[j] = K'($urandom);
        write_a(j, w[j]);
      end
      c = '0; c.op = OP_SHIFT; c.a_pos = 1; c.nbits = 4; c.carry_col = CAR;
      h0 = halfcyc;
      run(c);
      check("SHIFT half cycles", halfcyc - h0, 10 * 4);
      for (int j = 0; j < J; j++) begin
        read_a(j, v);
        check($sformatf("SHIFT word %0d field", j), v[4:1], j == 0 ? 4'h0 : w[j-1][4:1]);
        check($sformatf("SHIFT word %0d other", j), {v[K-1:CAR+1], v[CAR-1:5], v[0]},
              {w[j][K-1:CAR+1], w[j][CAR-1:5], w[j][0]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
