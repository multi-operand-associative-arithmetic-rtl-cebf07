// End-to-end testbench for pap_top at reduced size (P=8, V=2, N=M=8, B=2,
// 32 words of 33 bits). It runs, through the host port and the convolution
// sequencer, every mechanism of the processor and checks results against
// ordinary arithmetic done here:
//   1. multi-operand addition: 4 addends, each added to its own set of words;
//      words with the candidate mark ONE are left alone;
//   2. multi-operand multiplication: 4 multiplicands, each set of words holds
//      its own multipliers, by N multi-operand additions conditional on the
//      current multiplier bit, each followed by one place of carry;
//   3. single vector-scalar multiplication handling B multiplier bits per
//      iteration: codes and multiples in A', many-to-many partition, then
//      multi-operand addition and carry propagation;
//   3b. a limited sum of products x*C + y*S handling one bit of x and one
//      of y per iteration (partition on a code taken from two fields);
//   3c. multi-operand subtraction of 4 subtrahends from their sets;
//   4. a convolution of two data vectors by one filter, with back-pressure on
//      all streams, during which host commands must be refused.
// It counts how often each mechanism ran (many-to-many compare, multi-add,
// two-field partition, multi-operand subtraction, carry propagation, field
// shift, word write by select, read, host refusal, output back-pressure) and fails for any that never happened.
module tb_pap_top;
  import assoc_pkg::*;
  localparam int unsigned P = 8, V = 2, N = 8, M = 8, B = 2, J = 2*P*V;
  localparam int unsigned HPW = M + N + $clog2(P), F = 2**B, K = F + N + 2 + HPW, AW = M + 2*B;
  localparam int unsigned TMP = HPW, MRK = HPW + 1, PP = HPW + 2, FLG = K - F;

  logic clk = 0, rst_n = 0;
  logic host_valid, host_ready;
  ctrl_cmd_t host_cmd;
  logic [K-1:0] host_a_data, a_o;
  logic [AW-1:0] host_ap_data, ap_o;
  logic conv_start, conv_busy, conv_done;
  logic p_valid, p_ready, h_valid, h_ready, y_valid, y_ready;
  logic [N-1:0] p_data;
  logic [M-1:0] h_data;
  logic [HPW-1:0] y_data;
  logic [F-1:0] ap_t;
  logic [31:0] halfcyc;
  int checks = 0, failures = 0;

  pap_top #(.P(P), .V(V), .N(N), .M(M), .B(B)) dut (
    .clk, .rst_n, .host_valid, .host_ready, .host_cmd, .host_a_data, .host_ap_data,
    .conv_start, .conv_busy, .conv_done, .p_valid, .p_ready, .p_data,
    .h_valid, .h_ready, .h_data, .y_valid, .y_ready, .y_data,
    .a_o, .ap_o, .ap_t, .mem_halfcyc(halfcyc));

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_split, n_msub, n_m2m, n_madd, n_cprop, n_shift, n_selw, n_read, n_refused, n_ybp;
  always_ff @(posedge clk) begin
    if (dut.u_ctrl.cmd_valid && dut.u_ctrl.cmd_ready) begin
      if (dut.u_ctrl.cmd.op == OP_M2M && dut.u_ctrl.cmd.nsplit != 0) n_split++;
      if (dut.u_ctrl.cmd.op == OP_MSUB) n_msub++;
      case (dut.u_ctrl.cmd.op)
        OP_M2M:   n_m2m++;
        OP_MADD:  n_madd++;
        OP_CPROP: n_cprop++;
        OP_SHIFT: n_shift++;
        default: begin
          if (dut.u_ctrl.cmd.a_cmd.tag == TAG_SELECT && dut.u_ctrl.cmd.a_cmd.maj == MAJ_WRITE) n_selw++;
          if (dut.u_ctrl.cmd.a_cmd.maj == MAJ_READ) n_read++;
        end
      endcase
    end
    if (host_valid && conv_busy) begin
      n_refused++;
      checks++;
      if (host_ready) begin failures++; $display("FAIL host command accepted during convolution"); end
    end
    if (y_valid && !y_ready) n_ybp++;
  end

  // ---------------- host helpers ----------------
  task automatic run(ctrl_cmd_t c, logic [K-1:0] ad = '0, logic [AW-1:0] apd = '0);
    @(negedge clk);
    host_cmd = c; host_a_data = ad; host_ap_data = apd; host_valid = 1;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
    while (!host_ready) @(negedge clk);
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
  function automatic ctrl_cmd_t mcmd(ctrl_op_e op, int apos, int appos, int nb, int endp = 0,
                                     int car = TMP, int mark = MRK, logic mval = 1'b1);
    ctrl_cmd_t c = '0;
    c.op = op; c.a_pos = POS_W'(apos); c.ap_pos = POS_W'(appos); c.nbits = POS_W'(nb);
    c.end_pos = POS_W'(endp); c.carry_col = POS_W'(car); c.mark_col = POS_W'(mark); c.mark_val = mval;
    return c;
  endfunction
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // ---------------- convolution streams ----------------
  logic [N-1:0] pv [V][P];
  logic [M-1:0] hv [P];
  int np, nh, ny;
  always_ff @(posedge clk) begin
    if (p_valid && p_ready) np <= np + 1;
    if (h_valid && h_ready) nh <= nh + 1;
    if (y_valid && y_ready) begin
      automatic longint e = 0;
      automatic int v = ny / (2*P - 1), k = ny % (2*P - 1);
      for (int j = 0; j < P; j++)
        if (k - j >= 0 && k - j < P) e += longint'(hv[j]) * longint'(pv[v][k - j]);
      checks++;
      if (longint'(y_data) != e) begin failures++; $display("FAIL vector %0d hp[%0d] = %0d expected %0d", v, k, y_data, e); end
      ny <= ny + 1;
    end
  end
  assign p_data = pv[(np / P) % V][np % P];
  assign h_data = hv[nh % P];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [K-1:0]  w [J];
  logic [AW-1:0] opnd [F];
  int            set_of [J];

  initial begin
    logic [K-1:0] v;
    int h0;
    host_valid = 0; host_cmd = '0; host_a_data = '0; host_ap_data = '0;
    conv_start = 0; p_valid = 0; h_valid = 0; y_ready = 0;
    np = 0; nh = 0; ny = 0;
    n_split = 0; n_msub = 0; n_m2m = 0; n_madd = 0; n_cprop = 0; n_shift = 0; n_selw = 0; n_read = 0; n_refused = 0; n_ybp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- 1. multi-operand addition into hp bits 0..9 ----
    for (int f = 0; f < F; f++) begin opnd[f] = AW'($urandom_range(1023)); write_ap(f, opnd[f]); end
    for (int j = 0; j < J; j++) begin
      set_of[j] = $urandom_range(F - 1);
      w[j] = '0;
      w[j][FLG + set_of[j]] = 1'b1;
      w[j][MRK] = ($urandom_range(3) == 0);
      w[j][9:0] = 10'($urandom);
      write_a(j, w[j]);
    end
    h0 = int'(halfcyc);
    run(mcmd(OP_MADD, 0, 0, 10, 0, TMP, MRK, 1'b0));
    check("multi-add memory cycles x2", int'(halfcyc) - h0, 2 * (1 + 9 * 10));
    for (int j = 0; j < J; j++) begin
      logic [10:0] s;
      s = w[j][MRK] ? {1'b0, w[j][9:0]} : w[j][9:0] + opnd[set_of[j]][9:0];
      read_a(j, v);
      check($sformatf("multi-add word %0d", j), {v[TMP], v[9:0]}, w[j][MRK] ? {1'b0, w[j][9:0]} : s);
    end

    // ---- 2. multi-operand multiplication: product(M+N) in hp, multiplier in p ----
    for (int f = 0; f < F; f++) begin opnd[f] = AW'($urandom_range(255)); write_ap(f, opnd[f]); end
    for (int j = 0; j < J; j++) begin
      set_of[j] = $urandom_range(F - 1);
      w[j] = '0;
      w[j][FLG + set_of[j]] = 1'b1;
      w[j][PP +: N] = N'($urandom);
      write_a(j, w[j]);
    end
    h0 = int'(halfcyc);
    for (int n = 0; n < N; n++) begin
      run(mcmd(OP_MADD, n, 0, M, 0, TMP, PP + n, 1'b1));
      run(mcmd(OP_CPROP, n + M, 0, 0, n + M + 1));
    end
    check("multi-multiply memory cycles x2", int'(halfcyc) - h0, N * (2 * (1 + 9 * M) + 9));
    for (int j = 0; j < J; j++) begin
      read_a(j, v);
      check($sformatf("multi-multiply word %0d", j), v[M+N-1:0],
            longint'(w[j][PP +: N]) * longint'(opnd[set_of[j]][M-1:0]));
    end

    // ---- 3. vector-scalar multiplication, B bits per iteration ----
    begin
      logic [M-1:0] y;
      logic [M+B-1:0] mult;
      y = M'($urandom);
      mult = '0;
      for (int f = 0; f < F; f++) begin
        write_ap(f, {mult, B'(f)});
        mult = mult + y;
      end
      for (int j = 0; j < J; j++) begin
        w[j] = '0;
        w[j][PP +: N] = N'($urandom);
        w[j][MRK] = (j != 3);               // word 3 takes no part
        write_a(j, w[j]);
      end
      for (int g = 0; g < N / B; g++) begin
        run(mcmd(OP_M2M, PP + B * g, 0, B));
        run(mcmd(OP_MADD, B * g, B, M + B));
        run(mcmd(OP_CPROP, B * g + M + B, 0, 0, M + N));
      end
      for (int j = 0; j < J; j++) begin
        read_a(j, v);
        check($sformatf("vector-scalar word %0d", j), v[M+N-1:0],
              w[j][MRK] ? longint'(w[j][PP +: N]) * longint'(y) : 0);
      end
    end

    // ---- 3b. limited sum of products x' = x*C + y*S, one bit of x and of y
    //      per iteration (2-bit code {x bit, y bit}, 4 multiples) ----
    begin
      localparam int unsigned W = 6, XP = 13, CY = 13, YB = 14, XB = PP;
      logic [W-1:0] cc, ss;
      cc = W'($urandom);
      ss = W'($urandom);
      for (int f = 0; f < 4; f++)
        write_ap(f, {AW'((f[1] ? cc : 0) + (f[0] ? ss : 0)), 2'(f)});
      for (int j = 0; j < J; j++) begin
        w[j] = '0;
        w[j][XB +: W] = W'($urandom);
        w[j][YB +: W] = W'($urandom);
        w[j][MRK] = 1'b1;
        write_a(j, w[j]);
      end
      for (int g = 0; g < W; g++) begin
        ctrl_cmd_t c2;
        c2 = mcmd(OP_M2M, YB + g, 0, 2);
        c2.nsplit = 1; c2.a_pos2 = POS_W'(XB + g);
        run(c2);
        run(mcmd(OP_MADD, g, 2, W + 1, 0, CY, MRK, 1'b1));
        run(mcmd(OP_CPROP, g + W + 1, 0, 0, XP, CY));
      end
      for (int j = 0; j < J; j++) begin
        read_a(j, v);
        check($sformatf("sum of products word %0d", j), v[XP-1:0],
              longint'(w[j][XB +: W]) * longint'(cc) + longint'(w[j][YB +: W]) * longint'(ss));
      end
    end

    // ---- 3c. multi-operand subtraction from hp bits 0..9 ----
    for (int f = 0; f < F; f++) begin opnd[f] = AW'($urandom_range(1023)); write_ap(f, opnd[f]); end
    for (int j = 0; j < J; j++) begin
      set_of[j] = $urandom_range(F - 1);
      w[j] = '0;
      w[j][FLG + set_of[j]] = 1'b1;
      w[j][MRK] = ($urandom_range(3) == 0);
      w[j][9:0] = 10'($urandom);
      write_a(j, w[j]);
    end
    run(mcmd(OP_MSUB, 0, 0, 10, 0, TMP, MRK, 1'b0));
    for (int j = 0; j < J; j++) begin
      logic [10:0] d;
      d = w[j][MRK] ? {1'b0, w[j][9:0]} : {1'b0, w[j][9:0]} - {1'b0, opnd[set_of[j]][9:0]};
      read_a(j, v);
      check($sformatf("multi-subtract word %0d", j), {v[TMP], v[9:0]}, d);
    end

    // ---- 4. convolution with back-pressure ----
    for (int j = 0; j < P; j++) begin
      for (int v = 0; v < V; v++) pv[v][j] = N'($urandom);
      hv[j] = M'($urandom);
    end
    np = 0; nh = 0; ny = 0;
    @(negedge clk); conv_start = 1; @(negedge clk); conv_start = 0;
    while (!conv_done) begin
      @(negedge clk);
      p_valid = ($urandom_range(3) != 0);
      h_valid = ($urandom_range(3) != 0);
      y_ready = ($urandom_range(2) != 0);
      host_valid = ($urandom_range(7) == 0);
    end
    @(negedge clk);
    p_valid = 0; h_valid = 0; y_ready = 0; host_valid = 0;
    check("convolution results", ny, V * (2 * P - 1));

    // ---- mechanisms ----
    check("many-to-many compares ran", n_m2m > 0, 1);
    check("multi-operand additions ran", n_madd > 0, 1);
    check("carry propagations ran", n_cprop > 0, 1);
    check("field shifts ran", n_shift > 0, 1);
    check("two-field partitions ran", n_split > 0, 1);
    check("multi-operand subtractions ran", n_msub > 0, 1);
    check("select-writes ran", n_selw > 0, 1);
    check("reads ran", n_read > 0, 1);
    check("host refused during convolution", n_refused > 0, 1);
    check("output back-pressure happened", n_ybp > 0, 1);
    $display("mechanisms: split_m2m=%0d msub=%0d m2m=%0d madd=%0d cprop=%0d shift=%0d selw=%0d read=%0d refused=%0d y_backpressure=%0d",
             n_split, n_msub, n_m2m, n_madd, n_cprop, n_shift, n_selw, n_read, n_refused, n_ybp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
