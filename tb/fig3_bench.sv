// Helper for tb_fig3_multiply: one processor configured for 60-bit
// multipliers and multiplicands with B multiplier bits per iteration. It runs
// a vector-by-scalar multiplication as a host program (for each B-bit group:
// many-to-many partition, multi-operand addition of the selected multiple,
// carry propagation), checks every 120-bit product against plain arithmetic
// and reports the memory time. It raises done when finished.
module fig3_bench
  import assoc_pkg::*;
#(
  parameter int unsigned B = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles     // memory cycles of the multiplication
);
  localparam int unsigned N = 60, M = 60, P = 2, J = 4;
  localparam int unsigned HPW = M + N + $clog2(P), F = 2**B, K = F + N + 2 + HPW, AW = M + 2*B;
  localparam int unsigned MRK = HPW + 1, PP = HPW + 2;

  logic host_valid, host_ready;
  ctrl_cmd_t host_cmd;
  logic [K-1:0] host_a_data, a_o;
  logic [AW-1:0] host_ap_data, ap_o;
  logic p_ready, h_ready, y_valid, conv_busy, conv_done;
  logic [HPW-1:0] y_data;
  logic [F-1:0] ap_t;
  logic [31:0] halfcyc;

  pap_top #(.P(P), .J(J), .N(N), .M(M), .B(B)) dut (
    .clk, .rst_n, .host_valid, .host_ready, .host_cmd, .host_a_data, .host_ap_data,
    .conv_start(1'b0), .conv_busy, .conv_done, .p_valid(1'b0), .p_ready, .p_data('0),
    .h_valid(1'b0), .h_ready, .h_data('0), .y_valid, .y_ready(1'b0), .y_data,
    .a_o, .ap_o, .ap_t, .mem_halfcyc(halfcyc));

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
  function automatic ctrl_cmd_t mcmd(ctrl_op_e op, int apos, int appos, int nb, int endp = 0);
    ctrl_cmd_t c = '0;
    c.op = op; c.a_pos = POS_W'(apos); c.ap_pos = POS_W'(appos); c.nbits = POS_W'(nb);
    c.end_pos = POS_W'(endp); c.carry_col = POS_W'(HPW); c.mark_col = POS_W'(MRK); c.mark_val = 1'b1;
    return c;
  endfunction
  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [M-1:0] y;
    logic [M+B-1:0] mult;
    logic [N-1:0] x [J];
    logic [K-1:0] w;
    int h0, exp_half;
    host_valid = 0; host_cmd = '0; host_a_data = '0; host_ap_data = '0;
    done = 0; checks = 0; failures = 0; cycles = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    y = M'(rnd64());
    mult = '0;
    for (int f = 0; f < F; f++) begin        // codes and multiples of y in A'
      run(prim(PRIM_NOP, '{TAG_SELECT, LD_IN, LD_ONE, MAJ_WRITE}, 0, f), '0, {mult, B'(f)});
      mult = mult + (M+B)'(y);
    end
    for (int j = 0; j < J; j++) begin        // multipliers, product field cleared
      x[j] = (j == 0) ? '1 : N'(rnd64());
      w = '0;
      w[PP +: N] = x[j];
      w[MRK] = 1'b1;
      run(prim('{TAG_SELECT, LD_IN, LD_ONE, MAJ_WRITE}, PRIM_NOP, j), w);
    end
    h0 = int'(halfcyc);
    for (int g = 0; g < N / B; g++) begin
      run(mcmd(OP_M2M, PP + B * g, 0, B));
      run(mcmd(OP_MADD, B * g, B, M + B));
      run(mcmd(OP_CPROP, B * g + M + B, 0, 0, M + N));
    end
    cycles = (int'(halfcyc) - h0) / 2;
    exp_half = 0;
    for (int g = 0; g < N / B; g++)
      exp_half += 2 * (1 + 4 * B) + 2 * (1 + 9 * (M + B)) + 9 * (N - B * (g + 1));
    checks++;
    if (int'(halfcyc) - h0 != exp_half) begin
      failures++;
      $display("FAIL b=%0d: %0d half cycles, expected %0d", B, int'(halfcyc) - h0, exp_half);
    end
    for (int j = 0; j < J; j++) begin
      logic [M+N-1:0] prod;
      prod = (M+N)'(x[j]) * (M+N)'(y);
      run(prim('{TAG_SELECT, LD_KEEP, LD_KEEP, MAJ_READ}, PRIM_NOP, j));
      checks++;
      if (a_o[M+N-1:0] != prod) begin
        failures++;
        $display("FAIL b=%0d word %0d: product %h expected %h", B, j, a_o[M+N-1:0], prod);
      end
    end
    done = 1;
  end
endmodule
