// Self-checking testbench for conv_seq, run with the control unit and the two
// associative memories. A small configuration (P=8 elements, V=3 data
// vectors, N=8-bit p, M=6-bit h, B=2 bits per iteration) convolves three
// random data vectors by one filter; the 3(2P-1) results are compared with a direct sum of products computed here, and the
// executed memory time is compared with the per-phase cycle counts:
// partition 1+4B per bit group, multi-add 1+9(M+B) per bit group, carry
// propagation 4.5 per bit, shift 5(N+1) per element, plus the word I/O.
module tb_conv_seq;
  import assoc_pkg::*;
  localparam int unsigned P = 8, V = 3, N = 8, M = 6, B = 2;
  localparam int unsigned HPW = M + N + $clog2(P), F = 2**B, K = F + N + 2 + HPW, AW = M + 2*B;
  localparam int unsigned J = 2*P*V;
  localparam int unsigned NBG = N / B;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic p_valid, p_ready, h_valid, h_ready, y_valid, y_ready;
  logic [N-1:0] p_data;
  logic [M-1:0] h_data;
  logic [HPW-1:0] y_data;
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

  conv_seq #(.P(P), .V(V), .N(N), .M(M), .B(B)) dut (
    .clk, .rst_n, .start, .busy, .done, .p_valid, .p_ready, .p_data,
    .h_valid, .h_ready, .h_data, .y_valid, .y_ready, .y_data,
    .cmd_valid, .cmd_ready, .cmd, .a_data, .ap_data, .a_o);
  pap_ctrl #(.K(K), .F(F), .AW(AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .a_data, .ap_data,
    .a_cmd, .a_i, .a_sel, .ap_cmd, .ap_i, .ap_sel, .ap_t, .mem_halfcyc(halfcyc));
  assoc_mem #(.J(J), .K(K))  u_a  (.clk, .rst_n, .cmd(a_cmd),  .i(a_i),  .sel(a_sel),  .tag_sin(1'b0), .o(a_o),  .t(a_t));
  assoc_mem #(.J(F), .K(AW)) u_ap (.clk, .rst_n, .cmd(ap_cmd), .i(ap_i), .sel(ap_sel), .tag_sin(1'b0), .o(ap_o), .t(ap_t));

  always #5 clk = ~clk;

  logic [N-1:0] pv [V][P];
  logic [M-1:0] hv [P];
  int np, nh, ny;

  // sources and sink, with random gaps
  always_ff @(posedge clk) begin
    if (p_valid && p_ready) np <= np + 1;
    if (h_valid && h_ready) nh <= nh + 1;
    if (y_valid && y_ready) begin
      automatic longint e = 0;
      automatic int v = ny / (2*P - 1), k = ny % (2*P - 1);
      for (int j = 0; j < P; j++)
        if (k - j >= 0 && k - j < P) e += longint'(hv[j]) * longint'(pv[v][k - j]);
      checks++;
      if (longint'(y_data) != e) begin
        failures++;
        $display("FAIL vector %0d hp[%0d] = %0d expected %0d", v, k, y_data, e);
      end
      ny <= ny + 1;
    end
  end
  assign p_data  = pv[(np / P) % V][np % P];
  assign h_data  = hv[nh % P];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_half, cprop, h_start;
    start = 0; p_valid = 0; h_valid = 0; y_ready = 0;
    np = 0; nh = 0; ny = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int j = 0; j < P; j++) begin
        for (int v = 0; v < V; v++)
          pv[v][j] = rep == 0 ? '1 : N'($urandom);   // first run: all-ONE worst case
        hv[j] = rep == 0 ? '1 : M'($urandom);
      end
      np = 0; nh = 0; ny = 0;
      h_start = int'(halfcyc);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      fork
        begin : drive
          while (!done) begin
            @(negedge clk);
            p_valid = ($urandom_range(3) != 0);
            h_valid = ($urandom_range(3) != 0);
            y_ready = ($urandom_range(3) != 0);
          end
        end
      join
      @(negedge clk);
      p_valid = 0; h_valid = 0; y_ready = 0;
      cprop = 0;
      for (int g = 0; g < NBG; g++) cprop += HPW - (B * (g + 1) + M);
      // clear, p in, code mask + codes, read-out; then per element the A'
      // multiples (1 minor + F major), partition, multi-add and carry; shifts
      exp_half = 2 * (1 + V * P + F + V * (2 * P - 1)) + 1
               + P * (1 + 2 * F + 2 * NBG * (1 + 4 * B) + 2 * NBG * (1 + 9 * (M + B)) + 9 * cprop)
               + (P - 1) * 10 * (N + 1);
      checks++;
      if (int'(halfcyc) - h_start != exp_half) begin
        failures++;
        $display("FAIL memory time %0d half cycles, expected %0d", int'(halfcyc) - h_start, exp_half);
      end
      checks++;
      if (ny != V * (2 * P - 1)) begin failures++; $display("FAIL %0d results, expected %0d", ny, V*(2*P-1)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
