// Full-size run of pap_top with its default parameters: one convolution of
// two 1024-element vectors (16-bit p, 16-bit h, 4 multiplier bits per
// iteration, 2048 x 76-bit main memory). All 2047 results are compared with
// a direct sum of products, and the executed memory time is reported in
// memory cycles and in milliseconds at a 50 ns memory cycle; it must lie
// within 5 percent of the 60 ms expected for this configuration.
module tb_pap_top_full;
  import assoc_pkg::*;
  localparam int unsigned P = 1024, N = 16, M = 16, HPW = M + N + $clog2(P);
  localparam int unsigned F = 16, K = F + N + 2 + HPW, AW = M + 8;

  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready;
  ctrl_cmd_t host_cmd = '0;
  logic [K-1:0] host_a_data = '0, a_o;
  logic [AW-1:0] host_ap_data = '0, ap_o;
  logic conv_start = 0, conv_busy, conv_done;
  logic p_valid, p_ready, h_valid, h_ready, y_valid, y_ready;
  logic [N-1:0] p_data;
  logic [M-1:0] h_data;
  logic [HPW-1:0] y_data;
  logic [F-1:0] ap_t;
  logic [31:0] halfcyc;
  int checks = 0, failures = 0;

  pap_top dut (
    .clk, .rst_n, .host_valid, .host_ready, .host_cmd, .host_a_data, .host_ap_data,
    .conv_start, .conv_busy, .conv_done, .p_valid, .p_ready, .p_data,
    .h_valid, .h_ready, .h_data, .y_valid, .y_ready, .y_data,
    .a_o, .ap_o, .ap_t, .mem_halfcyc(halfcyc));

  always #5 clk = ~clk;

  logic [N-1:0] pv [P];
  logic [M-1:0] hv [P];
  int np = 0, nh = 0, ny = 0;
  always_ff @(posedge clk) begin
    if (p_valid && p_ready) np <= np + 1;
    if (h_valid && h_ready) nh <= nh + 1;
    if (y_valid && y_ready) begin
      automatic longint e = 0;
      for (int j = 0; j < P; j++)
        if (ny - j >= 0 && ny - j < P) e += longint'(hv[j]) * longint'(pv[ny - j]);
      checks++;
      if (longint'(y_data) != e) begin failures++; $display("FAIL hp[%0d] = %0d expected %0d", ny, y_data, e); end
      ny <= ny + 1;
    end
  end
  assign p_data  = pv[np % P];
  assign h_data  = hv[nh % P];
  assign p_valid = 1'b1;
  assign h_valid = 1'b1;
  assign y_ready = 1'b1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ms;
    // half the elements at full scale, the rest random
    for (int j = 0; j < P; j++) begin
      pv[j] = (j % 2 == 0) ? '1 : N'($urandom);
      hv[j] = (j % 2 == 0) ? '1 : M'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); conv_start = 1; @(negedge clk); conv_start = 0;
    while (!conv_done) @(negedge clk);
    checks++;
    if (ny != 2 * P - 1) begin failures++; $display("FAIL %0d results", ny); end
    ms = real'(halfcyc) / 2.0 * 50.0e-9 * 1.0e3;
    $display("convolution: %0d memory cycles, %0.2f ms at 50 ns", halfcyc / 2, ms);
    checks++;
    if (ms < 57.0 || ms > 63.0) begin failures++; $display("FAIL time %0.2f ms, expected about 60", ms); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
