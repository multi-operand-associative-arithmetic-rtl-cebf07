// Multiplication-time workload: one 60-bit by 60-bit vector-by-scalar
// multiplication with b = 2, 3, 4, 5 and 6 multiplier bits per iteration
// (60 is divisible by each). Each configuration is a separate processor
// (fig3_bench) with 2^b flags and a 187- to 247-bit word. Products are checked
// against plain arithmetic and the memory time against this design's cycle
// counts. The times are printed next to the published estimate
// N(9M+1)/b + 27N/2 for comparison, which this design does not claim to meet
// (its carry propagation after each group is not part of that estimate).
module tb_fig3_multiply;
  localparam int NB = 5;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] done;
  int chk [NB], fl [NB], cyc [NB];
  int checks, failures;

  always #5 clk = ~clk;

  fig3_bench #(.B(2)) u_b2 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .cycles(cyc[0]));
  fig3_bench #(.B(3)) u_b3 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .cycles(cyc[1]));
  fig3_bench #(.B(4)) u_b4 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .cycles(cyc[2]));
  fig3_bench #(.B(5)) u_b5 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .cycles(cyc[3]));
  fig3_bench #(.B(6)) u_b6 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .cycles(cyc[4]));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NB; i++) begin
      checks += chk[i];
      failures += fl[i];
      $display("b=%0d: %0d memory cycles (published estimate %0d)", i + 2, cyc[i], 60 * (9 * 60 + 1) / (i + 2) + 27 * 60 / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
