// Partitioned associative processor.
//
// An operand memory A' (F words of AW bits) and a main memory A (J words of
// K bits) are both fully parallel associative memories (assoc_mem). The top
// F bits of every main-memory word are a partition flag field: word j
// belongs to data set f when flag f is ONE, so F operands held in A' can act
// at once, each on its own set. The control unit (pap_ctrl) sequences both
// memories and routes the tags of A' into the flag field of the main-memory
// mask. The convolution sequencer (conv_seq) drives the control unit through
// a whole convolution; while it is idle, the host drives the control unit
// directly with macro commands (host_*), e.g. to run multi-operand addition
// or multiplication or to read and write words.
// Interface: host_* macro commands (valid/ready); conv_start starts a
// convolution of V data vectors by one filter that consumes V*P values on p_*,
// P values on h_* (one per major loop) and produces V*(2P-1) values on y_*; a_o is the read register of A and
// ap_o that of A' (valid the cycle after a READ finishes); mem_halfcyc counts
// executed memory time in half cycles. One memory cycle per clock.
// The organisation follows the partitioned associative architecture; the
// host interface and the sizes of A' are this design's choices.
module pap_top
  import assoc_pkg::*;
#(
  parameter int unsigned P   = 1024,              // convolution vector length
  parameter int unsigned V   = 1,                 // data vectors convolved at once
  parameter int unsigned J   = 2*P*V,             // words of A
  parameter int unsigned N   = 16,                // precision of p
  parameter int unsigned M   = 16,                // precision of h
  parameter int unsigned B   = 4,                 // multiplier bits per iteration
  parameter int unsigned HPW = M + N + $clog2(P), // width of the hp field
  parameter int unsigned F   = 2**B,              // flags per word = words of A'
  parameter int unsigned K   = F + N + 2 + HPW,   // word length of A
  parameter int unsigned AW  = M + 2*B            // word length of A'
) (
  input  logic              clk,
  input  logic              rst_n,
  // host macro commands (taken while the convolution sequencer is idle)
  input  logic              host_valid,
  output logic              host_ready,
  input  ctrl_cmd_t         host_cmd,
  input  logic [K-1:0]      host_a_data,
  input  logic [AW-1:0]     host_ap_data,
  // convolution
  input  logic              conv_start,
  output logic              conv_busy,
  output logic              conv_done,
  input  logic              p_valid,
  output logic              p_ready,
  input  logic [N-1:0]      p_data,
  input  logic              h_valid,
  output logic              h_ready,
  input  logic [M-1:0]      h_data,
  output logic              y_valid,
  input  logic              y_ready,
  output logic [HPW-1:0]    y_data,
  // status
  output logic [K-1:0]      a_o,
  output logic [AW-1:0]     ap_o,
  output logic [F-1:0]      ap_t,
  output logic [31:0]       mem_halfcyc
);

  prim_cmd_t         a_cmd, ap_cmd;
  logic [K-1:0]      a_i;
  logic [AW-1:0]     ap_i;
  logic [ADDR_W-1:0] a_sel, ap_sel;
  logic [J-1:0]      a_t;
  logic [F-1:0]      ap_tag;

  ctrl_cmd_t     c_cmd, s_cmd;
  logic          c_valid, c_ready, s_valid;
  logic [K-1:0]  c_adata, s_adata;
  logic [AW-1:0] c_apdata, s_apdata;

  assoc_mem #(.J(J), .K(K)) u_a (
    .clk, .rst_n, .cmd(a_cmd), .i(a_i), .sel(a_sel), .tag_sin(1'b0),
    .o(a_o), .t(a_t)
  );

  assoc_mem #(.J(F), .K(AW)) u_ap (
    .clk, .rst_n, .cmd(ap_cmd), .i(ap_i), .sel(ap_sel), .tag_sin(1'b0),
    .o(ap_o), .t(ap_tag)
  );
  assign ap_t = ap_tag;

  pap_ctrl #(.K(K), .F(F), .AW(AW)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid(c_valid), .cmd_ready(c_ready), .cmd(c_cmd),
    .a_data(c_adata), .ap_data(c_apdata),
    .a_cmd, .a_i, .a_sel,
    .ap_cmd, .ap_i, .ap_sel, .ap_t(ap_tag),
    .mem_halfcyc
  );

  conv_seq #(.P(P), .V(V), .N(N), .M(M), .B(B), .HPW(HPW), .F(F), .K(K), .AW(AW)) u_conv (
    .clk, .rst_n,
    .start(conv_start), .busy(conv_busy), .done(conv_done),
    .p_valid, .p_ready, .p_data,
    .h_valid, .h_ready, .h_data,
    .y_valid, .y_ready, .y_data,
    .cmd_valid(s_valid), .cmd_ready(c_ready && conv_busy), .cmd(s_cmd),
    .a_data(s_adata), .ap_data(s_apdata), .a_o
  );

  // The sequencer owns the control unit while it runs.
  always_comb begin
    if (conv_busy) begin
      c_valid  = s_valid;
      c_cmd    = s_cmd;
      c_adata  = s_adata;
      c_apdata = s_apdata;
    end else begin
      c_valid  = host_valid;
      c_cmd    = host_cmd;
      c_adata  = host_a_data;
      c_apdata = host_ap_data;
    end
  end
  assign host_ready = c_ready && !conv_busy;

  // Unused tag outputs of A: the tag chain end would feed a following chip.
  logic unused_t;
  assign unused_t = ^a_t;

  initial assert (J >= 2*P*V - 1) else $error("pap_top: J must hold V regions of 2P words");
  initial assert (K == F + N + 2 + HPW) else $error("pap_top: K must match the word format");

endmodule
