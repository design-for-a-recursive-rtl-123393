// Six-input pseudo-adder: reduces six W-bit addends to two with four
// carry-save adders in three levels (three full-adder delays).
//
//   level 1: CSA A (a1, b1, b2)    CSA D (a2, c1, c2)
//   level 2: CSA B (sum A, carry A, sum D)
//   level 3: CSA C (sum B, carry B, carry D)  -> o1 (sum), o2 (carry)
//
// The four CSAs and the A/B/C input names follow the pseudo-adder layout of
// the design; which of the two outputs of CSA D enters level 2 and which
// level 3 is this design's choice (either order gives the same sum).
// o1 + o2 = a1 + a2 + b1 + b2 + c1 + c2 (mod 2^W).
//
// Timing: combinational with PIPE = 0 (clk unused). With PIPE = 1 each CSA
// level is followed by a register (carry D waits one extra stage), so the
// outputs appear 3 cycles after the inputs, one new set per cycle.
module pseudo_adder6 #(
  parameter int unsigned W = 32,
  parameter bit          PIPE = 1'b0
) (
  input  logic         clk,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a2,
  input  logic [W-1:0] b1,
  input  logic [W-1:0] b2,
  input  logic [W-1:0] c1,
  input  logic [W-1:0] c2,
  output logic [W-1:0] o1,
  output logic [W-1:0] o2
);

  localparam int unsigned R = PIPE ? 1 : 0;

  logic [W-1:0] sa, ca, sd, cd, sb, cb, s3, c3;
  logic [W-1:0] sa_q, ca_q, sd_q, cd_q, cd_qq, sb_q, cb_q;

  csa #(.W(W)) u_csa_a (.a(a1), .b(b1), .d(b2), .s(sa), .c(ca));
  csa #(.W(W)) u_csa_d (.a(a2), .b(c1), .d(c2), .s(sd), .c(cd));
  pipe_delay #(.W(4*W), .DEPTH(R)) u_st1 (.clk(clk), .d({sa, ca, sd, cd}), .q({sa_q, ca_q, sd_q, cd_q}));

  csa #(.W(W)) u_csa_b (.a(sa_q), .b(ca_q), .d(sd_q), .s(sb), .c(cb));
  pipe_delay #(.W(3*W), .DEPTH(R)) u_st2 (.clk(clk), .d({sb, cb, cd_q}), .q({sb_q, cb_q, cd_qq}));

  csa #(.W(W)) u_csa_c (.a(sb_q), .b(cb_q), .d(cd_qq), .s(s3), .c(c3));
  pipe_delay #(.W(2*W), .DEPTH(R)) u_st3 (.clk(clk), .d({s3, c3}), .q({o1, o2}));

endmodule
