// Two's complement correction: peripheral logic that lets the unsigned
// multiplier array multiply two's complement factors.
//
// Read as unsigned, an n-bit two's complement factor x stands for
// x_u = x + 2^n x[n-1]. Hence, modulo 2^(2n),
//   h * k = h_u * k_u - 2^n (h[n-1] k_u + k[n-1] h_u)
// and -(v << n) = (~v << n) + (1 << n) for an n-bit v. The block adds the two
// inverted, gated factors and the constant (one 2^n per active term) to the
// pseudo-multiplier outputs o1, o2 with three CSA levels, before the special
// adder.
//   split = 0: one product of N-bit factors h, k (n = N) in the 2N-bit word.
//   split = 1: two independent products of (N/2)-bit factors (n = N/2):
//              h[N/2-1:0] * k[N/2-1:0] in bits [N-1:0] and
//              h[N-1:N/2] * k[N-1:N/2] in bits [2N-1:N]; each CSA carry that
//              would cross bit N is dropped, so the halves stay independent.
// With en = 0 all three correction addends are zero and r1 + r2 = o1 + o2
// (split = 0) or equals it in each half word (split = 1). The insides are this
// design's own; only the capability (two's complement factors handled by added
// peripheral logic) is given.
//
// Timing: combinational with PIPE = 0, three full-adder delays (clk unused).
// With PIPE = 1 each CSA level is followed by a register and the later
// correction addends are delayed to match: outputs 3 cycles after inputs.
module tc_correction #(
  parameter int unsigned N = 64,
  parameter bit          PIPE = 1'b0
) (
  input  logic           clk,
  input  logic           en,     // factors are two's complement
  input  logic           split,  // two half-size products side by side
  input  logic [N-1:0]   h,
  input  logic [N-1:0]   k,
  input  logic [2*N-1:0] o1,
  input  logic [2*N-1:0] o2,
  output logic [2*N-1:0] r1,
  output logic [2*N-1:0] r2
);

  localparam int unsigned S = N / 2;
  localparam int unsigned R = PIPE ? 1 : 0;

  logic           hs, ks, hs0, ks0, hs1, ks1;
  logic [2*N-1:0] corr_h, corr_k, corr_c, keep;
  logic [2*N-1:0] s1, c1, s2, c2, s3, c3;
  logic [2*N-1:0] s1_q, c1_q, s2_q, c2_q, corr_k_q, corr_c_q, keep_q, keep_qq;

  always_comb begin
    hs  = en & h[N-1];  // sign bits of the single product
    ks  = en & k[N-1];
    hs0 = en & h[S-1];  // sign bits of the low half-size product
    ks0 = en & k[S-1];
    hs1 = hs;           // the high half-size product shares the top sign bits
    ks1 = ks;
    corr_c = '0;
    if (!split) begin
      corr_h = hs ? {~k, {N{1'b0}}} : '0;
      corr_k = ks ? {~h, {N{1'b0}}} : '0;
      corr_c[N]   = hs ^ ks;
      corr_c[N+1] = hs & ks;
    end else begin
      corr_h = {(hs1 ? {~k[N-1:S], {S{1'b0}}} : {N{1'b0}}),
                (hs0 ? {~k[S-1:0], {S{1'b0}}} : {N{1'b0}})};
      corr_k = {(ks1 ? {~h[N-1:S], {S{1'b0}}} : {N{1'b0}}),
                (ks0 ? {~h[S-1:0], {S{1'b0}}} : {N{1'b0}})};
      corr_c[S]     = hs0 ^ ks0;
      corr_c[S+1]   = hs0 & ks0;
      corr_c[N+S]   = hs1 ^ ks1;
      corr_c[N+S+1] = hs1 & ks1;
    end
    keep    = '1;       // carry mask: bit N cleared in split mode
    keep[N] = ~split;
  end

  csa #(.W(2*N)) u_csa_1 (.a(o1), .b(o2), .d(corr_h), .s(s1), .c(c1));
  pipe_delay #(.W(4*N), .DEPTH(R)) u_st1 (.clk(clk), .d({s1, c1 & keep}), .q({s1_q, c1_q}));
  pipe_delay #(.W(2*N), .DEPTH(R)) u_dk (.clk(clk), .d(corr_k), .q(corr_k_q));
  pipe_delay #(.W(2*N), .DEPTH(2*R)) u_dc (.clk(clk), .d(corr_c), .q(corr_c_q));
  pipe_delay #(.W(2*N), .DEPTH(R)) u_dm1 (.clk(clk), .d(keep), .q(keep_q));
  pipe_delay #(.W(2*N), .DEPTH(R)) u_dm2 (.clk(clk), .d(keep_q), .q(keep_qq));

  csa #(.W(2*N)) u_csa_2 (.a(s1_q), .b(c1_q), .d(corr_k_q), .s(s2), .c(c2));
  pipe_delay #(.W(4*N), .DEPTH(R)) u_st2 (.clk(clk), .d({s2, c2 & keep_q}), .q({s2_q, c2_q}));

  csa #(.W(2*N)) u_csa_3 (.a(s2_q), .b(c2_q), .d(corr_c_q), .s(s3), .c(c3));
  pipe_delay #(.W(4*N), .DEPTH(R)) u_st3 (.clk(clk), .d({s3, c3 & keep_qq}), .q({r1, r2}));

endmodule
