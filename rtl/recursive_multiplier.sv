// Recursive parallel multiplier, top level.
//
// An N x N multiplier built by recursion: the factors are cut into quadrants,
// each quadrant product is formed by a smaller copy of the same structure, and
// the four two-number results are merged by a six-input carry-save
// pseudo-adder. The recursion ends at Q x Q P_q-multipliers, iterative arrays
// of G-bit full-multiplier cells. Only at the very end are the two remaining
// numbers added, by a Brent-Kung carry-lookahead special adder. With
// p = log2(N/Q) recursion levels the delay is about
//   (Q/G) cells + 3p CSA delays + O(log 2N) special adder,
// and the area stays close to that of a plain N x N cell array.
//
// Specification variables (combinational, sampled like data):
//   mode = MODE_DOUBLE : p = h * k, one N x N product; p2 = 0.
//          tc = 1 treats h and k as two's complement (signed product).
//   mode = MODE_QUAD   : the four top-level quadrants work independently on
//          (N/2)-bit unsigned factors:
//            p [N-1:0]  = h [N/2-1:0] * k [N/2-1:0]
//            p [2N-1:N] = h [N-1:N/2] * k [N-1:N/2]
//            p2[N-1:0]  = h2[N/2-1:0] * k2[N/2-1:0]
//            p2[2N-1:N] = h2[N-1:N/2] * k2[N-1:N/2]
//          tc = 1 treats all eight (N/2)-bit factors as two's complement;
//          each half of p and p2 is then a signed N-bit product.
// The recursive structure, pseudo-adders and special adder follow the design;
// how the four-product mode and the two's complement factors are wired in
// (operand multiplexers, a bypass of the last pseudo-adder, a second
// correction and special adder, carry cut at the half word, the
// tc_correction blocks) is this design's own choice, since only the
// capability is specified.
//
// Timing. PIPE = 0 (default, the main configuration): fully combinational, a
// result is valid one settling time after the inputs change; clk and rst_n
// are unused and out_valid = in_valid.
// PIPE = 1: one register stage after every cell row, every CSA level and
// every prefix level of the special adders, so the period is one such level
// whatever N is. The result of the operands presented with in_valid = 1
// appears LATENCY cycles later with out_valid = 1, where
//   LATENCY = tree_latency(N/2) + 3 (top pseudo-adder) + 3 (correction)
//             + 2 log2(2N) - 1 (special adder)
// (29 cycles at N = 64, Q = 8, G = 2). mode and tc travel with their operands,
// so they may change every cycle. The register placement is this design's
// own; only the possibility of an O(1)-period pipeline is given.
// N must be Q times a power of two, N >= 4Q.
// PQ_ROM = 1 replaces every P_q cell array by a look-up table (pq_rom), the
// alternative form for small Q; the default is the cell array.
module recursive_multiplier
  import rm_pkg::*;
#(
  parameter int unsigned N = DEF_N,  // factor width
  parameter int unsigned Q = DEF_Q,  // P_q-multiplier width
  parameter int unsigned G = DEF_G,  // full-multiplier cell digit width
  parameter bit          PQ_ROM = 1'b0, // 1: P_q-multipliers as ROMs (small Q)
  parameter bit          PIPE = 1'b0    // 1: pipelined, period of one level
) (
  input  logic           clk,       // used only when PIPE = 1
  input  logic           rst_n,     // asynchronous, active low; valid pipeline only
  input  logic           in_valid,  // operands on the inputs are to be used
  output logic           out_valid, // p, p2 hold the result of a valid operation
  input  prec_mode_e     mode,
  input  logic           tc,   // double mode: factors are two's complement
  input  logic [N-1:0]   h,
  input  logic [N-1:0]   k,
  input  logic [N-1:0]   h2,   // quad mode: factors of the two extra products
  input  logic [N-1:0]   k2,
  output logic [2*N-1:0] p,
  output logic [2*N-1:0] p2
);

  localparam int unsigned S  = N / 2;
  localparam int unsigned LT = tree_latency(S, Q, G, PIPE, PQ_ROM);  // quadrants
  localparam int unsigned LP = csa3_latency(PIPE);                  // top pseudo-adder
  localparam int unsigned LC = csa3_latency(PIPE);                  // correction
  localparam int unsigned LS = sa_latency(2 * N, PIPE);             // special adder
  localparam int unsigned LATENCY = LT + LP + LC + LS;

  initial begin
    assert (N % Q == 0 && is_pow2(N / Q) && N >= 4 * Q)
      else $error("recursive_multiplier: N must be Q * 2^p with p >= 2");
  end

  logic quad;
  assign quad = (mode == MODE_QUAD);

  // ---- Operand routing to the four top-level quadrants ----------------------
  // [i][j] multiplies half i of its h input by half j of its k input. The
  // diagonal quadrants always see h and k; the off-diagonal ones take h2/k2
  // in quad mode.
  logic [S-1:0] qh [2][2];
  logic [S-1:0] qk [2][2];

  always_comb begin
    qh[0][0] = h[S-1:0];
    qk[0][0] = k[S-1:0];
    qh[1][1] = h[N-1:S];
    qk[1][1] = k[N-1:S];
    qh[0][1] = quad ? h2[S-1:0] : h[S-1:0];
    qk[0][1] = quad ? k2[S-1:0] : k[N-1:S];
    qh[1][0] = quad ? h2[N-1:S] : h[N-1:S];
    qk[1][0] = quad ? k2[N-1:S] : k[S-1:0];
  end

  // ---- B_(p-1) quadrants and the top pseudo-adder (together: B_p) -----------
  logic [N-1:0] s1 [2][2];
  logic [N-1:0] s2 [2][2];

  for (genvar i = 0; i < 2; i++) begin : g_h
    for (genvar j = 0; j < 2; j++) begin : g_k
      bp_pseudo_multiplier #(.W(S), .Q(Q), .G(G), .PQ_ROM(PQ_ROM), .PIPE(PIPE)) u_quad (
        .clk(clk),
        .h (qh[i][j]),
        .k (qk[i][j]),
        .o1(s1[i][j]),
        .o2(s2[i][j])
      );
    end
  end

  logic [2*N-1:0] a1, a2, b1, b2, c1, c2;
  logic [2*N-1:0] op1, op2;

  always_comb begin
    a1 = {s1[1][1], s1[0][0]};
    a2 = {s2[1][1], s2[0][0]};
    b1 = {{S{1'b0}}, s1[0][1], {S{1'b0}}};
    b2 = {{S{1'b0}}, s2[0][1], {S{1'b0}}};
    c1 = {{S{1'b0}}, s1[1][0], {S{1'b0}}};
    c2 = {{S{1'b0}}, s2[1][0], {S{1'b0}}};
  end

  pseudo_adder6 #(.W(2*N), .PIPE(PIPE)) u_pa_top (
    .clk(clk),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .c1(c1), .c2(c2),
    .o1(op1), .o2(op2)
  );

  // ---- Quad-mode bypass of the top pseudo-adder ----------------------------
  // In quad mode the diagonal quadrants (packed side by side in a1, a2) and
  // the off-diagonal ones (packed the same way) skip the top pseudo-adder;
  // with PIPE = 1 they are delayed by its number of stages.
  logic [2*N-1:0] a1_b, a2_b, d1_b, d2_b;
  logic [N-1:0]   h_c, k_c, h2_c, k2_c;
  logic           tc_c, quad_c;

  pipe_delay #(.W(8*N), .DEPTH(LP)) u_dbyp (
    .clk(clk),
    .d({a1, a2, s1[1][0], s1[0][1], s2[1][0], s2[0][1]}),
    .q({a1_b, a2_b, d1_b, d2_b})
  );

  // Factors and specification variables, delayed to meet the same stage.
  pipe_delay #(.W(4*N+2), .DEPTH(LT + LP)) u_dtc (
    .clk(clk), .d({tc, quad, h, k, h2, k2}), .q({tc_c, quad_c, h_c, k_c, h2_c, k2_c})
  );

  // ---- Two's complement correction ------------------------------------------
  // Double mode: u_tc corrects the one N x N product. Quad mode: u_tc
  // corrects the two products packed in p, u_tc2 the two packed in p2 (its
  // inputs are zero in double mode).
  logic [2*N-1:0] t1, t2, e1, e2;
  logic [2*N-1:0] r1, r2, r3, r4;

  always_comb begin
    t1 = quad_c ? a1_b : op1;
    t2 = quad_c ? a2_b : op2;
    e1 = quad_c ? d1_b : '0;
    e2 = quad_c ? d2_b : '0;
  end

  tc_correction #(.N(N), .PIPE(PIPE)) u_tc (
    .clk(clk), .en(tc_c), .split(quad_c), .h(h_c), .k(k_c),
    .o1(t1), .o2(t2), .r1(r1), .r2(r2)
  );
  tc_correction #(.N(N), .PIPE(PIPE)) u_tc2 (
    .clk(clk), .en(tc_c & quad_c), .split(1'b1), .h(h2_c), .k(k2_c),
    .o1(e1), .o2(e2), .r1(r3), .r2(r4)
  );

  // ---- Special adders ---------------------------------------------------------
  // The main adder forms p; the second adder forms p2 in quad mode. In quad
  // mode both cut their carry at the half word.
  logic quad_s;

  pipe_delay #(.W(1), .DEPTH(LC)) u_dquad (.clk(clk), .d(quad_c), .q(quad_s));

  special_adder #(.W(2*N), .PIPE(PIPE)) u_sa_main (
    .clk(clk), .a(r1), .b(r2), .split(quad_s), .sum(p)
  );
  special_adder #(.W(2*N), .PIPE(PIPE)) u_sa_quad (
    .clk(clk), .a(r3), .b(r4), .split(quad_s), .sum(p2)
  );

  // ---- Valid tracking ----------------------------------------------------------
  if (LATENCY == 0) begin : g_comb_valid
    assign out_valid = in_valid;
  end else begin : g_pipe_valid
    logic [LATENCY-1:0] vld;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld <= '0;
      else        vld <= {vld[LATENCY-2:0], in_valid};
    end
    assign out_valid = vld[LATENCY-1];
  end

endmodule
