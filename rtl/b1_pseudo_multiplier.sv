// B_1-pseudomultiplier: a 2Q x 2Q unsigned multiplier whose product is left
// as two 4Q-bit numbers, o1 + o2 = h * k (mod 2^(4Q), which is exact).
//
// Four P_q-multipliers work on the quadrants of the factors: (lo,lo) at
// weight 0, (lo h, hi k) and (hi h, lo k) at weight Q, (hi,hi) at weight 2Q.
// Each P_q output pair {m1,l1}, {m2,0} is a 2Q-bit number. The (lo,lo) and
// (hi,hi) pairs do not overlap and are packed side by side into the A inputs
// of a six-input pseudo-adder; the two middle P_q-multipliers feed the B and
// C inputs shifted by Q. Per weight this gives the CSA inputs of the B_1
// scheme: 1 addend below Q, 4 (m1,m2 of (lo,lo), l1 of both middle
// quadrants) in [Q,2Q), 5 in [2Q,3Q) and 2 above 3Q. Zero bits of the
// pseudo-adder reduce to wires in synthesis. With PQ_ROM = 1 the four
// P_q-multipliers are table look-ups (pq_rom) instead of cell arrays; their
// m2 is zero.
// Timing: combinational with PIPE = 0 (clk unused). With PIPE = 1 the
// P_q cell arrays and the pseudo-adder are pipelined: latency
// rm_pkg::tree_latency(2Q, Q, G, 1, PQ_ROM) cycles, one operand pair per cycle.
module b1_pseudo_multiplier #(
  parameter int unsigned Q = 8,
  parameter int unsigned G = 2,
  parameter bit          PQ_ROM = 1'b0, // 1: P_q-multipliers as ROMs (small Q)
  parameter bit          PIPE = 1'b0    // 1: pipelined (see below)
) (
  input  logic           clk,
  input  logic [2*Q-1:0] h,
  input  logic [2*Q-1:0] k,
  output logic [4*Q-1:0] o1,
  output logic [4*Q-1:0] o2
);

  localparam int unsigned W = 4 * Q;

  // Quadrant index: [i][j] multiplies half i of h by half j of k.
  logic [Q-1:0] l1 [2][2];
  logic [Q-1:0] m1 [2][2];
  logic [Q-1:0] m2 [2][2];

  for (genvar i = 0; i < 2; i++) begin : g_h
    for (genvar j = 0; j < 2; j++) begin : g_k
      if (PQ_ROM) begin : g_rom
        pq_rom #(.Q(Q)) u_pq (
          .h (h[i*Q +: Q]),
          .k (k[j*Q +: Q]),
          .l1(l1[i][j]),
          .m1(m1[i][j]),
          .m2(m2[i][j])
        );
      end else begin : g_array
        pq_multiplier #(.Q(Q), .G(G), .PIPE(PIPE)) u_pq (
          .clk(clk),
          .h (h[i*Q +: Q]),
          .k (k[j*Q +: Q]),
          .l1(l1[i][j]),
          .m1(m1[i][j]),
          .m2(m2[i][j])
        );
      end
    end
  end

  logic [W-1:0] a1, a2, b1, b2, c1, c2;

  always_comb begin
    a1 = {m1[1][1], l1[1][1], m1[0][0], l1[0][0]};
    a2 = {m2[1][1], {Q{1'b0}}, m2[0][0], {Q{1'b0}}};
    b1 = {{Q{1'b0}}, m1[0][1], l1[0][1], {Q{1'b0}}};
    b2 = {{Q{1'b0}}, m2[0][1], {Q{1'b0}}, {Q{1'b0}}};
    c1 = {{Q{1'b0}}, m1[1][0], l1[1][0], {Q{1'b0}}};
    c2 = {{Q{1'b0}}, m2[1][0], {Q{1'b0}}, {Q{1'b0}}};
  end

  pseudo_adder6 #(.W(W), .PIPE(PIPE)) u_pa (
    .clk(clk),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .c1(c1), .c2(c2),
    .o1(o1), .o2(o2)
  );

endmodule
