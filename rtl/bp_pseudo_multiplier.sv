// B_f-pseudomultiplier: a W x W unsigned multiplier whose product is left as
// two 2W-bit numbers, o1 + o2 = h * k.
//
// The recursion B_f = four B_(f-1) plus one six-input pseudo-adder is
// unrolled into levels. Level 1 is a grid of B_1-pseudomultipliers on the
// 2Q-bit pieces of the factors. Node (i, j) of level l multiplies piece i of
// h by piece j of k, both S = Q * 2^l bits wide, and is built from the four
// level l-1 nodes below it: (2i, 2j) and (2i+1, 2j+1) do not overlap and
// share the A inputs of its pseudo-adder, while the two middle children
// (weight S/2) use B and C. At most six addends meet at any weight. Each
// level adds three CSA delays. The single node of the last level is the
// B_f-pseudomultiplier.
// W must be Q times a power of two, at least 2Q.
// Timing: combinational with PIPE = 0 (clk unused). With PIPE = 1 all nodes
// of a level have the same latency, so each pseudo-adder simply adds its
// three stages: latency rm_pkg::tree_latency(W, Q, G, 1, PQ_ROM) cycles, one
// operand pair per cycle.
module bp_pseudo_multiplier #(
  parameter int unsigned W = 64,  // operand width
  parameter int unsigned Q = 8,
  parameter int unsigned G = 2,
  parameter bit          PQ_ROM = 1'b0, // 1: P_q-multipliers as ROMs
  parameter bit          PIPE = 1'b0    // 1: pipelined (see below)
) (
  input  logic           clk,
  input  logic [W-1:0]   h,
  input  logic [W-1:0]   k,
  output logic [2*W-1:0] o1,
  output logic [2*W-1:0] o2
);

  initial begin
    assert (W % Q == 0 && rm_pkg::is_pow2(W / Q) && W >= 2 * Q)
      else $error("bp_pseudo_multiplier: W must be Q * 2^p with p >= 1");
  end

  localparam int unsigned NL = $clog2(W / Q);  // number of levels

  for (genvar l = 1; l <= NL; l++) begin : g_lvl
    localparam int unsigned S = Q << l;  // operand width of a node
    localparam int unsigned M = W / S;   // nodes per side

    for (genvar i = 0; i < M; i++) begin : g_i
      for (genvar j = 0; j < M; j++) begin : g_j
        logic [2*S-1:0] n1, n2;  // n1 + n2 = h piece i * k piece j

        if (l == 1) begin : g_b1
          b1_pseudo_multiplier #(.Q(Q), .G(G), .PQ_ROM(PQ_ROM), .PIPE(PIPE)) u_b1 (
            .clk(clk), .h(h[i*S +: S]), .k(k[j*S +: S]), .o1(n1), .o2(n2)
          );
        end else begin : g_node
          localparam int unsigned C = S / 2;  // operand width of a child
          logic [2*S-1:0] a1, a2, b1, b2, c1, c2;

          // children (h half, k half): (0,0), (1,1) -> A; (0,1) -> B; (1,0) -> C
          assign a1 = {g_lvl[l-1].g_i[2*i+1].g_j[2*j+1].n1, g_lvl[l-1].g_i[2*i].g_j[2*j].n1};
          assign a2 = {g_lvl[l-1].g_i[2*i+1].g_j[2*j+1].n2, g_lvl[l-1].g_i[2*i].g_j[2*j].n2};
          assign b1 = {{C{1'b0}}, g_lvl[l-1].g_i[2*i].g_j[2*j+1].n1, {C{1'b0}}};
          assign b2 = {{C{1'b0}}, g_lvl[l-1].g_i[2*i].g_j[2*j+1].n2, {C{1'b0}}};
          assign c1 = {{C{1'b0}}, g_lvl[l-1].g_i[2*i+1].g_j[2*j].n1, {C{1'b0}}};
          assign c2 = {{C{1'b0}}, g_lvl[l-1].g_i[2*i+1].g_j[2*j].n2, {C{1'b0}}};

          pseudo_adder6 #(.W(2*S), .PIPE(PIPE)) u_pa (
            .clk(clk),
            .a1(a1), .a2(a2), .b1(b1), .b2(b2), .c1(c1), .c2(c2),
            .o1(n1), .o2(n2)
          );
        end
      end
    end
  end

  assign o1 = g_lvl[NL].g_i[0].g_j[0].n1;
  assign o2 = g_lvl[NL].g_i[0].g_j[0].n2;

endmodule
