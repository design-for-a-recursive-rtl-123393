// Special adder: W-bit Brent-Kung parallel-prefix (carry-lookahead) adder that
// turns the two outputs of the pseudo-multiplier tree into the product.
//
// Bit generate/propagate pairs are combined by a Brent-Kung prefix network:
// an up-sweep of log2(W) levels, then a down-sweep of log2(W)-1 levels. Level
// t combines position i with position i - 2^l (l = t on the way up, l =
// 2 log2(W) - 2 - t on the way down), giving the carry into every bit in
// O(log W) delay with O(W) prefix cells. The adder has no carry-in; the carry
// out of bit W-1 is dropped because the product always fits in W bits.
//
// When split is 1 the carry from bit W/2-1 into bit W/2 is suppressed, so the
// adder works as two independent W/2-bit adders. This is the extra gating the
// four-product mode of the multiplier needs.
//
// Timing: combinational with PIPE = 0 (clk unused). With PIPE = 1 every
// prefix level is followed by a register, the bit propagates travel alongside,
// and the sum appears 2 log2(W) - 1 cycles after the operands, one new pair
// per cycle.
module special_adder #(
  parameter int unsigned W = 128,
  parameter bit          PIPE = 1'b0
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         split,  // 1: two independent W/2-bit additions
  output logic [W-1:0] sum
);

  localparam int unsigned LV = $clog2(W);
  localparam int unsigned NL = 2 * LV - 1;  // prefix levels
  localparam int unsigned R  = PIPE ? 1 : 0;

  logic [W-1:0] g0, p0, pk0;

  always_comb begin
    g0  = a & b;
    p0  = a ^ b;
    pk0 = p0;
    // Cut the prefix chain above bit W/2-1 in split mode.
    if (split) begin
      g0[W/2-1]  = 1'b0;
      pk0[W/2-1] = 1'b0;
    end
  end

  for (genvar t = 0; t < NL; t++) begin : g_lvl
    localparam int unsigned L     = (t < LV) ? t : (2 * LV - 2 - t);
    localparam int unsigned FIRST = (t < LV) ? ((2 << L) - 1) : ((3 << L) - 1);

    logic [W-1:0] gi, pi, gn, pn, go, po;

    if (t == 0) begin : g_in0
      assign gi = g0;
      assign pi = pk0;
    end else begin : g_in
      assign gi = g_lvl[t-1].go;
      assign pi = g_lvl[t-1].po;
    end

    always_comb begin
      gn = gi;
      pn = pi;
      for (int i = FIRST; i < W; i += (2 << L)) begin
        gn[i] = gi[i] | (pi[i] & gi[i - (1 << L)]);
        pn[i] = pi[i] & pi[i - (1 << L)];
      end
    end

    pipe_delay #(.W(2*W), .DEPTH(R)) u_q (.clk(clk), .d({gn, pn}), .q({go, po}));
  end

  logic [W-1:0] p_d, gg;

  pipe_delay #(.W(W), .DEPTH(R * NL)) u_pd (.clk(clk), .d(p0), .q(p_d));
  assign gg  = g_lvl[NL-1].go;
  assign sum = p_d ^ {gg[W-2:0], 1'b0};

endmodule
