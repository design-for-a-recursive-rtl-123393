// P_q-multiplier: Q x Q unsigned multiplier built as an iterative array of
// (Q/G) x (Q/G) full-multiplier cells, delivering its product as three numbers
// whose sum is h * k:
//
//   h * k = l1 + (m1 << Q) + (m2 << Q)
//
// Cell (r, c) multiplies digit r of h by digit c of k (digit weight r + c).
// Its high digit goes straight down to cell (r+1, c); its low digit goes
// diagonally to cell (r+1, c-1), which has the same weight. The low digits
// leaving column 0 form l1 (bits 0..Q-1 of the product, already final); the
// high digits leaving the bottom row form m1 and the low digits leaving the
// bottom row (columns 1..Q/G-1) form m2, both of weight 2^Q. The top digit of
// m2 is always zero. Free cell inputs (top row, leftmost column) are tied to
// zero. The array and its output naming follow the detailed P_q-multiplier
// scheme of the design (Q = 8 there).
//
// Timing: with PIPE = 0 the array is combinational, delay Q/G cells (clk
// unused). With PIPE = 1 every cell row is followed by a register stage: row
// r sees digit r of h and the k bus delayed by r cycles, and the l1 digits
// that leave early are delayed to line up, so all outputs appear Q/G cycles
// after their operands, one new operand pair per cycle. Where the registers
// go is this design's choice; only the possibility of pipelining is given.
module pq_multiplier #(
  parameter int unsigned Q = 8,     // operand width
  parameter int unsigned G = 2,     // cell digit width
  parameter bit          PIPE = 1'b0
) (
  input  logic         clk,
  input  logic [Q-1:0] h,
  input  logic [Q-1:0] k,
  output logic [Q-1:0] l1,  // product bits 0..Q-1
  output logic [Q-1:0] m1,  // first high addend, weight 2^Q
  output logic [Q-1:0] m2   // second high addend, weight 2^Q
);

  localparam int unsigned D = Q / G;  // digits per operand
  localparam int unsigned R = PIPE ? 1 : 0;

  initial begin
    assert (Q % G == 0 && D >= 2)
      else $error("pq_multiplier: Q must be a multiple of G with Q/G >= 2");
  end

  for (genvar r = 0; r < D; r++) begin : g_row
    logic [G-1:0] h_r;  // digit r of h, aligned with this row
    logic [Q-1:0] k_r;  // k, aligned with this row

    pipe_delay #(.W(G), .DEPTH(R * r)) u_hd (.clk(clk), .d(h[r*G +: G]), .q(h_r));
    if (r == 0) begin : g_k0
      assign k_r = k;
    end else begin : g_kd
      pipe_delay #(.W(Q), .DEPTH(R)) u_kd (.clk(clk), .d(g_row[r-1].k_r), .q(k_r));
    end

    for (genvar c = 0; c < D; c++) begin : g_col
      logic [G-1:0] x_in, y_in, zlo, zhi, zlo_q, zhi_q;
      if (r == 0) begin : g_top
        assign x_in = '0;
        assign y_in = '0;
      end else begin : g_inner
        assign x_in = g_row[r-1].g_col[c].zhi_q;
        if (c == D - 1) begin : g_left
          assign y_in = '0;
        end else begin : g_diag
          assign y_in = g_row[r-1].g_col[c+1].zlo_q;
        end
      end
      full_multiplier_cell #(.G(G)) u_cell (
        .h   (h_r),
        .k   (k_r[c*G +: G]),
        .x   (x_in),
        .y   (y_in),
        .z_lo(zlo),
        .z_hi(zhi)
      );
      // Row register (a wire when PIPE = 0).
      pipe_delay #(.W(2*G), .DEPTH(R)) u_zq (.clk(clk), .d({zhi, zlo}), .q({zhi_q, zlo_q}));
    end
  end

  for (genvar d = 0; d < D; d++) begin : g_out
    // l1 digit d leaves row d; delay it to the last row's time.
    pipe_delay #(.W(G), .DEPTH(R * (D - 1 - d))) u_l1d (
      .clk(clk), .d(g_row[d].g_col[0].zlo_q), .q(l1[d*G +: G])
    );
    assign m1[d*G +: G] = g_row[D-1].g_col[d].zhi_q;
    if (d < D - 1) begin : g_m2
      assign m2[d*G +: G] = g_row[D-1].g_col[d+1].zlo_q;
    end else begin : g_m2_top
      assign m2[d*G +: G] = '0;
    end
  end

endmodule
