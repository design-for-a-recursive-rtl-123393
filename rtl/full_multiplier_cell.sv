// Full-multiplier cell: Z = H * K + X + Y on G-bit digits.
//
// This is the macro-cell of the iterative array. With G-bit operands the
// result never exceeds (2^G - 1)^2 + 2 (2^G - 1) = 2^(2G) - 1, so it fits in
// 2G bits without loss: the low G bits (z_lo) carry the weight of the cell,
// the high G bits (z_hi) the weight of the cell one digit up. In the array
// z_hi goes straight down to the cell below (same K digit, next H digit) and
// z_lo goes diagonally to the cell below and one digit to the right.
//
// Structure: one multiplexer per output bit (2G of them, four 16-input ones
// at G = 2, as in the original cell). The addends x and y, which arrive last
// from the row above, drive the select lines; the 2^(2G) data inputs of
// output bit b are the functions bit_b(h*k + X + Y) of the factor digits h, k
// for every value X, Y of the selects. h and k are present from the start, so
// once the data functions have settled each cell adds one multiplexer delay
// to the path through the array. Which inputs select and how the data
// functions are built is this design's reading; synthesis is free to
// restructure it. Purely combinational.
module full_multiplier_cell #(
  parameter int unsigned G = 2
) (
  input  logic [G-1:0] h,     // digit of the first factor
  input  logic [G-1:0] k,     // digit of the second factor
  input  logic [G-1:0] x,     // addend from the cell above (its z_hi)
  input  logic [G-1:0] y,     // addend from the cell above-left (its z_lo)
  output logic [G-1:0] z_lo,  // low digit of h*k + x + y
  output logic [G-1:0] z_hi   // high digit of h*k + x + y
);

  localparam int unsigned NS = 1 << (2 * G);  // data inputs per multiplexer

  logic [2*G-1:0] word [NS];  // word[{X, Y}] = h*k + X + Y
  logic [NS-1:0]  data [2*G]; // data[b][{X, Y}] = bit b of word[{X, Y}]
  logic [2*G-1:0] z;

  // Data functions of h and k.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      word[s] = (2*G)'(h) * (2*G)'(k) + (2*G)'(s >> G) + (2*G)'(s % (1 << G));
      for (int b = 0; b < 2 * G; b++) data[b][s] = word[s][b];
    end
  end

  // The multiplexers, selected by x and y.
  for (genvar b = 0; b < 2 * G; b++) begin : g_mux
    assign z[b] = data[b][{x, y}];
  end

  assign z_lo = z[G-1:0];
  assign z_hi = z[2*G-1:G];

endmodule
