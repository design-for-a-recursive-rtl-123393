// Carry-save adder (3:2 counter row) of W-bit vectors.
//
// s + c = a + b + d (mod 2^W): s is the bitwise sum, c the majority shifted
// up one place. The majority of the top bit is dropped, so the identity holds
// modulo 2^W; every CSA in the multiplier is sized so that the true total of
// its addends is below 2^W, which makes the dropped bit always zero in use.
// One full-adder delay, combinational.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,  // sum vector
  output logic [W-1:0] c   // carry vector, already at its weight
);

  logic [W-2:0] maj;  // top majority bit is dropped

  always_comb begin
    s   = a ^ b ^ d;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & d[W-2:0]) | (b[W-2:0] & d[W-2:0]);
    c   = {maj, 1'b0};
  end

endmodule
