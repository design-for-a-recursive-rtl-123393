// P_q-multiplier as a read-only memory: the Q x Q product looked up in a
// 2^(2Q)-word table of 2Q-bit entries, addressed by {h, k}.
//
// This is the alternative form of the P_q-multiplier whose delay does not
// grow with Q; it is practical only for small Q (Q = 4 gives 256 x 8 =
// 2048 bits, under the 2^12-bit size the description gives as
// technologically acceptable). The table is filled at elaboration with
// entry(a) = a[2Q-1:Q] * a[Q-1:0], so no data file is needed. The outputs
// follow the pq_multiplier interface so that either form can sit in a B_1
// pseudo-multiplier: l1 and m1 are the low and high halves of the product,
// m2 is always zero. Combinational (asynchronous read).
module pq_rom #(
  parameter int unsigned Q = 4
) (
  input  logic [Q-1:0] h,
  input  logic [Q-1:0] k,
  output logic [Q-1:0] l1,
  output logic [Q-1:0] m1,
  output logic [Q-1:0] m2
);

  localparam int unsigned DEPTH = 1 << (2 * Q);

  logic [2*Q-1:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      rom[a] = (2*Q)'(a / (1 << Q)) * (2*Q)'(a % (1 << Q));
    end
  end

  logic [2*Q-1:0] word;

  assign word = rom[{h, k}];
  assign l1   = word[Q-1:0];
  assign m1   = word[2*Q-1:Q];
  assign m2   = '0;

endmodule
