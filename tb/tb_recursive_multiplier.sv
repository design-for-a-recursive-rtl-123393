// End-to-end testbench of recursive_multiplier at its default size
// (N = 64, Q = 8, G = 2: an 8 x 8 grid of P_q-multipliers, three recursion
// levels, 128-bit special adders). Every result is compared with a product
// computed here with 128-bit arithmetic. Covered, and counted:
//   - double mode, unsigned factors (incl. all-ones, zero, the 16-bit worked
//     example 0x6B89 * 0x1954 zero-extended);
//   - double mode, two's complement factors with one and with two negative
//     factors;
//   - quad mode: four independent 32 x 32 products, unsigned and signed
//     (counted separately);
//   - quad mode: the low half of the main special adder producing a carry
//     that the half-word cut must stop (the sign corrections make this
//     happen);
//   - mode switches between consecutive operations.
// The multiplier is combinational: each result is checked in the same clock
// cycle in which its operands are applied (latency 0 cycles).
module tb_recursive_multiplier;
  import rm_pkg::*;

  localparam int unsigned N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_double = 0, n_tc_one = 0, n_tc_two = 0, n_quad = 0, n_quad_tc = 0, n_cut = 0, n_switch = 0;

  prec_mode_e     mode, last_mode;
  logic           tc;
  logic [N-1:0]   h, k, h2, k2;
  logic [2*N-1:0] p, p2;
  logic           rst_n = 1'b1, in_valid = 1'b1, out_valid;

  recursive_multiplier dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    r = {$urandom, $urandom};
    // Bias towards long runs of ones and zeros now and then.
    case ($urandom_range(0, 7))
      0: r = r | {N{1'b1}} << $urandom_range(0, N - 1);
      1: r = r >> $urandom_range(0, N - 1);
      default: ;
    endcase
    return r;
  endfunction

  // Two (N/2)-bit products side by side, signed or unsigned.
  function automatic logic [2*N-1:0] qprod(input logic [N-1:0] a, input logic [N-1:0] b,
                                           input logic t);
    localparam int unsigned S = N / 2;
    for (int f = 0; f < 2; f++) begin
      logic [S-1:0] x, y;
      x = a[f*S +: S];
      y = b[f*S +: S];
      qprod[f*N +: N] = t ? N'($signed({{S{x[S-1]}}, x}) * $signed({{S{y[S-1]}}, y}))
                          : N'(x) * N'(y);
    end
  endfunction

  // Apply one operation, wait for the clock edge, compare.
  task automatic op(input prec_mode_e m, input logic t,
                    input logic [N-1:0] a, input logic [N-1:0] b,
                    input logic [N-1:0] a2, input logic [N-1:0] b2);
    logic [2*N-1:0] e, e2;
    logic [N:0]     lo;
    mode = m; tc = t; h = a; k = b; h2 = a2; k2 = b2;
    @(posedge clk);
    if (m == MODE_DOUBLE) begin
      if (t) begin
        e = $signed({{N{a[N-1]}}, a}) * $signed({{N{b[N-1]}}, b});
        if (a[N-1] && b[N-1]) n_tc_two++;
        else if (a[N-1] || b[N-1]) n_tc_one++;
      end else begin
        e = (2*N)'(a) * (2*N)'(b);
      end
      e2 = '0;
      n_double++;
    end else begin
      e  = qprod(a, b, t);
      e2 = qprod(a2, b2, t);
      lo = (N+1)'(dut.r1[N-1:0]) + (N+1)'(dut.r2[N-1:0]);
      if (lo[N]) n_cut++;
      n_quad++;
      if (t) n_quad_tc++;
    end
    if (m != last_mode) n_switch++;
    last_mode = m;
    checks += 2;
    if (p != e) begin
      failures++;
      $display("FAIL mode=%s tc=%0d h=%h k=%h p=%h exp=%h", m.name(), t, a, b, p, e);
    end
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid low in the combinational configuration");
    end
    if (p2 != e2) begin
      failures++;
      $display("FAIL mode=%s p2=%h exp=%h", m.name(), p2, e2);
    end
  endtask

  initial begin
    last_mode = MODE_DOUBLE;
    mode = MODE_DOUBLE; tc = 1'b0; h = '0; k = '0; h2 = '0; k2 = '0;
    // Directed cases.
    op(MODE_DOUBLE, 1'b0, 64'h6B89, 64'h1954, '0, '0);
    checks++;
    if (p != 128'd178498036) begin
      failures++;
      $display("FAIL worked example: %0d", p);
    end
    op(MODE_DOUBLE, 1'b0, '1, '1, '0, '0);
    op(MODE_DOUBLE, 1'b0, '0, '1, '0, '0);
    op(MODE_DOUBLE, 1'b1, '1, '1, '0, '0);                       // (-1)(-1)
    op(MODE_DOUBLE, 1'b1, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, '0, '0);
    op(MODE_DOUBLE, 1'b1, 64'h8000_0000_0000_0000, 64'h7FFF_FFFF_FFFF_FFFF, '0, '0);
    op(MODE_QUAD,   1'b0, '1, '1, '1, '1);
    op(MODE_QUAD,   1'b1, '1, 64'h0000_0001_0000_0001, 64'h1234_5678_9ABC_DEF0, '1);
    op(MODE_DOUBLE, 1'b0, '1, 64'h2, '0, '0);
    // Random mix of modes.
    for (int i = 0; i < 30000; i++) begin
      op(prec_mode_e'($urandom_range(0, 1)), 1'($urandom), rnd(), rnd(), rnd(), rnd());
    end
    $display("double=%0d tc_one_negative=%0d tc_two_negative=%0d quad=%0d quad_signed=%0d carry_cut=%0d mode_switches=%0d",
             n_double, n_tc_one, n_tc_two, n_quad, n_quad_tc, n_cut, n_switch);
    checks++;
    if (n_double == 0 || n_tc_one == 0 || n_tc_two == 0 || n_quad == 0 || n_quad_tc == 0
        || n_cut == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
