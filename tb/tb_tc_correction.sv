// Testbench of tc_correction at N = 16. The unsigned product of the factor
// bit patterns is split at random into o1 + o2; with en = 1, r1 + r2 must be
// the two's complement product of the factors (mod 2^32), with en = 0 the
// unsigned product. With split = 1 the two halves of o1 + o2 each hold an
// (N/2)-bit product (their split into o1, o2 overflows the half word at
// random), and each half of r1 + r2, added on its own, must be the signed or
// unsigned half-size product. Counts cases with one and with two negative
// factors, in both forms.
// A pipelined instance (PIPE = 1) is streamed with a new input every cycle;
// each result must appear exactly 3 cycles later.
module tb_tc_correction;
  localparam int unsigned N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned S = N / 2;

  int checks = 0, failures = 0, one_neg = 0, two_neg = 0, split_neg = 0;

  // Pipelined instance (PIPE = 1): latency 3.
  localparam int unsigned LAT = 3;
  logic           pen, psplit;
  logic [N-1:0]   ph, pk;
  logic [2*N-1:0] po1, po2, pr1, pr2;
  logic [2*N-1:0] exp_q [$];
  logic           split_q [$];
  tc_correction #(.N(N), .PIPE(1'b1)) dutp (
    .clk(clk), .en(pen), .split(psplit), .h(ph), .k(pk), .o1(po1), .o2(po2), .r1(pr1), .r2(pr2)
  );

  logic           en, split;
  logic [N-1:0]   h, k;
  logic [2*N-1:0] o1, o2, r1, r2;

  tc_correction #(.N(N)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected products: one N x N product, or two (N/2)-bit ones side by side.
  function automatic logic [2*N-1:0] product(input logic [N-1:0] a, input logic [N-1:0] b,
                                             input logic e, input logic sp);
    if (!sp)
      return e ? (2*N)'(longint'($signed(a)) * longint'($signed(b)))
               : (2*N)'(a) * (2*N)'(b);
    for (int f = 0; f < 2; f++) begin
      logic [S-1:0] x, y;
      x = a[f*S +: S];
      y = b[f*S +: S];
      product[f*N +: N] = e ? N'(int'($signed(x)) * int'($signed(y))) : N'(x) * N'(y);
    end
  endfunction

  // r1 + r2 as the special adder forms it: whole, or per half word.
  function automatic logic [2*N-1:0] fold(input logic [2*N-1:0] a, input logic [2*N-1:0] b,
                                          input logic sp);
    if (!sp) return (2*N)'(a + b);
    return {N'(a[2*N-1:N] + b[2*N-1:N]), N'(a[N-1:0] + b[N-1:0])};
  endfunction

  // o2 such that o1 + o2 holds the unsigned product(s).
  function automatic logic [2*N-1:0] other_half(input logic [2*N-1:0] pu, input logic [2*N-1:0] a,
                                                input logic sp);
    if (!sp) return pu - a;
    return {N'(pu[2*N-1:N] - a[2*N-1:N]), N'(pu[N-1:0] - a[N-1:0])};
  endfunction

  task automatic check_one(input logic [N-1:0] a, input logic [N-1:0] b, input logic e,
                           input logic sp = 1'b0);
    logic [2*N-1:0] exp_r;
    h = a; k = b; en = e; split = sp;
    o1 = $urandom;
    o2 = other_half(product(a, b, 1'b0, sp), o1, sp);
    #1;
    exp_r = product(a, b, e, sp);
    if (!sp && e && a[N-1] && b[N-1]) two_neg++;
    else if (!sp && e && (a[N-1] ^ b[N-1])) one_neg++;
    if (sp && e && a[S-1] && b[N-1]) split_neg++;
    checks++;
    if (fold(r1, r2, sp) != exp_r) begin
      failures++;
      $display("FAIL en=%0d split=%0d h=%h k=%h got=%h exp=%h", e, sp, a, b, fold(r1, r2, sp), exp_r);
    end
  endtask

  initial begin
    check_one(16'h8000, 16'h8000, 1'b1);
    check_one(16'h8000, 16'h7FFF, 1'b1);
    check_one(16'hFFFF, 16'hFFFF, 1'b1);
    check_one(16'hFFFF, 16'hFFFF, 1'b0);
    check_one(16'h8080, 16'h8080, 1'b1, 1'b1);
    check_one(16'hFFFF, 16'hFFFF, 1'b1, 1'b1);
    check_one(16'hFFFF, 16'hFFFF, 1'b0, 1'b1);
    for (int i = 0; i < 20000; i++)
      check_one(16'($urandom), 16'($urandom), 1'($urandom), 1'($urandom));
    checks++;
    if (one_neg == 0 || two_neg == 0 || split_neg == 0) begin
      failures++;
      $display("FAIL sign cases not covered");
    end
    for (int j = 0; j < 2000 + LAT; j++) begin
      @(negedge clk);
      if (j >= LAT) begin
        logic [2*N-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (fold(pr1, pr2, split_q.pop_front()) != e) begin
          failures++;
          $display("FAIL pipelined cycle %0d", j);
        end
      end
      pen = 1'($urandom); psplit = 1'($urandom); ph = N'($urandom); pk = N'($urandom);
      po1 = $urandom;
      po2 = other_half(product(ph, pk, 1'b0, psplit), po1, psplit);
      exp_q.push_back(product(ph, pk, pen, psplit));
      split_q.push_back(psplit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
