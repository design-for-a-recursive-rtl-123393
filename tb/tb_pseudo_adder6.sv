// Testbench of pseudo_adder6: random and all-ones inputs; o1 + o2 must equal
// the sum of the six addends modulo 2^W.
// A pipelined instance (PIPE = 1) is streamed with a new set every cycle;
// each sum must appear exactly 3 cycles later.
module tb_pseudo_adder6;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Pipelined instance (PIPE = 1): latency 3, one set per cycle.
  localparam int unsigned LAT = 3;
  logic [W-1:0] pa1, pa2, pb1, pb2, pc1, pc2, po1, po2;
  logic [W-1:0] exp_q [$];
  pseudo_adder6 #(.W(W), .PIPE(1'b1)) dutp (
    .clk(clk), .a1(pa1), .a2(pa2), .b1(pb1), .b2(pb2), .c1(pc1), .c2(pc2), .o1(po1), .o2(po2)
  );
  logic [W-1:0] a1, a2, b1, b2, c1, c2, o1, o2;

  pseudo_adder6 #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [63:0] exp_total;
    #1;
    exp_total = 64'(a1) + 64'(a2) + 64'(b1) + 64'(b2) + 64'(c1) + 64'(c2);
    checks++;
    if (W'(o1 + o2) != exp_total[W-1:0]) begin
      failures++;
      $display("FAIL o1=%h o2=%h exp=%h", o1, o2, exp_total[W-1:0]);
    end
  endtask

  initial begin
    {a1, a2, b1, b2, c1, c2} = '1; check_one();
    {a1, a2, b1, b2, c1, c2} = '0; check_one();
    for (int i = 0; i < 5000; i++) begin
      a1 = $urandom; a2 = $urandom; b1 = $urandom;
      b2 = $urandom; c1 = $urandom; c2 = $urandom;
      check_one();
    end
    for (int j = 0; j < 2000 + LAT; j++) begin
      @(negedge clk);
      if (j >= LAT) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (W'(po1 + po2) != e) begin
          failures++;
          $display("FAIL pipelined cycle %0d", j);
        end
      end
      pa1 = $urandom; pa2 = $urandom; pb1 = $urandom;
      pb2 = $urandom; pc1 = $urandom; pc2 = $urandom;
      exp_q.push_back(W'(pa1 + pa2 + pb1 + pb2 + pc1 + pc2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
