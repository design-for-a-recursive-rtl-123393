// Testbench of pq_multiplier: every factor pair of the 8-bit P_q-multiplier
// (G = 2, a 4 x 4 cell array) and of a 4-bit one (2 x 2 cells). Checks that
// l1 is the low half of the product, that l1 + (m1 + m2) * 2^Q is the
// product, and that the top digit of m2 is zero.
// A pipelined 8-bit instance (PIPE = 1) is also streamed with a new pair
// every cycle; each result must appear exactly Q/G = 4 cycles later.
module tb_pq_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Pipelined instance (PIPE = 1): one operand pair per cycle, latency Q/G.
  localparam int unsigned LAT_PQ = 4;
  logic [7:0] hp, kp, l1p, m1p, m2p;
  int exp_pq [$];
  pq_multiplier #(.Q(8), .G(2), .PIPE(1'b1)) dutp (.clk(clk), .h(hp), .k(kp), .l1(l1p), .m1(m1p), .m2(m2p));

  logic [7:0] h8, k8, l1_8, m1_8, m2_8;
  logic [3:0] h4, k4, l1_4, m1_4, m2_4;

  pq_multiplier #(.Q(8), .G(2)) dut8 (.clk(clk), .h(h8), .k(k8), .l1(l1_8), .m1(m1_8), .m2(m2_8));
  pq_multiplier #(.Q(4), .G(2)) dut4 (.clk(clk), .h(h4), .k(k4), .l1(l1_4), .m1(m1_4), .m2(m2_4));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int prod, total;
      {h8, k8} = v[15:0];
      {h4, k4} = v[7:0];
      #1;
      prod  = int'(h8) * int'(k8);
      total = int'(l1_8) + ((int'(m1_8) + int'(m2_8)) << 8);
      checks++;
      if (total != prod || l1_8 != prod[7:0] || m2_8[7:6] != 2'b00) begin
        failures++;
        if (failures < 10)
          $display("FAIL Q=8 h=%0d k=%0d l1=%0d m1=%0d m2=%0d", h8, k8, l1_8, m1_8, m2_8);
      end
      if (v < 256) begin
        prod  = int'(h4) * int'(k4);
        total = int'(l1_4) + ((int'(m1_4) + int'(m2_4)) << 4);
        checks++;
        if (total != prod || l1_4 != prod[3:0] || m2_4[3:2] != 2'b00) begin
          failures++;
          $display("FAIL Q=4 h=%0d k=%0d l1=%0d m1=%0d m2=%0d", h4, k4, l1_4, m1_4, m2_4);
        end
      end
    end
    // Pipelined stream: the result of the pair driven in cycle j must
    // appear exactly LAT_PQ cycles later.
    for (int j = 0; j < 3000 + LAT_PQ; j++) begin
      @(negedge clk);
      if (j >= LAT_PQ) begin
        int e;
        e = exp_pq.pop_front();
        checks++;
        if (int'(l1p) + ((int'(m1p) + int'(m2p)) << 8) != e || l1p != e[7:0]) begin
          failures++;
          if (failures < 10) $display("FAIL pipelined cycle %0d", j);
        end
      end
      hp = 8'($urandom); kp = 8'($urandom);
      exp_pq.push_back(int'(hp) * int'(kp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
