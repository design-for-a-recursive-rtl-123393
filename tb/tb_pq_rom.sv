// Testbench of pq_rom: every factor pair of the Q = 4 look-up P_q-multiplier
// (256 x 8 bits); l1 and m1 must be the low and high halves of h * k and m2
// must be zero.
module tb_pq_rom;
  localparam int unsigned Q = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [Q-1:0] h, k, l1, m1, m2;

  pq_rom #(.Q(Q)) dut (.*);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * Q)); v++) begin
      int prod;
      {h, k} = v[2*Q-1:0];
      #1;
      prod = int'(h) * int'(k);
      checks++;
      if ({m1, l1} != prod[2*Q-1:0] || m2 != '0) begin
        failures++;
        $display("FAIL h=%0d k=%0d l1=%0d m1=%0d m2=%0d", h, k, l1, m1, m2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
