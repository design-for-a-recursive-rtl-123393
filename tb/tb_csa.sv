// Testbench of csa: random and corner vectors; checks the sum vector bit by
// bit, that the carry vector has a zero LSB, and that s + c equals
// a + b + d modulo 2^W.
module tb_csa;
  localparam int unsigned W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] a, b, d, s, c;

  csa #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [W-1:0] exp_total;
    #1;
    exp_total = W'(int'(a) + int'(b) + int'(d));
    checks++;
    if (s != (a ^ b ^ d) || c[0] != 1'b0 || W'(s + c) != exp_total) begin
      failures++;
      $display("FAIL a=%h b=%h d=%h s=%h c=%h", a, b, d, s, c);
    end
  endtask

  initial begin
    a = '1; b = '1; d = '1; check_one();
    a = '0; b = '0; d = '0; check_one();
    a = 16'h5555; b = 16'haaaa; d = 16'h0001; check_one();
    for (int i = 0; i < 5000; i++) begin
      a = W'($urandom); b = W'($urandom); d = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
