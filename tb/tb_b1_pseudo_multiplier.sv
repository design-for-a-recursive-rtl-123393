// Testbench of b1_pseudo_multiplier. A Q = 4 instance (8 x 8 bits) is fed the
// four quadrant products of a 16-bit worked example (factors 0x6B89 and
// 0x1954, whose 8-bit quadrant products are 11508, 3425, 8988 and 2675) and
// then random operands; a Q = 8 instance (16 x 16 bits) gets corners and
// random operands. Each time o1 + o2 must equal h * k.
module tb_b1_pseudo_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  h4, k4;
  logic [15:0] o1_4, o2_4;
  logic [15:0] h8, k8;
  logic [31:0] o1_8, o2_8;

  b1_pseudo_multiplier #(.Q(4), .G(2)) dut4 (.clk(clk), .h(h4), .k(k4), .o1(o1_4), .o2(o2_4));
  b1_pseudo_multiplier #(.Q(8), .G(2)) dut8 (.clk(clk), .h(h8), .k(k8), .o1(o1_8), .o2(o2_8));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check4(input logic [7:0] a, input logic [7:0] b, input int exp_p);
    h4 = a; k4 = b;
    #1;
    checks++;
    if (int'(16'(o1_4 + o2_4)) != exp_p) begin
      failures++;
      $display("FAIL Q=4 h=%h k=%h sum=%0d exp=%0d", a, b, 16'(o1_4 + o2_4), exp_p);
    end
  endtask

  task automatic check8(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] exp_p;
    h8 = a; k8 = b;
    #1;
    exp_p = 32'(a) * 32'(b);
    checks++;
    if (32'(o1_8 + o2_8) != exp_p) begin
      failures++;
      $display("FAIL Q=8 h=%h k=%h sum=%h exp=%h", a, b, 32'(o1_8 + o2_8), exp_p);
    end
  endtask

  initial begin
    h8 = '0; k8 = '0;
    // Quadrants of the worked example.
    check4(8'h89, 8'h54, 11508);
    check4(8'h89, 8'h19, 3425);
    check4(8'h6B, 8'h54, 8988);
    check4(8'h6B, 8'h19, 2675);
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] a, b;
      {a, b} = v[15:0];
      check4(a, b, int'(a) * int'(b));
    end
    check8('1, '1);
    check8('1, 16'h0001);
    check8('0, '1);
    for (int i = 0; i < 20000; i++) check8(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
