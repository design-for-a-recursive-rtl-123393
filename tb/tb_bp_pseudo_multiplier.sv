// Testbench of bp_pseudo_multiplier at three recursion depths:
// W = 16, Q = 4 (B_2, a 4 x 4 grid of 4-bit P_q-multipliers, fed the 16-bit
// worked example 0x6B89 * 0x1954 = 178498036 and random factors),
// W = 32, Q = 8 (B_2) and W = 64, Q = 8 (B_3, the default shape, 8 x 8
// P_q-multipliers). o1 + o2 must equal h * k.
// A pipelined W = 32, Q = 8 instance (PIPE = 1) is streamed with a new pair
// every cycle; each result must appear exactly 10 cycles later.
module tb_bp_pseudo_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Pipelined instance (PIPE = 1, W = 32, Q = 8): latency 4 + 3 + 3 = 10.
  localparam int unsigned LAT = 10;
  logic [31:0] ph, pk;
  logic [63:0] po1, po2;
  logic [63:0] exp_q [$];
  bp_pseudo_multiplier #(.W(32), .Q(8), .G(2), .PIPE(1'b1)) dutp (.clk(clk), .h(ph), .k(pk), .o1(po1), .o2(po2));

  logic [15:0]  h16, k16;
  logic [31:0]  o1_16, o2_16;
  logic [31:0]  h32, k32;
  logic [63:0]  o1_32, o2_32;
  logic [63:0]  h64, k64;
  logic [127:0] o1_64, o2_64;

  bp_pseudo_multiplier #(.W(16), .Q(4), .G(2)) dut16 (.clk(clk), .h(h16), .k(k16), .o1(o1_16), .o2(o2_16));
  bp_pseudo_multiplier #(.W(32), .Q(8), .G(2)) dut32 (.clk(clk), .h(h32), .k(k32), .o1(o1_32), .o2(o2_32));
  bp_pseudo_multiplier #(.W(64), .Q(8), .G(2)) dut64 (.clk(clk), .h(h64), .k(k64), .o1(o1_64), .o2(o2_64));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rand64x2();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic run(input logic [63:0] a, input logic [63:0] b);
    logic [127:0] e16, e32, e64;
    h16 = a[15:0]; k16 = b[15:0];
    h32 = a[31:0]; k32 = b[31:0];
    h64 = a;       k64 = b;
    #1;
    e16 = 128'(h16) * 128'(k16);
    e32 = 128'(h32) * 128'(k32);
    e64 = 128'(h64) * 128'(k64);
    checks += 3;
    if (32'(o1_16 + o2_16) != e16[31:0]) begin
      failures++;
      $display("FAIL W=16 h=%h k=%h", h16, k16);
    end
    if (64'(o1_32 + o2_32) != e32[63:0]) begin
      failures++;
      $display("FAIL W=32 h=%h k=%h", h32, k32);
    end
    if (128'(o1_64 + o2_64) != e64) begin
      failures++;
      $display("FAIL W=64 h=%h k=%h", h64, k64);
    end
  endtask

  initial begin
    logic [127:0] r;
    // Worked example.
    h16 = 16'h6B89; k16 = 16'h1954; h32 = '0; k32 = '0; h64 = '0; k64 = '0;
    #1;
    checks++;
    if (32'(o1_16 + o2_16) != 32'd178498036) begin
      failures++;
      $display("FAIL example: %0d", 32'(o1_16 + o2_16));
    end
    run('1, '1);
    run('1, 64'd1);
    run('0, '1);
    run(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0001);
    for (int i = 0; i < 20000; i++) begin
      r = rand64x2();
      run(r[127:64], r[63:0]);
    end
    for (int j = 0; j < 3000 + LAT; j++) begin
      @(negedge clk);
      if (j >= LAT) begin
        logic [63:0] e;
        e = exp_q.pop_front();
        checks++;
        if (64'(po1 + po2) != e) begin
          failures++;
          $display("FAIL pipelined cycle %0d", j);
        end
      end
      ph = $urandom; pk = $urandom;
      exp_q.push_back(64'(ph) * 64'(pk));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
