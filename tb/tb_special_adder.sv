// Testbench of special_adder (Brent-Kung) at W = 128 and W = 16: random and
// carry-chain corner operands, in whole-word mode (sum = a + b mod 2^W) and
// in split mode (two independent W/2-bit sums). Counts the split-mode cases
// in which the low half really produces a carry that must be cut.
// A pipelined 128-bit instance (PIPE = 1) is streamed with a new pair every
// cycle, mixing split and whole-word mode; each sum must appear exactly
// 2 log2(128) - 1 = 13 cycles later.
module tb_special_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cuts = 0;

  // Pipelined instance (PIPE = 1, W = 128): latency 2*7-1 = 13.
  localparam int unsigned LAT = 13;
  logic [127:0] pa, pb, psum;
  logic         psplit;
  logic [127:0] exp_q [$];
  special_adder #(.W(128), .PIPE(1'b1)) dutp (.clk(clk), .a(pa), .b(pb), .split(psplit), .sum(psum));

  logic [127:0] a, b, sum;
  logic         split;
  logic [15:0]  a16, b16, sum16;

  special_adder #(.W(128)) dut (.clk(clk), .a(a), .b(b), .split(split), .sum(sum));
  special_adder #(.W(16))  dut16 (.clk(clk), .a(a16), .b(b16), .split(split), .sum(sum16));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [127:0] e;
    logic [15:0]  e16;
    logic [64:0]  lo;
    #1;
    lo = 65'(a[63:0]) + 65'(b[63:0]);
    if (split) begin
      e   = {64'(a[127:64] + b[127:64]), lo[63:0]};
      e16 = {8'(a16[15:8] + b16[15:8]), 8'(a16[7:0] + b16[7:0])};
      if (lo[64]) cuts++;
    end else begin
      e   = a + b;
      e16 = a16 + b16;
    end
    checks += 2;
    if (sum != e) begin
      failures++;
      $display("FAIL W=128 split=%0d a=%h b=%h sum=%h exp=%h", split, a, b, sum, e);
    end
    if (sum16 != e16) begin
      failures++;
      $display("FAIL W=16 split=%0d a=%h b=%h sum=%h exp=%h", split, a16, b16, sum16, e16);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      split = s[0];
      a = '1; b = 128'd1; a16 = '1; b16 = 16'd1; check_one();
      a = '1; b = '1;     a16 = '1; b16 = '1;    check_one();
      a = {64'd0, 64'hFFFF_FFFF_FFFF_FFFF}; b = 128'd1;
      a16 = 16'h00FF; b16 = 16'h0001; check_one();
      for (int i = 0; i < 10000; i++) begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        a16 = 16'($urandom); b16 = 16'($urandom);
        check_one();
      end
    end
    checks++;
    if (cuts == 0) begin
      failures++;
      $display("FAIL split mode never cut a carry");
    end
    for (int j = 0; j < 3000 + LAT; j++) begin
      @(negedge clk);
      if (j >= LAT) begin
        logic [127:0] e;
        e = exp_q.pop_front();
        checks++;
        if (psum != e) begin
          failures++;
          $display("FAIL pipelined cycle %0d sum=%h exp=%h", j, psum, e);
        end
      end
      pa = {$urandom, $urandom, $urandom, $urandom};
      pb = {$urandom, $urandom, $urandom, $urandom};
      if (j % 7 == 0) pb = ~pa + 128'(j % 3);  // long carry chains
      psplit = 1'($urandom);
      exp_q.push_back(psplit ? {64'(pa[127:64] + pb[127:64]), 64'(pa[63:0] + pb[63:0])} : pa + pb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
