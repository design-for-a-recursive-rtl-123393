// Testbench of pipe_delay: delay lines of depth 0 (a wire), 1 and 5 are fed a
// new random byte every cycle; each output must equal the input of exactly
// DEPTH cycles before.
module tb_pipe_delay;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] d, q0, q1, q5;
  logic [7:0] hist [$];

  pipe_delay #(.W(8), .DEPTH(0)) dut0 (.clk(clk), .d(d), .q(q0));
  pipe_delay #(.W(8), .DEPTH(1)) dut1 (.clk(clk), .d(d), .q(q1));
  pipe_delay #(.W(8), .DEPTH(5)) dut5 (.clk(clk), .d(d), .q(q5));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2000; j++) begin
      @(negedge clk);
      d = 8'($urandom);
      hist.push_front(d);  // hist[n] = input of n cycles ago
      #1;
      checks++;
      if (q0 != d) begin
        failures++;
        $display("FAIL depth 0 at %0d", j);
      end
      if (j >= 1) begin
        checks++;
        if (q1 != hist[1]) begin
          failures++;
          $display("FAIL depth 1 at %0d", j);
        end
      end
      if (j >= 5) begin
        checks++;
        if (q5 != hist[5]) begin
          failures++;
          $display("FAIL depth 5 at %0d", j);
        end
        void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
