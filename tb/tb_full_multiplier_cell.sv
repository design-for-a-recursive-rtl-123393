// Testbench of full_multiplier_cell: all 256 input combinations of the G = 2
// cell, z = {z_hi, z_lo} compared with h*k + x + y computed here as integers.
module tb_full_multiplier_cell;
  localparam int unsigned G = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [G-1:0] h, k, x, y, z_lo, z_hi;

  full_multiplier_cell #(.G(G)) dut (.*);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (4 * G)); v++) begin
      int exp_z;
      {h, k, x, y} = v[4*G-1:0];
      #1;
      exp_z = int'(h) * int'(k) + int'(x) + int'(y);
      checks++;
      if ({z_hi, z_lo} != exp_z[2*G-1:0]) begin
        failures++;
        $display("FAIL h=%0d k=%0d x=%0d y=%0d z=%0d exp=%0d", h, k, x, y, {z_hi, z_lo}, exp_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
