// Worked example on a reduced multiplier (N = 16, Q = 4: a 4 x 4 grid of
// 4-bit P_q-multipliers, two recursion levels). Factors 0x6B89 and 0x1954,
// i.e. hexadecimal digits (6, 11, 8, 9) and (1, 9, 5, 4). Checks the sixteen
// digit products formed by the P_q-multipliers, the four 8-bit quadrant
// products held as two numbers by the B_1-pseudomultipliers (11508, 3425,
// 8988, 2675), and the final product 178498036. Then runs 16-bit random
// operations in both modes, signed and unsigned, on this instance and on a
// second one whose P_q-multipliers are look-up tables (PQ_ROM = 1, 256 x 8
// bits each).
module tb_worked_example;
  import rm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  prec_mode_e  mode;
  logic        tc;
  logic [15:0] h, k, h2, k2;
  logic [31:0] p, p2;
  logic        rst_n = 1'b1, in_valid = 1'b1, out_valid, out_valid_rom;

  logic [31:0] p_rom, p2_rom;

  recursive_multiplier #(.N(16), .Q(4), .G(2)) dut (.*);
  recursive_multiplier #(.N(16), .Q(4), .G(2), .PQ_ROM(1'b1)) dut_rom (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid_rom),
    .mode(mode), .tc(tc), .h(h), .k(k), .h2(h2), .k2(k2), .p(p_rom), .p2(p2_rom)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    mode = MODE_DOUBLE; tc = 1'b0; h2 = '0; k2 = '0;
    h = 16'h6B89; k = 16'h1954;
    @(posedge clk);
    // Digit products inside quadrant (lo h, lo k): digits 9, 8 times 4, 5.
    expect_eq("9*4", int'(dut.g_h[0].g_k[0].u_quad.g_lvl[1].g_i[0].g_j[0].g_b1.u_b1.g_h[0].g_k[0].g_array.u_pq.l1)
                   + (int'(dut.g_h[0].g_k[0].u_quad.g_lvl[1].g_i[0].g_j[0].g_b1.u_b1.g_h[0].g_k[0].g_array.u_pq.m1) << 4)
                   + (int'(dut.g_h[0].g_k[0].u_quad.g_lvl[1].g_i[0].g_j[0].g_b1.u_b1.g_h[0].g_k[0].g_array.u_pq.m2) << 4), 36);
    expect_eq("8*5", int'(dut.g_h[0].g_k[0].u_quad.g_lvl[1].g_i[0].g_j[0].g_b1.u_b1.g_h[1].g_k[1].g_array.u_pq.l1)
                   + (int'(dut.g_h[0].g_k[0].u_quad.g_lvl[1].g_i[0].g_j[0].g_b1.u_b1.g_h[1].g_k[1].g_array.u_pq.m1) << 4)
                   + (int'(dut.g_h[0].g_k[0].u_quad.g_lvl[1].g_i[0].g_j[0].g_b1.u_b1.g_h[1].g_k[1].g_array.u_pq.m2) << 4), 40);
    // B_1 quadrant results.
    expect_eq("B1 lo*lo", int'(16'(dut.s1[0][0] + dut.s2[0][0])), 11508);
    expect_eq("B1 lo*hi", int'(16'(dut.s1[0][1] + dut.s2[0][1])), 3425);
    expect_eq("B1 hi*lo", int'(16'(dut.s1[1][0] + dut.s2[1][0])), 8988);
    expect_eq("B1 hi*hi", int'(16'(dut.s1[1][1] + dut.s2[1][1])), 2675);
    expect_eq("product", int'(p), 178498036);
    expect_eq("product (ROM)", int'(p_rom), 178498036);
    expect_eq("p2 idle", int'(p2), 0);
    // Random operations in both modes.
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] e, e2;
      mode = prec_mode_e'($urandom_range(0, 1));
      tc = 1'($urandom);
      h = 16'($urandom); k = 16'($urandom); h2 = 16'($urandom); k2 = 16'($urandom);
      @(posedge clk);
      if (mode == MODE_QUAD) begin
        if (tc) begin
          e  = {16'($signed(h[15:8]) * $signed(k[15:8])), 16'($signed(h[7:0]) * $signed(k[7:0]))};
          e2 = {16'($signed(h2[15:8]) * $signed(k2[15:8])), 16'($signed(h2[7:0]) * $signed(k2[7:0]))};
        end else begin
          e  = {16'(h[15:8] * k[15:8]), 16'(h[7:0] * k[7:0])};
          e2 = {16'(h2[15:8] * k2[15:8]), 16'(h2[7:0] * k2[7:0])};
        end
      end else begin
        e  = tc ? 32'($signed(h) * $signed(k)) : 32'(h) * 32'(k);
        e2 = '0;
      end
      checks++;
      checks++;
      if (p_rom != e || p2_rom != e2) begin
        failures++;
        $display("FAIL (ROM) mode=%s tc=%0d h=%h k=%h p=%h exp=%h", mode.name(), tc, h, k, p_rom, e);
      end
      if (p != e || p2 != e2) begin
        failures++;
        $display("FAIL mode=%s tc=%0d h=%h k=%h p=%h exp=%h", mode.name(), tc, h, k, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
