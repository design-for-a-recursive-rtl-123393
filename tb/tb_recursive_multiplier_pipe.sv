// End-to-end testbench of the pipelined multiplier (PIPE = 1) at the default
// size N = 64, Q = 8, G = 2. After an asynchronous reset, operations are
// issued at random with in_valid, back to back or with idle cycles between,
// and with the mode and the sign flag changing from one cycle to the next.
// A scoreboard holds each issued operation with its issue cycle; every
// out_valid result must match the oldest entry and must arrive exactly
// LATENCY = 10 + 3 + 3 + 13 = 29 cycles after issue. Counted, and required
// to occur at least once: double mode, signed operations with one and with
// two negative factors, quad mode unsigned and signed, a mode change between consecutive cycles,
// idle cycles in the stream, and out_valid held low during reset.
module tb_recursive_multiplier_pipe;
  import rm_pkg::*;

  localparam int unsigned N = 64;
  localparam int unsigned S = N / 2;
  localparam int unsigned LATENCY = 29;

  typedef struct {
    logic [2*N-1:0] p;
    logic [2*N-1:0] p2;
    int             issued;
  } result_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_double = 0, n_tc_one = 0, n_tc_two = 0, n_quad = 0, n_quad_tc = 0, n_switch = 0, n_idle = 0, n_out = 0;

  logic           rst_n, in_valid, out_valid, tc;
  prec_mode_e     mode, prev_mode;
  logic           prev_valid;
  logic [N-1:0]   h, k, h2, k2;
  logic [2*N-1:0] p, p2;
  result_t        sb [$];

  recursive_multiplier #(.PIPE(1'b1)) dut (.*);

  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two (N/2)-bit products side by side, signed or unsigned.
  function automatic logic [2*N-1:0] qprod(input logic [N-1:0] a, input logic [N-1:0] b,
                                           input logic t);
    for (int f = 0; f < 2; f++) begin
      logic [S-1:0] x, y;
      x = a[f*S +: S];
      y = b[f*S +: S];
      qprod[f*N +: N] = t ? N'($signed({{S{x[S-1]}}, x}) * $signed({{S{y[S-1]}}, y}))
                          : N'(x) * N'(y);
    end
  endfunction

  function automatic result_t expected(input prec_mode_e m, input logic t,
                                       input logic [N-1:0] a, input logic [N-1:0] b,
                                       input logic [N-1:0] a2, input logic [N-1:0] b2);
    result_t r;
    if (m == MODE_DOUBLE) begin
      r.p  = t ? $signed({{N{a[N-1]}}, a}) * $signed({{N{b[N-1]}}, b})
               : (2*N)'(a) * (2*N)'(b);
      r.p2 = '0;
    end else begin
      r.p  = qprod(a, b, t);
      r.p2 = qprod(a2, b2, t);
    end
    r.issued = cycle;
    return r;
  endfunction

  // Output side: compare every valid result with the oldest issued operation.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      result_t e;
      n_out++;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL out_valid with nothing issued at cycle %0d", cycle);
      end else begin
        e = sb.pop_front();
        if (p != e.p || p2 != e.p2) begin
          failures++;
          $display("FAIL result at cycle %0d: p=%h exp=%h p2=%h exp=%h", cycle, p, e.p, p2, e.p2);
        end
        if (cycle - e.issued != LATENCY) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - e.issued, LATENCY);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b1; mode = MODE_DOUBLE; tc = 1'b0;
    h = '1; k = '1; h2 = '0; k2 = '0;
    prev_mode = MODE_DOUBLE; prev_valid = 1'b0;
    // Hold reset longer than the pipeline with in_valid high: nothing may
    // come out.
    repeat (LATENCY + 5) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid during reset");
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // Stream.
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      #1;
      if (i < 6) begin
        // Directed start: back-to-back mode changes.
        in_valid = 1'b1;
        mode = (i % 2 == 0) ? MODE_QUAD : MODE_DOUBLE;
        tc = (i % 3 == 1);
        h = (i < 3) ? '1 : 64'h8000_0000_0000_0000;
        k = (i < 3) ? '1 : 64'hFFFF_FFFF_FFFF_FFFF;
        h2 = '1; k2 = 64'h1234_5678_9ABC_DEF0;
      end else begin
        in_valid = ($urandom_range(0, 9) != 0);
        mode = prec_mode_e'($urandom_range(0, 1));
        tc = 1'($urandom);
        h = {$urandom, $urandom}; k = {$urandom, $urandom};
        h2 = {$urandom, $urandom}; k2 = {$urandom, $urandom};
      end
      if (in_valid) begin
        sb.push_back(expected(mode, tc, h, k, h2, k2));
        if (mode == MODE_QUAD) begin
          n_quad++;
          if (tc) n_quad_tc++;
        end else begin
          n_double++;
          if (tc && h[N-1] && k[N-1]) n_tc_two++;
          else if (tc && (h[N-1] || k[N-1])) n_tc_one++;
        end
        if (prev_valid && mode != prev_mode) n_switch++;
        prev_mode = mode;
      end else begin
        n_idle++;
      end
      prev_valid = in_valid;
    end
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d operations never came out", sb.size());
    end
    $display("results=%0d double=%0d tc_one_negative=%0d tc_two_negative=%0d quad=%0d quad_signed=%0d back_to_back_mode_changes=%0d idle_cycles=%0d",
             n_out, n_double, n_tc_one, n_tc_two, n_quad, n_quad_tc, n_switch, n_idle);
    checks++;
    if (n_double == 0 || n_tc_one == 0 || n_tc_two == 0 || n_quad == 0 || n_quad_tc == 0 || n_switch == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
