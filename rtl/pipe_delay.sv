// Delay line of DEPTH register stages on a W-bit bus; DEPTH = 0 is a plain
// wire (clk then unused). Used to insert pipeline registers and to keep
// signals that bypass a pipelined stage aligned with it. Data registers have
// no reset: what they hold before the first valid operand is never used.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
    assign q = r[DEPTH-1];
  end

endmodule
