// pipe_delay: a W-bit shift register of DEPTH stages used to keep side signals
// (valid bits, flags, operands) aligned with a pipelined datapath. DEPTH = 0 is a
// wire. No reset: callers reset their own valid chains where it matters.
// A generic helper of this design; the original library only asks that its
// pipelines stay aligned.
module pipe_delay #(
  parameter int W     = 1,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[DEPTH-1];
  end
endmodule
