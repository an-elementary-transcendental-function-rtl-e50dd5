// frexpf: splits a binary32 x into frac * 2^e with |frac| in [0.5, 1), like the C
// library frexpf. frac keeps the sign and mantissa of x with its exponent field set
// to 126; e is the unbiased exponent plus one. Zero (and subnormals, which are
// treated as zero) give (signed 0, 0); inf and NaN give (x, 0).
// Latency LAT_FREXP = 1, one operand per clock.
// The function follows C's frexpf as the original library lists it; the handling
// of zero, inf and NaN and the one-clock timing are this design's choices.
module frexpf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] frac,
  output logic [31:0] e
);
  always_ff @(posedge clk) begin
    if (is_zero(x)) begin
      frac <= {x[31], 31'd0};
      e    <= '0;
    end else if (x[30:23] == 8'hff) begin
      frac <= x;
      e    <= '0;
    end else begin
      frac <= {x[31], 8'd126, x[22:0]};
      e    <= 32'(signed'({1'b0, x[30:23]}) - 126);
    end
  end
  valid_pipe #(.DEPTH(LAT_FREXP)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
