// logf: binary32 natural logarithm. log_core produces ln(x) in signed fixed point
// with 50 fraction bits (ROM1(ept) + ROM2(k) + p(r)); one more stage converts it
// to binary32 with round to nearest even and applies the special results:
// NaN or negative x -> NaN, zero -> -inf, +inf -> +inf.
// Latency LAT_LOGF = 52, one argument per clock.
// The split into ept*ln2 + ln(frac) follows the original core; the special results
// and the final rounding are this design's own.
module logf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  logic signed [59:0] l;
  logic               nan, zero, inf;

  log_core u_core (.clk, .x, .l, .nan, .zero, .inf);

  // Bit 63 of the 64-bit magnitude weighs 2^13.
  always_ff @(posedge clk) begin
    logic [59:0] mag;
    mag = l < 0 ? 60'(-l) : 60'(l);
    if (nan)       y <= F32_QNAN;
    else if (zero) y <= {1'b1, 8'hff, 23'd0};
    else if (inf)  y <= F32_PINF;
    else           y <= fix_to_f32(l < 0, {4'd0, mag}, 13);
  end
  valid_pipe #(.DEPTH(LAT_LOGF)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
