// expf: binary32 natural exponential.
// Stage 1 converts x to a signed fixed-point argument with 30 fraction bits
// (x = M * 2^(e-23), so z = M shifted by e+7), as in x_fix = i + f; |x| >= 128 and
// infinities become the overflow/underflow flags of exp_core, which then forms
// exp(i) * exp(f) from tables and a polynomial. Arguments below 2^-30 in magnitude
// become 0, so exp returns 1.0. Latency LAT_EXPF = 6, one argument per clock.
// The float-to-fixed conversion of the argument follows the original core; the
// widths, the |x| >= 128 shortcut and the special results are this design's
// choices.
module expf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  logic [38:0] z1;
  logic        nan1, ovf1, unf1, v1;

  always_ff @(posedge clk) begin
    int sh;
    logic [38:0] mag;
    sh  = int'(x[30:23]) - 127 + 7;
    mag = '0;
    if (!is_zero(x) && sh >= -24 && sh <= 13) begin
      if (sh >= 0) mag = 39'({1'b1, x[22:0]}) << sh;
      else         mag = 39'({1'b1, x[22:0]}) >> (-sh);
    end
    z1   <= x[31] ? -mag : mag;
    nan1 <= is_nan(x);
    ovf1 <= !is_nan(x) && !x[31] && sh > 13;
    unf1 <= !is_nan(x) &&  x[31] && sh > 13;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  exp_core u_core (
    .clk, .rst_n, .in_valid(v1), .z(z1), .nan(nan1), .ovf(ovf1), .unf(unf1),
    .out_valid, .y
  );
endmodule
