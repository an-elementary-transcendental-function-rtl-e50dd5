// tb_fp_pkg: reference helpers for the testbenches. Conversions between binary32
// bit patterns and real (double) values are done here with integer arithmetic on
// the IEEE fields, independently of the design's own conversion function, and the
// error of a result is measured in units in the last place of the exact value.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] b);
    real m;
    if (b[30:23] == 8'd0) return 0.0;
    m = (1.0 + real'(b[22:0]) / 8388608.0) * ($pow(2.0, real'(int'(b[30:23]) - 127)));
    return b[31] ? -m : m;
  endfunction

  // Nearest binary32 (ties to even) of a real; flushes below 2^-126 to zero.
  function automatic logic [31:0] r2f(input real v);
    logic [63:0] d;
    int e;
    logic [23:0] m;
    logic g, s;
    d = $realtobits(v);
    if (d[62:52] == 11'h7ff) return d[51:0] != 0 ? 32'h7fc0_0000 : {d[63], 8'hff, 23'd0};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023;
    g = d[28];
    s = |d[27:0];
    m = {1'b0, d[51:29]} + {23'd0, g & (s | d[29])};
    if (m[23]) e = e + 1;
    if (e > 127) return {d[63], 8'hff, 23'd0};
    if (e < -126) return {d[63], 31'd0};
    return {d[63], 8'(e + 127), m[22:0]};
  endfunction

  // |got - ref| in ulps of ref (ulp of the binade of ref).
  function automatic real ulp_err(input logic [31:0] got, input real ref_v);
    logic [31:0] rb;
    real u;
    rb = r2f(ref_v);
    if (rb[30:23] == 8'd0) u = $pow(2.0, -149.0);
    else u = $pow(2.0, real'(int'(rb[30:23]) - 150));
    return ((f2r(got) - ref_v) < 0.0 ? ref_v - f2r(got) : f2r(got) - ref_v) / u;
  endfunction

  // Random binary32 with the unbiased exponent in [elo, ehi] and a random sign.
  function automatic logic [31:0] rnd_f32(input int elo, input int ehi, input logic allow_neg);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {allow_neg ? 1'($urandom) : 1'b0, 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
