// cosf: binary32 cosine, the cos output of trig_core (table lookup of sin a
// and cos a, polynomials in b, angle-addition formula; see trig_core). The other
// output of the shared pipeline is left unconnected. Latency LAT_TRIG = 8, one
// argument per clock.
// The original library lists cosf beside sinf; sharing the sine core through the
// addition formula for cos(a + b) is this design's choice.
module cosf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  trig_core u_trig (.clk, .rst_n, .in_valid, .x, .out_valid, .cos_y(y), .sin_y());
endmodule
