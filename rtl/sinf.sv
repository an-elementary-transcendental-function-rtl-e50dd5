// sinf: binary32 sine, the sin output of trig_core (table lookup of sin a
// and cos a, polynomials in b, angle-addition formula; see trig_core). The other
// output of the shared pipeline is left unconnected. Latency LAT_TRIG = 8, one
// argument per clock.
// The method follows the original core; the wrapper is this design's own.
module sinf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  trig_core u_trig (.clk, .rst_n, .in_valid, .x, .out_valid, .sin_y(y), .cos_y());
endmodule
