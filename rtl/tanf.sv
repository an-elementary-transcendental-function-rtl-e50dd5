// tanf: binary32 tangent as sin(x) / cos(x): trig_core supplies both, fp_div
// divides them with round to nearest even. Small arguments (|x| < 2^-12) arrive as
// x / 1 and return x; out-of-range arguments give NaN through the divider.
// Latency LAT_TANF = LAT_TRIG + LAT_FP_DIV = 36, one argument per clock.
// The original library lists tanf without a method; tan = sin / cos is this
// design's choice.
module tanf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  logic        v_t;
  logic [31:0] s_t, c_t;

  trig_core u_trig (.clk, .rst_n, .in_valid, .x, .out_valid(v_t), .sin_y(s_t), .cos_y(c_t));
  fp_div    u_div  (.clk, .rst_n, .in_valid(v_t), .a(s_t), .b(c_t), .out_valid, .y);
endmodule
