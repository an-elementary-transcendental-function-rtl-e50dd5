// pdf: normal probability density f(x; mu, sigma) = exp(-(x-mu)^2 / (2 sigma^2))
// / (sigma sqrt(2 pi)) built as one pipeline of library cores, one result per clock:
//   d = x - mu (fp_add)  ->  d*d (fp_mul)  ->  q = d^2 / (2 sigma^2) (fp_div)
//   ->  e = expf(-q)  ->  y = e / (sigma sqrt(2 pi)) (fp_div).
// In parallel, sigma^2 and 2 sigma^2 come from two fp_mul and sigma sqrt(2 pi) from
// a third; delay lines hold them until the main chain needs them.
// Latency LAT_PDF = LAT_FP_ADD + LAT_FP_MUL + 2 LAT_FP_DIV + LAT_EXPF = 69.
// The normal density as one pipeline follows the original benchmark function;
// building it from this library's cores and the alignment delays are this design's
// own.
module pdf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  input  logic [31:0] mu,
  input  logic [31:0] sigma,
  output logic        out_valid,
  output logic [31:0] y
);
  localparam logic [31:0] F32_TWO = 32'h4000_0000;
  localparam logic [31:0] SQRT_2PI = 32'h4020_6c99;   // sqrt(2 pi) = 2.5066283 rounded
  localparam int T_DD = LAT_FP_ADD + LAT_FP_MUL;           // d^2 ready
  localparam int T_Q  = T_DD + LAT_FP_DIV;                 // q ready
  localparam int T_E  = T_Q + LAT_EXPF;                    // exp ready

  logic [31:0] d, dd, s2, t2, t2d, q, e, k, kd;
  logic        unused_v;
  logic [5:0]  vv;

  fp_add u_sub  (.clk, .rst_n, .in_valid, .a(x), .b(mu), .sub(1'b1), .out_valid(vv[0]), .y(d));
  fp_mul u_sq   (.clk, .rst_n, .in_valid(vv[0]), .a(d), .b(d), .out_valid(vv[1]), .y(dd));
  fp_mul u_s2   (.clk, .rst_n, .in_valid, .a(sigma), .b(sigma), .out_valid(vv[2]), .y(s2));
  fp_mul u_2s2  (.clk, .rst_n, .in_valid(vv[2]), .a(s2), .b(F32_TWO), .out_valid(vv[3]), .y(t2));
  pipe_delay #(.W(32), .DEPTH(T_DD - 2 * LAT_FP_MUL)) u_t2d (.clk, .d(t2), .q(t2d));
  fp_div u_q    (.clk, .rst_n, .in_valid(vv[1]), .a(dd), .b(t2d), .out_valid(vv[4]), .y(q));
  expf   u_exp  (.clk, .rst_n, .in_valid(vv[4]), .x({~q[31], q[30:0]}), .out_valid(vv[5]), .y(e));
  fp_mul u_k    (.clk, .rst_n, .in_valid, .a(sigma), .b(SQRT_2PI), .out_valid(unused_v), .y(k));
  pipe_delay #(.W(32), .DEPTH(T_E - LAT_FP_MUL)) u_kd (.clk, .d(k), .q(kd));
  fp_div u_out  (.clk, .rst_n, .in_valid(vv[5]), .a(e), .b(kd), .out_valid, .y);

  initial assert (T_DD >= 2 * LAT_FP_MUL) else $error("pdf: 2 sigma^2 path longer than x - mu path");
endmodule
