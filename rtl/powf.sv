// powf: binary32 x^y computed as exp(y * ln x) entirely in fixed point.
// log_core gives ln x with 50 fraction bits; y travels alongside in a delay line.
// Stage P1 multiplies ln x exactly by the 24-bit significand of y; stage P2 scales
// the product to the 30-fraction-bit argument of exp_core, saturating |y ln x| >= 128
// to the overflow or underflow flag, and decides the special cases:
//   y = 0 -> 1;  NaN x or y -> NaN;  x < 0 -> NaN;
//   x = 0 -> 0 for y > 0, +inf for y < 0;  x = +inf -> +inf for y > 0, 0 for y < 0;
//   y = +-inf -> +inf or 0 by the sign of y ln x (1 when x = 1).
// The argument of exp is exact to 2^-30, so the relative error of the result grows
// with |y ln x| by about 2^-30 |y ln x| on top of the exp and log errors.
// Latency LAT_POWF = LAT_LOG_CORE + 2 + LAT_EXP_CORE = 58, one pair per clock.
// The original library lists powf without a method; x^y = exp(y ln x), kept in
// fixed point between the two cores, and the special cases are this design's
// choices.
module powf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  input  logic [31:0] yexp,
  output logic        out_valid,
  output logic [31:0] y
);
  logic signed [59:0] l;
  logic               lnan, lzero, linf;
  logic [31:0]        yd, y1;
  logic signed [84:0] p1;
  logic               nan1, zero1, inf1, lz1;
  logic [38:0]        z2;
  logic               nan2, ovf2, unf2;

  log_core u_log (.clk, .x, .l, .nan(lnan), .zero(lzero), .inf(linf));
  pipe_delay #(.W(32), .DEPTH(LAT_LOG_CORE)) u_yd (.clk, .d(yexp), .q(yd));

  always_ff @(posedge clk) begin
    p1    <= 85'(l) * signed'(85'({1'b0, ~is_zero(yd), yd[22:0]}));
    y1    <= yd;
    nan1  <= lnan;
    zero1 <= lzero;
    inf1  <= linf;
    lz1   <= l == '0;
  end

  // z = p1 * 2^(ey - 23 - 50 + 30) = p1 * 2^(ey - 43)
  always_ff @(posedge clk) begin
    logic [84:0]  ap;
    logic [127:0] mag;
    logic         neg, sat;
    int           sh;
    ap  = p1 < 0 ? 85'(-p1) : 85'(p1);
    neg = (p1 < 0) ^ y1[31];          // sign of y * ln x
    sh  = int'(y1[30:23]) - 127 - 43;
    if (sh >= 0) mag = (sh >= 40) ? ((ap != '0) ? '1 : '0) : 128'(ap) << sh;
    else         mag = (-sh >= 100) ? '0 : 128'(ap) >> (-sh);
    sat  = mag >= 128'(2**37);
    z2   <= sat ? '0 : (neg ? 39'(-mag) : 39'(mag));
    nan2 <= 1'b0; ovf2 <= 1'b0; unf2 <= 1'b0;
    if (is_zero(y1)) begin
      z2 <= '0;                                        // x^0 = 1
    end else if (nan1 || is_nan(y1)) begin
      nan2 <= 1'b1;
    end else if (zero1) begin
      if (y1[31]) ovf2 <= 1'b1; else unf2 <= 1'b1;
    end else if (inf1) begin
      if (y1[31]) unf2 <= 1'b1; else ovf2 <= 1'b1;
    end else if (is_inf(y1)) begin
      if (lz1) z2 <= '0;                // the significand of inf reads as 1.0
      else if (!neg) ovf2 <= 1'b1;
      else unf2 <= 1'b1;
    end else if (sat) begin
      if (neg) unf2 <= 1'b1; else ovf2 <= 1'b1;
    end
  end

  logic v_in;
  valid_pipe #(.DEPTH(LAT_LOG_CORE + 2)) u_v (.clk, .rst_n, .d(in_valid), .q(v_in));

  exp_core u_exp (
    .clk, .rst_n, .in_valid(v_in), .z(z2), .nan(nan2), .ovf(ovf2), .unf(unf2),
    .out_valid, .y
  );
endmodule
