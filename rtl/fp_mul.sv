// fp_mul: pipelined binary32 multiplier, round to nearest even.
// Stage 1 unpacks the operands, multiplies the 24-bit significands (one 48-bit
// product) and adds the exponents; stage 2 normalises and rounds with
// fp32_pkg::fix_to_f32; stage 3 substitutes the special results (NaN for NaN
// operands or inf*0, signed inf, signed zero). Subnormals count as zero and
// underflowing results flush to zero. Latency LAT_FP_MUL = 3, one product per clock.
// The original library names floating-point multipliers only as building blocks;
// this standard datapath is this design's own.
module fp_mul
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF, SP_ZERO} spec_e;

  logic [47:0] p_q;
  int          e_q;
  logic        s_q;
  spec_e       sp_q, sp_q2;
  logic        s_q2;
  logic [31:0] r_q2;

  always_ff @(posedge clk) begin
    s_q <= a[31] ^ b[31];
    p_q <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e_q <= int'(a[30:23]) + int'(b[30:23]) - 254;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      sp_q <= SP_NAN;
    else if (is_inf(a) || is_inf(b)) sp_q <= SP_INF;
    else if (is_zero(a) || is_zero(b)) sp_q <= SP_ZERO;
    else sp_q <= SP_NONE;
  end

  // Bit 47 of the product weighs 2^(ea+eb+1).
  always_ff @(posedge clk) begin
    r_q2  <= fix_to_f32(s_q, {p_q, 16'd0}, e_q + 1);
    sp_q2 <= sp_q;
    s_q2  <= s_q;
  end

  always_ff @(posedge clk) begin
    unique case (sp_q2)
      SP_NAN:  y <= F32_QNAN;
      SP_INF:  y <= {s_q2, 8'hff, 23'd0};
      SP_ZERO: y <= {s_q2, 31'd0};
      default: y <= r_q2;
    endcase
  end
  valid_pipe #(.DEPTH(LAT_FP_MUL)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
