// fp_add: pipelined binary32 adder/subtractor (y = a + b, or a - b when sub = 1),
// round to nearest even.
// Stage 1 unpacks and orders the operands so that |A| >= |B|; stage 2 aligns B
// to A inside a 64-bit field (39 bits below the significand, anything shifted out
// further is kept as a sticky bit); stage 3 adds or subtracts the magnitudes;
// stage 4 normalises and rounds with fp32_pkg::fix_to_f32 and substitutes the
// special results. An exact zero difference is +0; -0 + -0 is -0.
// Latency LAT_FP_ADD = 4, one sum per clock.
// The original library builds its cores in fixed point and names floating-point
// adders only as building blocks; this standard align-add-round adder is this
// design's own.
module fp_add
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic        out_valid,
  output logic [31:0] y
);
  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF} spec_e;

  // stage 1
  logic [23:0] ma1, mb1;
  logic [7:0]  ea1, d1;
  logic        sa1, sb1;
  spec_e       sp1;
  logic [31:0] spv1;
  // stage 2
  logic [63:0] A2, B2;
  logic [7:0]  ea2;
  logic        sa2, eff_sub2, bothneg2;
  spec_e       sp2;
  logic [31:0] spv2;
  // stage 3
  logic [63:0] S3;
  logic [7:0]  ea3;
  logic        sr3, bothneg3;
  spec_e       sp3;
  logic [31:0] spv3;

  always_ff @(posedge clk) begin
    logic [31:0] bb;
    logic        swap;
    bb   = {b[31] ^ sub, b[30:0]};
    swap = bb[30:0] > a[30:0];
    ma1 <= swap ? (is_zero(bb) ? 24'd0 : {1'b1, bb[22:0]}) : (is_zero(a) ? 24'd0 : {1'b1, a[22:0]});
    mb1 <= swap ? (is_zero(a) ? 24'd0 : {1'b1, a[22:0]}) : (is_zero(bb) ? 24'd0 : {1'b1, bb[22:0]});
    ea1 <= swap ? bb[30:23] : a[30:23];
    d1  <= swap ? bb[30:23] - a[30:23] : a[30:23] - bb[30:23];
    sa1 <= swap ? bb[31] : a[31];
    sb1 <= swap ? a[31] : bb[31];
    if (is_nan(a) || is_nan(bb) || (is_inf(a) && is_inf(bb) && a[31] != bb[31])) begin
      sp1 <= SP_NAN; spv1 <= F32_QNAN;
    end else if (is_inf(a)) begin
      sp1 <= SP_INF; spv1 <= a;
    end else if (is_inf(bb)) begin
      sp1 <= SP_INF; spv1 <= bb;
    end else begin
      sp1 <= SP_NONE; spv1 <= '0;
    end
  end

  always_ff @(posedge clk) begin
    logic [63:0] bw;
    bw  = {1'b0, mb1, 39'd0};
    A2  <= {1'b0, ma1, 39'd0};
    if (d1 >= 8'd63) B2 <= {63'd0, |mb1};
    else             B2 <= (bw >> d1) | {63'd0, |(bw & ((64'd1 << d1) - 64'd1))};
    ea2      <= ea1;
    sa2      <= sa1;
    eff_sub2 <= sa1 ^ sb1;
    bothneg2 <= sa1 & sb1;
    sp2 <= sp1; spv2 <= spv1;
  end

  always_ff @(posedge clk) begin
    S3  <= eff_sub2 ? A2 - B2 : A2 + B2;
    ea3 <= ea2; sr3 <= sa2; bothneg3 <= bothneg2;
    sp3 <= sp2; spv3 <= spv2;
  end

  // Bit 62 of A weighs 2^(ea-127), so bit 63 weighs 2^(ea-126).
  always_ff @(posedge clk) begin
    if (sp3 != SP_NONE)  y <= spv3;
    else if (S3 == '0)   y <= {bothneg3, 31'd0};
    else                 y <= fix_to_f32(sr3, S3, int'(ea3) - 126);
  end
  valid_pipe #(.DEPTH(LAT_FP_ADD)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
