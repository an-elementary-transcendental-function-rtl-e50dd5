// fp_div: pipelined binary32 divider, round to nearest even.
// Stage 1 unpacks the operands and decides the special results (NaN for NaN
// operands, 0/0 and inf/inf; signed inf for x/0 and inf/x; signed zero for 0/x
// and x/inf). The 24-bit significands then go through fix_div_pipe, 26 quotient
// bits in 26 stages; the quotient lies in (0.5, 2), so at least 25 significant
// bits and the remainder's sticky bit reach the final stage, which rounds with
// fp32_pkg::fix_to_f32. Latency LAT_FP_DIV = 28, one quotient per clock.
// The original library names floating-point division only as a building block; the
// restoring-divider datapath is this design's own.
module fp_div
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
  localparam int QB = 26;
  typedef struct packed {
    logic              sign;
    logic signed [9:0] e;      // ea - eb, unbiased
    logic              spec;
    logic [31:0]       spv;
  } tag_t;

  logic [24:0] num1;
  logic [23:0] den1;
  tag_t        t1, t2;
  logic [QB-1:0] q2;
  logic        st2;

  always_ff @(posedge clk) begin
    logic s;
    s = a[31] ^ b[31];
    num1   <= {1'b0, 1'b1, a[22:0]};
    den1   <= {1'b1, b[22:0]};
    t1.sign <= s;
    t1.e    <= 10'(signed'({2'b0, a[30:23]}) - signed'({2'b0, b[30:23]}));
    t1.spec <= 1'b1;
    if (is_nan(a) || is_nan(b) || (is_zero(a) && is_zero(b)) || (is_inf(a) && is_inf(b)))
      t1.spv <= F32_QNAN;
    else if (is_inf(a) || is_zero(b)) t1.spv <= {s, 8'hff, 23'd0};
    else if (is_zero(a) || is_inf(b)) t1.spv <= {s, 31'd0};
    else begin
      t1.spec <= 1'b0;
      t1.spv  <= '0;
    end
  end

  fix_div_pipe #(.WD(24), .QB(QB), .TW($bits(tag_t))) u_div (
    .clk, .num(num1), .den(den1), .tag_in(t1), .q(q2), .sticky(st2), .tag_out(t2)
  );

  // q2 MSB weighs 2^0 relative to 2^(ea-eb).
  always_ff @(posedge clk) begin
    if (t2.spec) y <= t2.spv;
    else         y <= fix_to_f32(t2.sign, {q2, st2, 37'd0}, int'(t2.e));
  end
  valid_pipe #(.DEPTH(LAT_FP_DIV)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
