// trig_core: sine and cosine of a binary32 argument, the shared pipeline of sinf,
// cosf and tanf.
// |x| is multiplied by 2/pi (a 72-bit constant) to give a fixed-point number of
// quarter turns: its two integer bits are the quadrant and its 44 fraction bits
// the angle inside the quadrant. The fraction is split as a + b, where a (top
// A_BITS bits) addresses 2^A_BITS-entry tables of sin(a) and cos(a) and b, turned
// back into radians (beta < 2^-7.3), feeds the polynomials
//   sin(beta) = beta - beta^3/6,   cos(beta) = 1 - beta^2/2 + beta^4/24.
// Then sin(a+b) = sin a cos b + cos a sin b and cos(a+b) = cos a cos b - sin a sin b,
// and the quadrant and the sign of x place the results. All fixed-point values
// carry 44 fraction bits. Stages: 1 unpack and multiply by 2/pi, 2 reduce,
// 3 table read and beta, 4 beta^2, 5 beta^3 and beta^4, 6 polynomials,
// 7 angle addition, 8 quadrant, sign and conversion to binary32.
// |x| < 2^-12 returns sin = x, cos = 1 (the error is below 0.2 ulp);
// |x| >= 2^24, inf and NaN give NaN. Latency LAT_TRIG = 8, one argument per clock.
// The addition formula sin(a + b) = sin a cos b + cos a sin b, with a table for a
// and polynomials for b, follows the original core. The 2/pi range reduction, the
// quadrant handling, the 2^24 limit, the small-argument bypass and the table size
// are this design's choices.
module trig_core
  import fp32_pkg::*;
#(
  parameter int A_BITS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] sin_y,
  output logic [31:0] cos_y
);
  localparam int FB = 44;
  localparam int BB = FB - A_BITS;                         // bits of b

  typedef logic [FB:0] tab_t [2**A_BITS];
  function automatic tab_t mk_tab(input bit cosine);
    tab_t r;
    for (int k = 0; k < 2**A_BITS; k++) begin
      real th;
      th   = real'(k) * 3.14159265358979323846 / 2.0 / real'(2**A_BITS);
      r[k] = (FB+1)'(longint'((cosine ? $cos(th) : $sin(th)) * 2.0**FB));
    end
    return r;
  endfunction
  localparam tab_t SIN_A = mk_tab(1'b0);
  localparam tab_t COS_A = mk_tab(1'b1);

  // floor(2/pi * 2^72): the first 72 bits of the binary expansion of 2/pi, written
  // out because a real (double) constant holds only 53 of them.
  localparam logic [71:0] TWO_OVER_PI = 72'hA2_F983_6E4E_4415_29FC;
  localparam logic [45:0] PI_OVER_2   = 46'(longint'(3.14159265358979323846 / 2.0 * 2.0**FB));
  localparam logic [47:0] C6          = 48'(longint'(2.0**FB / 6.0));
  localparam logic [47:0] C24         = 48'(longint'(2.0**FB / 24.0));

  typedef struct packed {
    logic        sign;       // sign of x
    logic        bypass;     // result taken from bp_sin / bp_cos
    logic [31:0] bp_sin;
    logic [31:0] bp_cos;
  } tag_t;

  // stage 1
  logic [95:0] p1;
  logic signed [9:0] e1;
  tag_t t1;
  // stage 2
  logic [1:0]  q2;
  logic [A_BITS-1:0] a2;
  logic [BB-1:0] b2;
  tag_t t2;
  // stage 3..7
  logic [FB:0] sa3, ca3, sa4, ca4, sa5, ca5, sa6, ca6;
  logic [FB:0] be3, be4, b2_4, be5, b2_5, b3_5, b4_5;
  logic [FB+1:0] sb6, cb6;
  logic [1:0]  q3, q4, q5, q6, q7;
  tag_t t3, t4, t5, t6, t7;
  logic signed [FB+2:0] s7, c7;

  always_ff @(posedge clk) begin
    logic signed [9:0] e;
    e  = 10'(signed'({2'b0, x[30:23]}) - 127);
    p1 <= 96'({1'b1, x[22:0]}) * 96'(TWO_OVER_PI);
    e1 <= e;
    t1.sign   <= x[31];
    t1.bypass <= 1'b1;
    t1.bp_sin <= x;
    t1.bp_cos <= F32_ONE;
    if (x[30:23] == 8'hff || e >= 10'sd24) begin
      t1.bp_sin <= F32_QNAN;
      t1.bp_cos <= F32_QNAN;
    end else if (e >= -10'sd12) begin
      t1.bypass <= 1'b0;
    end
  end

  // y = x * 2/pi * 2^44 = p1 * 2^(e - 51); keep 2 integer and 44 fraction bits.
  always_ff @(posedge clk) begin
    logic [95:0] y;               // bits above 45 are whole turns, dropped
    int sh;
    sh = 51 - int'(e1);
    y  = (sh >= 0 && sh < 96) ? p1 >> sh : '0;
    q2 <= y[FB+1:FB];
    a2 <= y[FB-1:BB];
    b2 <= y[BB-1:0];
    t2 <= t1;
  end

  always_ff @(posedge clk) begin
    logic [BB+45:0] pb;
    pb  = (BB+46)'(b2) * (BB+46)'(PI_OVER_2);
    be3 <= (FB+1)'(pb >> FB);
    sa3 <= SIN_A[a2];
    ca3 <= COS_A[a2];
    q3  <= q2;
    t3  <= t2;
  end

  always_ff @(posedge clk) begin
    logic [2*FB+1:0] m;
    m    = (2*FB+2)'(be3) * (2*FB+2)'(be3);
    b2_4 <= (FB+1)'(m >> FB);
    be4  <= be3;
    sa4 <= sa3; ca4 <= ca3; q4 <= q3; t4 <= t3;
  end

  always_ff @(posedge clk) begin
    logic [2*FB+1:0] m3, m4;
    m3   = (2*FB+2)'(b2_4) * (2*FB+2)'(be4);
    m4   = (2*FB+2)'(b2_4) * (2*FB+2)'(b2_4);
    b3_5 <= (FB+1)'(m3 >> FB);
    b4_5 <= (FB+1)'(m4 >> FB);
    b2_5 <= b2_4;
    be5  <= be4;
    sa5 <= sa4; ca5 <= ca4; q5 <= q4; t5 <= t4;
  end

  always_ff @(posedge clk) begin
    logic [FB+48:0] d6, d24;
    d6  = (FB+49)'(b3_5) * (FB+49)'(C6);
    d24 = (FB+49)'(b4_5) * (FB+49)'(C24);
    sb6 <= (FB+2)'(be5) - (FB+2)'(d6 >> FB);
    cb6 <= ((FB+2)'(1) << FB) - (FB+2)'(b2_5 >> 1) + (FB+2)'(d24 >> FB);
    sa6 <= sa5; ca6 <= ca5; q6 <= q5; t6 <= t5;
  end

  always_ff @(posedge clk) begin
    logic [2*FB+3:0] sc, cs, cc, ss;
    sc = (2*FB+4)'(sa6) * (2*FB+4)'(cb6);
    cs = (2*FB+4)'(ca6) * (2*FB+4)'(sb6);
    cc = (2*FB+4)'(ca6) * (2*FB+4)'(cb6);
    ss = (2*FB+4)'(sa6) * (2*FB+4)'(sb6);
    s7 <= signed'((FB+3)'((sc + cs) >> FB));
    c7 <= signed'((FB+3)'(cc >> FB)) - signed'((FB+3)'(ss >> FB));
    q7 <= q6;
    t7 <= t6;
  end

  always_ff @(posedge clk) begin
    logic [FB+2:0] s, c;
    s = s7 < 0 ? '0 : s7;
    c = c7 < 0 ? '0 : c7;
    unique case (q7)
      2'd0: begin sin_y <= fix_to_f32(t7.sign,  {s, (63-FB-2)'(0)}, 2);
                  cos_y <= fix_to_f32(1'b0,     {c, (63-FB-2)'(0)}, 2); end
      2'd1: begin sin_y <= fix_to_f32(t7.sign,  {c, (63-FB-2)'(0)}, 2);
                  cos_y <= fix_to_f32(1'b1,     {s, (63-FB-2)'(0)}, 2); end
      2'd2: begin sin_y <= fix_to_f32(!t7.sign, {s, (63-FB-2)'(0)}, 2);
                  cos_y <= fix_to_f32(1'b1,     {c, (63-FB-2)'(0)}, 2); end
      default: begin sin_y <= fix_to_f32(!t7.sign, {c, (63-FB-2)'(0)}, 2);
                  cos_y <= fix_to_f32(1'b0,     {s, (63-FB-2)'(0)}, 2); end
    endcase
    if (t7.bypass) begin
      sin_y <= t7.bp_sin;
      cos_y <= t7.bp_cos;
    end
  end
  valid_pipe #(.DEPTH(LAT_TRIG)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
