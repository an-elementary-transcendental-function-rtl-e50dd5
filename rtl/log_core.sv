// log_core: natural logarithm of a binary32 number as a signed fixed-point value
// with 50 fraction bits, the shared front end of logf and powf.
// With x = frac * 2^ept, frac in [1,2), frac is first moved into [0.75, 1.5)
// (halved, ept + 1, when frac >= 1.5). The nearest breakpoint c_k = 1 + k/N,
// N = 64, gives
//   ln(x) = ROM1(ept) + ROM2(k) + p(r),  ROM1(ept) = ept*ln2,  ROM2(k) = ln(c_k),
//   r = 2 (frac - c_k) / (frac + c_k),    p(r) = r + r^3/12,
// p(r) being ln((1 + r/2) / (1 - r/2)) to third degree; |r| < 2^-6.5, so the
// dropped r^5/80 term is below 2^-39. Both ROMs are filled at elaboration.
// Stage 1 unpacks and picks k, stage 2 forms numerator and denominator, a 45-stage
// restoring divider gives |r| to 2^-50, then r^2, r^3, r^3/12 and the final sum
// take one stage each. Flags: nan (NaN or negative x), zero (zero or subnormal x),
// inf (+inf). Latency LAT_LOG_CORE = 51, one argument per clock.
// ROM1(ept) = ept*ln2, ROM2(k) = ln c_k, r = 2(frac - c_k)/(frac + c_k) and a
// degree-3 odd p(r) follow the original algorithm, which is described in detail
// for double precision. The centring of frac into [0.75, 1.5), the signed r, N =
// 64 and all widths are this design's choices.
module log_core
  import fp32_pkg::*;
#(
  parameter int N = 64
) (
  input  logic               clk,
  input  logic [31:0]        x,
  output logic signed [59:0] l,       // ln(x) * 2^50
  output logic               nan,
  output logic               zero,
  output logic               inf
);
  localparam int LOGN = $clog2(N);
  localparam int QB   = 45;           // quotient bits of r (|r| < 2^-6)
  localparam int KW   = LOGN + 2;     // signed width of k (k in [-N/4, N/2])

  typedef logic signed [59:0] rom1_t [256];
  typedef logic signed [59:0] rom2_t [2**KW];

  function automatic rom1_t mk_rom1();
    rom1_t r;
    for (int i = 0; i < 256; i++)
      r[i] = 60'(longint'(real'(i < 129 ? i : i - 256) * $ln(2.0) * 2.0**50));
    return r;
  endfunction
  function automatic rom2_t mk_rom2();
    rom2_t r;
    for (int i = 0; i < 2**KW; i++) begin
      int k;
      k = (i < 2**(KW-1)) ? i : i - 2**KW;
      r[i] = (k > -N) ? 60'(longint'($ln(1.0 + real'(k) / real'(N)) * 2.0**50)) : '0;
    end
    return r;
  endfunction
  localparam rom1_t ROM1 = mk_rom1();
  localparam rom2_t ROM2 = mk_rom2();

  typedef struct packed {
    logic              rneg;          // sign of r
    logic [KW-1:0]     k;
    logic [7:0]        ept;           // two's complement, -126..128 (128 reads as -128)
    logic              nan, zero, inf;
  } tag_t;

  // stage 1
  logic [25:0] f1;                    // frac * 2^24, in [0.75, 1.5) * 2^24
  logic signed [KW-1:0] k1;
  tag_t t1;
  // stage 2
  logic [32:0] num2;                  // |2 (frac - c_k)| * 2^24 * 2^6
  logic [31:0] den2;                  // (frac + c_k) * 2^24 * 2^5, so num/den = |r| * 2^5 ... see below
  tag_t t2;
  // divider output
  logic [QB-1:0] q3;
  logic          st3;                 // remainder flag, not needed at this precision
  tag_t          t3;
  // polynomial stages
  logic [QB-1:0] r4, r5, r6;
  logic [QB-1:0] rr4, rrr5, t6;
  tag_t          t4, t5, t6g;

  always_ff @(posedge clk) begin
    logic signed [9:0]  e;
    logic [25:0]        f;
    logic signed [26:0] d;
    e = 10'(signed'({2'b0, x[30:23]}) - 127);
    if (x[22]) begin                  // frac >= 1.5: use frac/2
      f = {2'b0, 1'b1, x[22:0]};
      e = e + 10'sd1;
    end else begin
      f = {1'b0, 1'b1, x[22:0], 1'b0};
    end
    d   = signed'({1'b0, f}) - 27'sd16777216;                  // (frac - 1) * 2^24
    k1  <= KW'((d + 27'(2**(23 - LOGN))) >>> (24 - LOGN));
    f1  <= f;
    t1.ept  <= e[7:0];
    t1.rneg <= 1'b0;
    t1.k    <= '0;
    t1.nan  <= is_nan(x) || (x[31] && !is_zero(x));
    t1.zero <= is_zero(x);
    t1.inf  <= is_inf(x) && !x[31];
  end

  always_ff @(posedge clk) begin
    logic [25:0]        c;
    logic signed [27:0] df;
    logic [27:0]        adf;
    c  = 26'(27'sd16777216 + (27'(signed'(k1)) <<< (24 - LOGN)));
    df = signed'({2'b0, f1}) - signed'({2'b0, c});
    // num = 2|f - c| * 2^6 (pre-scaled so the quotient's MSB weighs 2^-6)
    adf  = df < 0 ? 28'(-df) : 28'(df);
    num2 <= 33'(adf) << 7;
    den2 <= 32'(f1) + 32'(c);
    t2      <= t1;
    t2.k    <= k1;
    t2.rneg <= df < 0;
  end

  // q = floor(num/den * 2^(QB-1)); |r| = num/den * 2^-6, so q weighs 2^-(QB-1+6) = 2^-50.
  fix_div_pipe #(.WD(32), .QB(QB), .TW($bits(tag_t))) u_div (
    .clk, .num(num2), .den(den2), .tag_in(t2), .q(q3), .sticky(st3), .tag_out(t3)
  );

  always_ff @(posedge clk) begin
    logic [2*QB-1:0] sq;
    sq  = q3 * q3;                    // weight 2^-100
    rr4 <= QB'(sq >> 50);
    r4  <= q3;
    t4  <= t3;
  end

  always_ff @(posedge clk) begin
    logic [2*QB-1:0] cu;
    cu   = rr4 * r4;
    rrr5 <= QB'(cu >> 50);
    r5   <= r4;
    t5   <= t4;
  end

  localparam logic [47:0] C12 = 48'(longint'(2.0**50 / 12.0));
  always_ff @(posedge clk) begin
    logic [QB+47:0] pr;
    pr  = rrr5 * C12;
    t6  <= QB'(pr >> 50);
    r6  <= r5;
    t6g <= t5;
  end

  always_ff @(posedge clk) begin
    logic signed [59:0] p;
    p    = signed'(60'(r6) + 60'(t6));
    l    <= ROM1[t6g.ept] + ROM2[t6g.k] + (t6g.rneg ? -p : p);
    nan  <= t6g.nan;
    zero <= t6g.zero;
    inf  <= t6g.inf;
  end
endmodule
