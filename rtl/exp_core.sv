// exp_core: exponential of a fixed-point argument, the shared back end of expf and
// powf.
// The argument z is a signed fixed-point number with FRAC_BITS = 30 fraction bits
// and 9 integer bits. It is split as z = i + f with integer i and 0 <= f < 1, and
// exp(z) = exp(i) * exp(f_hi) * exp(f_lo), where f_hi is the top FHI_BITS bits of
// f and f_lo < 2^-FHI_BITS the rest:
//   exp(i)    table EI, 256 entries, mantissa (1.31) and binary exponent
//   exp(f_hi) table EF, 2^FHI_BITS entries in 2.30 fixed point
//   exp(f_lo) degree-2 polynomial 1 + f_lo + f_lo^2/2 (error below 2^-29)
// Tables are computed at elaboration from real arithmetic. Stage 1 registers the
// split, stage 2 reads the tables and evaluates the polynomial, stages 3 and 4 form
// the two products, stage 5 normalises and rounds and applies the flags:
// nan -> NaN, ovf -> +inf, unf -> +0 (results below 2^-126 also flush to +0).
// Latency LAT_EXP_CORE = 5, one argument per clock.
// The split exp(x) = exp(i) * exp(f), with a table for one factor and a polynomial
// for the other, follows the original core; the second split of f into f_hi and
// f_lo, the table sizes and all widths are this design's choices.
module exp_core
  import fp32_pkg::*;
#(
  parameter int FHI_BITS = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [38:0] z,        // signed, 30 fraction bits
  input  logic        nan,
  input  logic        ovf,
  input  logic        unf,
  output logic        out_valid,
  output logic [31:0] y
);
  localparam int FB = 30;
  localparam int FLO = FB - FHI_BITS;

  typedef logic [31:0] ef_t [2**FHI_BITS];
  typedef logic [41:0] ei_t [256];          // {exponent (signed 10), mantissa 1.31}

  function automatic ef_t mk_ef();
    ef_t r;
    for (int k = 0; k < 2**FHI_BITS; k++)
      r[k] = 32'(longint'($exp(real'(k) / real'(2**FHI_BITS)) * 2.0**30));
    return r;
  endfunction

  function automatic ei_t mk_ei();
    ei_t r;
    for (int k = 0; k < 256; k++) begin
      int   i, e;
      real  v, l2;
      i  = (k < 128) ? k : k - 256;
      l2 = real'(i) / $ln(2.0);           // log2(exp(i))
      e  = int'($floor(l2));
      v  = $exp(real'(i) - real'(e) * $ln(2.0));   // in [1, 2)
      if (v >= 2.0) begin v = v / 2.0; e = e + 1; end
      if (v < 1.0)  begin v = v * 2.0; e = e - 1; end
      r[k] = {10'(e), 32'(longint'(v * 2.0**31))};
    end
    return r;
  endfunction

  localparam ef_t EF = mk_ef();
  localparam ei_t EI = mk_ei();

  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF, SP_ZERO} spec_e;

  // stage 1
  logic signed [8:0]   i1;
  logic [FHI_BITS-1:0] fh1;
  logic [FLO-1:0]      fl1;
  spec_e               sp1;
  // stage 2
  logic [31:0] mi2, ef2;
  logic [32:0] p2;
  logic signed [9:0] e2;
  spec_e       sp2;
  // stage 3
  logic [33:0] m3;
  logic [32:0] p3;
  logic signed [9:0] e3;
  spec_e       sp3;
  // stage 4
  logic [66:0] m4;
  logic signed [9:0] e4;
  spec_e       sp4;

  always_ff @(posedge clk) begin
    logic signed [8:0] i;
    i   = signed'(z[38:30]);
    i1  <= i;
    fh1 <= z[29:FLO];
    fl1 <= z[FLO-1:0];
    if (nan)                  sp1 <= SP_NAN;
    else if (ovf || i > 9'sd88) sp1 <= SP_INF;
    else if (unf || i < -9'sd104) sp1 <= SP_ZERO;
    else                      sp1 <= SP_NONE;
  end

  always_ff @(posedge clk) begin
    logic [41:0] ei;
    logic [2*FLO-1:0] sq;
    ei  = EI[i1[7:0]];
    mi2 <= ei[31:0];
    e2  <= signed'(ei[41:32]);
    ef2 <= EF[fh1];
    sq   = fl1 * fl1;                                       // weight 2^-60
    p2  <= 33'h1_0000_0000 + (33'(fl1) << (32 - FB)) + 33'(sq >> (2 * FB - 32 + 1));
    sp2 <= sp1;
  end

  always_ff @(posedge clk) begin
    logic [63:0] m;
    m   = mi2 * ef2;                                        // 3.61
    m3  <= m[63:30];                                        // 3.31
    p3  <= p2 >> 1;                                         // 1.32 -> 1.31 with 33 bits
    e3  <= e2;
    sp3 <= sp2;
  end

  always_ff @(posedge clk) begin
    m4  <= m3 * p3;                                         // 4.62
    e4  <= e3;
    sp4 <= sp3;
  end

  // Bit 66 of m4 weighs 2^(e+4).
  always_ff @(posedge clk) begin
    unique case (sp4)
      SP_NAN:  y <= F32_QNAN;
      SP_INF:  y <= F32_PINF;
      SP_ZERO: y <= '0;
      default: y <= fix_to_f32(1'b0, m4[66:3], int'(e4) + 4);
    endcase
  end
  valid_pipe #(.DEPTH(LAT_EXP_CORE)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
