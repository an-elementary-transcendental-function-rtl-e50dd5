// fp32_pkg: types, constants and helper functions shared by the single-precision
// math cores.
//
// Numbers are IEEE-754 binary32. All cores treat subnormal inputs as zero and flush
// results below 2^-126 to zero, a common simplification for FPGA cores. Every core
// is a fixed-latency pipeline that accepts one operand set per clock; the latencies
// are collected here so that a parent can align parallel paths.
// The binary32 format and the aim of faithful results follow the library's
// specification; the latencies, the flush of subnormals and the rounding helper
// are this design's own.
package fp32_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } f32_t;

  localparam logic [31:0] F32_QNAN = 32'h7fc0_0000;
  localparam logic [31:0] F32_PINF = 32'h7f80_0000;
  localparam logic [31:0] F32_ONE  = 32'h3f80_0000;

  // Pipeline latencies in clock cycles, input register to result register.
  localparam int LAT_FABS   = 1;
  localparam int LAT_FREXP  = 1;
  localparam int LAT_LDEXP  = 2;
  localparam int LAT_MODF   = 2;
  localparam int LAT_FP_MUL = 3;
  localparam int LAT_FP_ADD = 4;
  localparam int LAT_FP_DIV = 28;   // 1 + 26 quotient stages + 1
  localparam int LAT_SQRT   = 27;   // 1 + 25 root stages + 1
  localparam int LAT_EXP_CORE = 5;  // fixed-point argument to float result
  localparam int LAT_EXPF   = 1 + LAT_EXP_CORE;
  localparam int LAT_LOG_CORE = 51; // float argument to fixed-point logarithm
  localparam int LAT_LOGF   = LAT_LOG_CORE + 1;
  localparam int LAT_TRIG   = 8;
  localparam int LAT_TANF   = LAT_TRIG + LAT_FP_DIV;
  localparam int LAT_POWF   = LAT_LOG_CORE + 2 + LAT_EXP_CORE;
  localparam int LAT_PDF    = LAT_FP_ADD + LAT_FP_MUL + 2 * LAT_FP_DIV + LAT_EXPF;

  function automatic logic is_zero(input logic [31:0] x);  // zero or subnormal
    return x[30:23] == 8'd0;
  endfunction
  function automatic logic is_inf(input logic [31:0] x);
    return x[30:23] == 8'hff && x[22:0] == 23'd0;
  endfunction
  function automatic logic is_nan(input logic [31:0] x);
    return x[30:23] == 8'hff && x[22:0] != 23'd0;
  endfunction

  // Converts sign * mag * 2^(e_msb - 63) to binary32, round to nearest even.
  // Bit 63 of mag has weight 2^e_msb. Out-of-range results become inf or zero.
  function automatic logic [31:0] fix_to_f32(input logic sign, input logic [63:0] mag,
                                             input int e_msb);
    logic [63:0] m;
    int lz, e;
    logic [23:0] r;
    logic g, s;
    lz = 64;
    for (int i = 0; i < 64; i++) if (mag[i]) lz = 63 - i;
    if (lz == 64) return {sign, 31'd0};
    m = mag << lz;
    e = e_msb - lz;
    g = m[39];
    s = |m[38:0];
    r = {1'b0, m[62:40]} + {23'd0, g & (s | m[40])};
    if (r[23]) e = e + 1;                  // rounding carried out of the mantissa
    if (e > 127) return {sign, 8'hff, 23'd0};
    if (e < -126) return {sign, 31'd0};
    return {sign, 8'(e + 127), r[22:0]};
  endfunction

endpackage
