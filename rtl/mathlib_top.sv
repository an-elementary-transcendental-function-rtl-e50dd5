// mathlib_top: the complete single-precision elementary function library, every
// core side by side so that all of them can run at once, each accepting one
// operand set per clock (the "all functions" configuration):
//   fabsf frexpf ldexpf modff sqrtf expf logf sinf cosf tanf powf   library functions
//   fp_add fp_mul fp_div                                            arithmetic units
//   pdf                                                             normal density built from them
//   rand_ms_i rand6                                                  the two rand() generators
// Each core keeps its own ports, prefixed with its name; see the cores for their
// behaviour and latencies (fp32_pkg::LAT_*). Every port is a plain signal.
// The set of functions follows the original library; placing them side by side
// with their own ports is this design's choice.
module mathlib_top
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // fabsf
  input  logic        fabsf_in_valid,
  input  logic [31:0] fabsf_x,
  output logic        fabsf_out_valid,
  output logic [31:0] fabsf_y,
  // frexpf
  input  logic        frexpf_in_valid,
  input  logic [31:0] frexpf_x,
  output logic        frexpf_out_valid,
  output logic [31:0] frexpf_frac,
  output logic [31:0] frexpf_e,
  // ldexpf
  input  logic        ldexpf_in_valid,
  input  logic [31:0] ldexpf_frac,
  input  logic [31:0] ldexpf_e,
  output logic        ldexpf_out_valid,
  output logic [31:0] ldexpf_y,
  // modff
  input  logic        modff_in_valid,
  input  logic [31:0] modff_x,
  output logic        modff_out_valid,
  output logic [31:0] modff_ipart,
  output logic [31:0] modff_fpart,
  // sqrtf
  input  logic        sqrtf_in_valid,
  input  logic [31:0] sqrtf_x,
  output logic        sqrtf_out_valid,
  output logic [31:0] sqrtf_y,
  // expf
  input  logic        expf_in_valid,
  input  logic [31:0] expf_x,
  output logic        expf_out_valid,
  output logic [31:0] expf_y,
  // logf
  input  logic        logf_in_valid,
  input  logic [31:0] logf_x,
  output logic        logf_out_valid,
  output logic [31:0] logf_y,
  // sinf
  input  logic        sinf_in_valid,
  input  logic [31:0] sinf_x,
  output logic        sinf_out_valid,
  output logic [31:0] sinf_y,
  // cosf
  input  logic        cosf_in_valid,
  input  logic [31:0] cosf_x,
  output logic        cosf_out_valid,
  output logic [31:0] cosf_y,
  // tanf
  input  logic        tanf_in_valid,
  input  logic [31:0] tanf_x,
  output logic        tanf_out_valid,
  output logic [31:0] tanf_y,
  // powf
  input  logic        powf_in_valid,
  input  logic [31:0] powf_x,
  input  logic [31:0] powf_yexp,
  output logic        powf_out_valid,
  output logic [31:0] powf_y,
  // fp_add
  input  logic        fp_add_in_valid,
  input  logic [31:0] fp_add_a,
  input  logic [31:0] fp_add_b,
  input  logic        fp_add_sub,
  output logic        fp_add_out_valid,
  output logic [31:0] fp_add_y,
  // fp_mul
  input  logic        fp_mul_in_valid,
  input  logic [31:0] fp_mul_a,
  input  logic [31:0] fp_mul_b,
  output logic        fp_mul_out_valid,
  output logic [31:0] fp_mul_y,
  // fp_div
  input  logic        fp_div_in_valid,
  input  logic [31:0] fp_div_a,
  input  logic [31:0] fp_div_b,
  output logic        fp_div_out_valid,
  output logic [31:0] fp_div_y,
  // pdf
  input  logic        pdf_in_valid,
  input  logic [31:0] pdf_x,
  input  logic [31:0] pdf_mu,
  input  logic [31:0] pdf_sigma,
  output logic        pdf_out_valid,
  output logic [31:0] pdf_y,
  // rand_ms_i
  input  logic        rand_ms_i_seed_load,
  input  logic [31:0] rand_ms_i_seed,
  input  logic        rand_ms_i_next,
  output logic        rand_ms_i_out_valid,
  output logic [14:0] rand_ms_i_rnd,
  // rand6
  input  logic        rand6_seed_load,
  input  logic [31:0] rand6_seed,
  output logic        rand6_out_valid,
  output logic [14:0] rand6_rnd,
  output logic [2:0]  rand6_thread
);
  fabsf u_fabsf (.clk, .rst_n, .in_valid(fabsf_in_valid), .x(fabsf_x), .out_valid(fabsf_out_valid), .y(fabsf_y));
  frexpf u_frexpf (.clk, .rst_n, .in_valid(frexpf_in_valid), .x(frexpf_x), .out_valid(frexpf_out_valid), .frac(frexpf_frac), .e(frexpf_e));
  ldexpf u_ldexpf (.clk, .rst_n, .in_valid(ldexpf_in_valid), .frac(ldexpf_frac), .e(ldexpf_e), .out_valid(ldexpf_out_valid), .y(ldexpf_y));
  modff u_modff (.clk, .rst_n, .in_valid(modff_in_valid), .x(modff_x), .out_valid(modff_out_valid), .ipart(modff_ipart), .fpart(modff_fpart));
  sqrtf u_sqrtf (.clk, .rst_n, .in_valid(sqrtf_in_valid), .x(sqrtf_x), .out_valid(sqrtf_out_valid), .y(sqrtf_y));
  expf u_expf (.clk, .rst_n, .in_valid(expf_in_valid), .x(expf_x), .out_valid(expf_out_valid), .y(expf_y));
  logf u_logf (.clk, .rst_n, .in_valid(logf_in_valid), .x(logf_x), .out_valid(logf_out_valid), .y(logf_y));
  sinf u_sinf (.clk, .rst_n, .in_valid(sinf_in_valid), .x(sinf_x), .out_valid(sinf_out_valid), .y(sinf_y));
  cosf u_cosf (.clk, .rst_n, .in_valid(cosf_in_valid), .x(cosf_x), .out_valid(cosf_out_valid), .y(cosf_y));
  tanf u_tanf (.clk, .rst_n, .in_valid(tanf_in_valid), .x(tanf_x), .out_valid(tanf_out_valid), .y(tanf_y));
  powf u_powf (.clk, .rst_n, .in_valid(powf_in_valid), .x(powf_x), .yexp(powf_yexp), .out_valid(powf_out_valid), .y(powf_y));
  fp_add u_fp_add (.clk, .rst_n, .in_valid(fp_add_in_valid), .a(fp_add_a), .b(fp_add_b), .sub(fp_add_sub), .out_valid(fp_add_out_valid), .y(fp_add_y));
  fp_mul u_fp_mul (.clk, .rst_n, .in_valid(fp_mul_in_valid), .a(fp_mul_a), .b(fp_mul_b), .out_valid(fp_mul_out_valid), .y(fp_mul_y));
  fp_div u_fp_div (.clk, .rst_n, .in_valid(fp_div_in_valid), .a(fp_div_a), .b(fp_div_b), .out_valid(fp_div_out_valid), .y(fp_div_y));
  pdf u_pdf (.clk, .rst_n, .in_valid(pdf_in_valid), .x(pdf_x), .mu(pdf_mu), .sigma(pdf_sigma), .out_valid(pdf_out_valid), .y(pdf_y));
  rand_ms_i u_rand_ms_i (.clk, .rst_n, .seed_load(rand_ms_i_seed_load), .seed(rand_ms_i_seed), .next(rand_ms_i_next),
                        .out_valid(rand_ms_i_out_valid), .rnd(rand_ms_i_rnd));
  rand6 u_rand6 (.clk, .rst_n, .seed_load(rand6_seed_load), .seed(rand6_seed), .out_valid(rand6_out_valid),
                .rnd(rand6_rnd), .thread(rand6_thread));
endmodule
