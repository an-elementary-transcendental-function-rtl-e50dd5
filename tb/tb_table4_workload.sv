// tb_table4_workload: the throughput measurement of the library: 2^10 operand
// sets are given to every core on 2^10 consecutive clocks (expf, logf, sqrtf and
// the normal density among them, and all functions at once). Every result is
// checked against a real-number reference, and the last result of each core must
// leave exactly 2^10 - 1 + latency clocks after the first operand, i.e. one result
// per clock; at 100 MHz that is 0.01 us per result once the pipeline is full.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_table4_workload;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NCYC = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cyc = 0, t0 = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- fabsf
  logic fabsf_in_valid = 1'b0, fabsf_out_valid;
  logic [31:0] fabsf_x = '0;
  logic [31:0] fabsf_y;
  typedef struct { logic [31:0] x; int t; } fabsf_item_t;
  fabsf_item_t fabsf_q[$];
  int fabsf_last = 0;
  function automatic bit ok_fabsf(input logic [31:0] i_x, input logic [31:0] o_y);
    return o_y == {1'b0, i_x[30:0]} && f2r(o_y) == (f2r(i_x) < 0.0 ? -f2r(i_x) : f2r(i_x));
  endfunction
  always @(negedge clk) if (rst_n && fabsf_out_valid) begin
    if (fabsf_q.size() == 0) begin failures++; $display("FAIL fabsf: unexpected result"); end
    else begin
      fabsf_item_t it;
      it = fabsf_q.pop_front();
      fabsf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_FABS || !ok_fabsf(it.x, fabsf_y)) begin
        failures++;
        $display("FAIL fabsf: x=%h -> y=%h lat=%0d", it.x, fabsf_y, cyc - it.t);
      end
    end
  end
  // ---- frexpf
  logic frexpf_in_valid = 1'b0, frexpf_out_valid;
  logic [31:0] frexpf_x = '0;
  logic [31:0] frexpf_frac;
  logic [31:0] frexpf_e;
  typedef struct { logic [31:0] x; int t; } frexpf_item_t;
  frexpf_item_t frexpf_q[$];
  int frexpf_last = 0;
  function automatic bit ok_frexpf(input logic [31:0] i_x, input logic [31:0] o_frac, input logic [31:0] o_e);
    if (i_x[30:23] == 8'd0) return o_frac == {i_x[31], 31'd0} && o_e == 0;
    if (i_x[30:23] == 8'hff) return o_frac == i_x && o_e == 0;
    return f2r(o_frac) * $pow(2.0, real'($signed(o_e))) == f2r(i_x) && o_frac[31] == i_x[31]
           && (f2r(o_frac) >= 0.5 || f2r(o_frac) <= -0.5) && f2r(o_frac) < 1.0 && f2r(o_frac) > -1.0;
  endfunction
  always @(negedge clk) if (rst_n && frexpf_out_valid) begin
    if (frexpf_q.size() == 0) begin failures++; $display("FAIL frexpf: unexpected result"); end
    else begin
      frexpf_item_t it;
      it = frexpf_q.pop_front();
      frexpf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_FREXP || !ok_frexpf(it.x, frexpf_frac, frexpf_e)) begin
        failures++;
        $display("FAIL frexpf: x=%h -> frac=%h e=%h lat=%0d", it.x, frexpf_frac, frexpf_e, cyc - it.t);
      end
    end
  end
  // ---- ldexpf
  logic ldexpf_in_valid = 1'b0, ldexpf_out_valid;
  logic [31:0] ldexpf_frac = '0;
  logic [31:0] ldexpf_e = '0;
  logic [31:0] ldexpf_y;
  typedef struct { logic [31:0] frac; logic [31:0] e; int t; } ldexpf_item_t;
  ldexpf_item_t ldexpf_q[$];
  int ldexpf_last = 0;
  function automatic bit ok_ldexpf(input logic [31:0] i_frac, input logic [31:0] i_e, input logic [31:0] o_y);
    real r;
    if (i_frac[30:23] == 8'hff) return o_y == i_frac;
    if (i_frac[30:23] == 8'd0) return o_y == {i_frac[31], 31'd0};
    r = f2r(i_frac) * $pow(2.0, real'($signed(i_e)));
    return o_y == r2f(r);
  endfunction
  always @(negedge clk) if (rst_n && ldexpf_out_valid) begin
    if (ldexpf_q.size() == 0) begin failures++; $display("FAIL ldexpf: unexpected result"); end
    else begin
      ldexpf_item_t it;
      it = ldexpf_q.pop_front();
      ldexpf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_LDEXP || !ok_ldexpf(it.frac, it.e, ldexpf_y)) begin
        failures++;
        $display("FAIL ldexpf: frac=%h e=%h -> y=%h lat=%0d", it.frac, it.e, ldexpf_y, cyc - it.t);
      end
    end
  end
  // ---- modff
  logic modff_in_valid = 1'b0, modff_out_valid;
  logic [31:0] modff_x = '0;
  logic [31:0] modff_ipart;
  logic [31:0] modff_fpart;
  typedef struct { logic [31:0] x; int t; } modff_item_t;
  modff_item_t modff_q[$];
  int modff_last = 0;
  function automatic bit ok_modff(input logic [31:0] i_x, input logic [31:0] o_ipart, input logic [31:0] o_fpart);
    real v, ip;
    if (is_nan(i_x)) return is_nan(o_ipart) && is_nan(o_fpart);
    if (i_x[30:23] == 8'hff) return o_ipart == i_x && o_fpart == {i_x[31], 31'd0};
    v = f2r(i_x);
    if (i_x[30:23] >= 8'd150) ip = v;
    else ip = real'($rtoi(v));
    return f2r(o_ipart) == ip && f2r(o_fpart) == v - ip
           && o_ipart[31] == i_x[31] && o_fpart[31] == i_x[31];
  endfunction
  always @(negedge clk) if (rst_n && modff_out_valid) begin
    if (modff_q.size() == 0) begin failures++; $display("FAIL modff: unexpected result"); end
    else begin
      modff_item_t it;
      it = modff_q.pop_front();
      modff_last = cyc;
      checks++;
      if (cyc - it.t != LAT_MODF || !ok_modff(it.x, modff_ipart, modff_fpart)) begin
        failures++;
        $display("FAIL modff: x=%h -> ipart=%h fpart=%h lat=%0d", it.x, modff_ipart, modff_fpart, cyc - it.t);
      end
    end
  end
  // ---- sqrtf
  logic sqrtf_in_valid = 1'b0, sqrtf_out_valid;
  logic [31:0] sqrtf_x = '0;
  logic [31:0] sqrtf_y;
  typedef struct { logic [31:0] x; int t; } sqrtf_item_t;
  sqrtf_item_t sqrtf_q[$];
  int sqrtf_last = 0;
  function automatic bit ok_sqrtf(input logic [31:0] i_x, input logic [31:0] o_y);
    if (is_nan(i_x) || (i_x[31] && i_x[30:23] != 0)) return is_nan(o_y);
    if (i_x[30:23] == 8'd0) return o_y == {i_x[31], 31'd0};
    if (is_inf(i_x)) return o_y == i_x;
    return o_y == r2f($sqrt(f2r(i_x)));
  endfunction
  always @(negedge clk) if (rst_n && sqrtf_out_valid) begin
    if (sqrtf_q.size() == 0) begin failures++; $display("FAIL sqrtf: unexpected result"); end
    else begin
      sqrtf_item_t it;
      it = sqrtf_q.pop_front();
      sqrtf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_SQRT || !ok_sqrtf(it.x, sqrtf_y)) begin
        failures++;
        $display("FAIL sqrtf: x=%h -> y=%h lat=%0d", it.x, sqrtf_y, cyc - it.t);
      end
    end
  end
  // ---- expf
  logic expf_in_valid = 1'b0, expf_out_valid;
  logic [31:0] expf_x = '0;
  logic [31:0] expf_y;
  typedef struct { logic [31:0] x; int t; } expf_item_t;
  expf_item_t expf_q[$];
  int expf_last = 0;
  function automatic bit ok_expf(input logic [31:0] i_x, input logic [31:0] o_y);
    real r;
    if (is_nan(i_x)) return is_nan(o_y);
    if (is_inf(i_x)) return o_y == (i_x[31] ? 32'h0 : F32_PINF);
    r = $exp(f2r(i_x));
    if (r > 3.4028234663852886e38) return o_y == F32_PINF;
    if (r < 1.1754943508222875e-38) return o_y == 32'h0 || o_y == 32'h0080_0000;
    return ulp_err(o_y, r) < 1.0;
  endfunction
  always @(negedge clk) if (rst_n && expf_out_valid) begin
    if (expf_q.size() == 0) begin failures++; $display("FAIL expf: unexpected result"); end
    else begin
      expf_item_t it;
      it = expf_q.pop_front();
      expf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_EXPF || !ok_expf(it.x, expf_y)) begin
        failures++;
        $display("FAIL expf: x=%h -> y=%h lat=%0d", it.x, expf_y, cyc - it.t);
      end
    end
  end
  // ---- logf
  logic logf_in_valid = 1'b0, logf_out_valid;
  logic [31:0] logf_x = '0;
  logic [31:0] logf_y;
  typedef struct { logic [31:0] x; int t; } logf_item_t;
  logf_item_t logf_q[$];
  int logf_last = 0;
  function automatic bit ok_logf(input logic [31:0] i_x, input logic [31:0] o_y);
    if (is_nan(i_x) || (i_x[31] && i_x[30:23] != 0)) return is_nan(o_y);
    if (i_x[30:23] == 0) return o_y == 32'hff80_0000;
    if (is_inf(i_x)) return o_y == F32_PINF;
    if (i_x == F32_ONE) return o_y == 32'h0;
    return ulp_err(o_y, $ln(f2r(i_x))) < 1.0;
  endfunction
  always @(negedge clk) if (rst_n && logf_out_valid) begin
    if (logf_q.size() == 0) begin failures++; $display("FAIL logf: unexpected result"); end
    else begin
      logf_item_t it;
      it = logf_q.pop_front();
      logf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_LOGF || !ok_logf(it.x, logf_y)) begin
        failures++;
        $display("FAIL logf: x=%h -> y=%h lat=%0d", it.x, logf_y, cyc - it.t);
      end
    end
  end
  // ---- sinf
  logic sinf_in_valid = 1'b0, sinf_out_valid;
  logic [31:0] sinf_x = '0;
  logic [31:0] sinf_y;
  typedef struct { logic [31:0] x; int t; } sinf_item_t;
  sinf_item_t sinf_q[$];
  int sinf_last = 0;
  function automatic bit ok_sinf(input logic [31:0] i_x, input logic [31:0] o_y);
    real v, r;
    int e;
    e = int'(i_x[30:23]) - 127;
    if (i_x[30:23] == 8'hff || e >= 24) return is_nan(o_y);
    v = f2r(i_x);
    r = $sin(v);
    if (e < -12) return ulp_err(o_y, r) <= 1.0;
    return ulp_err(o_y, r) < 1.0 || (f2r(o_y) - r < 2.0e-11 && r - f2r(o_y) < 2.0e-11);
  endfunction
  always @(negedge clk) if (rst_n && sinf_out_valid) begin
    if (sinf_q.size() == 0) begin failures++; $display("FAIL sinf: unexpected result"); end
    else begin
      sinf_item_t it;
      it = sinf_q.pop_front();
      sinf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_TRIG || !ok_sinf(it.x, sinf_y)) begin
        failures++;
        $display("FAIL sinf: x=%h -> y=%h lat=%0d", it.x, sinf_y, cyc - it.t);
      end
    end
  end
  // ---- cosf
  logic cosf_in_valid = 1'b0, cosf_out_valid;
  logic [31:0] cosf_x = '0;
  logic [31:0] cosf_y;
  typedef struct { logic [31:0] x; int t; } cosf_item_t;
  cosf_item_t cosf_q[$];
  int cosf_last = 0;
  function automatic bit ok_cosf(input logic [31:0] i_x, input logic [31:0] o_y);
    real v, r;
    int e;
    e = int'(i_x[30:23]) - 127;
    if (i_x[30:23] == 8'hff || e >= 24) return is_nan(o_y);
    v = f2r(i_x);
    r = $cos(v);
    if (e < -12) return o_y == F32_ONE;
    return ulp_err(o_y, r) < 1.0 || (f2r(o_y) - r < 2.0e-11 && r - f2r(o_y) < 2.0e-11);
  endfunction
  always @(negedge clk) if (rst_n && cosf_out_valid) begin
    if (cosf_q.size() == 0) begin failures++; $display("FAIL cosf: unexpected result"); end
    else begin
      cosf_item_t it;
      it = cosf_q.pop_front();
      cosf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_TRIG || !ok_cosf(it.x, cosf_y)) begin
        failures++;
        $display("FAIL cosf: x=%h -> y=%h lat=%0d", it.x, cosf_y, cyc - it.t);
      end
    end
  end
  // ---- tanf
  logic tanf_in_valid = 1'b0, tanf_out_valid;
  logic [31:0] tanf_x = '0;
  logic [31:0] tanf_y;
  typedef struct { logic [31:0] x; int t; } tanf_item_t;
  tanf_item_t tanf_q[$];
  int tanf_last = 0;
  function automatic bit ok_tanf(input logic [31:0] i_x, input logic [31:0] o_y);
    real v, r, c;
    int e;
    e = int'(i_x[30:23]) - 127;
    if (i_x[30:23] == 8'hff || e >= 24) return is_nan(o_y);
    v = f2r(i_x);
    r = $tan(v);
    c = $cos(v);
    if (e < -12) return o_y == i_x;
    if (c < 0.0009765625 && c > -0.0009765625) return (f2r(o_y) - r) / r < 1.0e-5 && (r - f2r(o_y)) / r < 1.0e-5;
    return ulp_err(o_y, r) <= 2.0 || (f2r(o_y) - r < 2.0e-11 && r - f2r(o_y) < 2.0e-11);
  endfunction
  always @(negedge clk) if (rst_n && tanf_out_valid) begin
    if (tanf_q.size() == 0) begin failures++; $display("FAIL tanf: unexpected result"); end
    else begin
      tanf_item_t it;
      it = tanf_q.pop_front();
      tanf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_TANF || !ok_tanf(it.x, tanf_y)) begin
        failures++;
        $display("FAIL tanf: x=%h -> y=%h lat=%0d", it.x, tanf_y, cyc - it.t);
      end
    end
  end
  // ---- powf
  logic powf_in_valid = 1'b0, powf_out_valid;
  logic [31:0] powf_x = '0;
  logic [31:0] powf_yexp = '0;
  logic [31:0] powf_y;
  typedef struct { logic [31:0] x; logic [31:0] yexp; int t; } powf_item_t;
  powf_item_t powf_q[$];
  int powf_last = 0;
  function automatic bit ok_powf(input logic [31:0] i_x, input logic [31:0] i_yexp, input logic [31:0] o_y);
    real a, b, r, t;
    if (i_yexp[30:23] == 0) return o_y == F32_ONE;
    if (is_nan(i_x) || is_nan(i_yexp) || (i_x[31] && i_x[30:23] != 0)) return is_nan(o_y);
    if (i_x[30:23] == 0) return o_y == (i_yexp[31] ? F32_PINF : 32'h0);
    if (is_inf(i_x)) return o_y == (i_yexp[31] ? 32'h0 : F32_PINF);
    if (is_inf(i_yexp)) begin
      if (i_x == F32_ONE) return o_y == F32_ONE;
      return o_y == (((f2r(i_x) > 1.0) == !i_yexp[31]) ? F32_PINF : 32'h0);
    end
    a = f2r(i_x);
    b = f2r(i_yexp);
    t = b * $ln(a);
    r = $pow(a, b);
    if (t > 88.7228) return o_y == F32_PINF || (t < 88.7229 && ulp_err(o_y, r) < 4.0);
    if (t < -87.3365) return o_y == 32'h0 || o_y[30:23] == 8'd1;
    return ulp_err(o_y, r) <= 1.0 + (t < 0.0 ? -t : t) / 64.0;
  endfunction
  always @(negedge clk) if (rst_n && powf_out_valid) begin
    if (powf_q.size() == 0) begin failures++; $display("FAIL powf: unexpected result"); end
    else begin
      powf_item_t it;
      it = powf_q.pop_front();
      powf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_POWF || !ok_powf(it.x, it.yexp, powf_y)) begin
        failures++;
        $display("FAIL powf: x=%h yexp=%h -> y=%h lat=%0d", it.x, it.yexp, powf_y, cyc - it.t);
      end
    end
  end
  // ---- fp_add
  logic fp_add_in_valid = 1'b0, fp_add_out_valid;
  logic [31:0] fp_add_a = '0;
  logic [31:0] fp_add_b = '0;
  logic [0:0] fp_add_sub = '0;
  logic [31:0] fp_add_y;
  typedef struct { logic [31:0] a; logic [31:0] b; logic [0:0] sub; int t; } fp_add_item_t;
  fp_add_item_t fp_add_q[$];
  int fp_add_last = 0;
  function automatic bit ok_fp_add(input logic [31:0] i_a, input logic [31:0] i_b, input logic [0:0] i_sub, input logic [31:0] o_y);
    logic [31:0] bb;
    real r;
    bb = {i_b[31] ^ i_sub, i_b[30:0]};
    if (is_nan(i_a) || is_nan(bb) || (is_inf(i_a) && is_inf(bb) && i_a[31] != bb[31])) return is_nan(o_y);
    if (is_inf(i_a)) return o_y == i_a;
    if (is_inf(bb)) return o_y == bb;
    r = f2r(i_a) + f2r(bb);
    if (r == 0.0) return o_y == {(i_a[31] && bb[31]) || (i_a[30:23] == 0 && bb[30:23] == 0 && i_a[31] && bb[31]), 31'd0};
    return o_y == r2f(r);
  endfunction
  always @(negedge clk) if (rst_n && fp_add_out_valid) begin
    if (fp_add_q.size() == 0) begin failures++; $display("FAIL fp_add: unexpected result"); end
    else begin
      fp_add_item_t it;
      it = fp_add_q.pop_front();
      fp_add_last = cyc;
      checks++;
      if (cyc - it.t != LAT_FP_ADD || !ok_fp_add(it.a, it.b, it.sub, fp_add_y)) begin
        failures++;
        $display("FAIL fp_add: a=%h b=%h sub=%h -> y=%h lat=%0d", it.a, it.b, it.sub, fp_add_y, cyc - it.t);
      end
    end
  end
  // ---- fp_mul
  logic fp_mul_in_valid = 1'b0, fp_mul_out_valid;
  logic [31:0] fp_mul_a = '0;
  logic [31:0] fp_mul_b = '0;
  logic [31:0] fp_mul_y;
  typedef struct { logic [31:0] a; logic [31:0] b; int t; } fp_mul_item_t;
  fp_mul_item_t fp_mul_q[$];
  int fp_mul_last = 0;
  function automatic bit ok_fp_mul(input logic [31:0] i_a, input logic [31:0] i_b, input logic [31:0] o_y);
    if (is_nan(i_a) || is_nan(i_b) || (is_inf(i_a) && i_b[30:23] == 0) || (is_inf(i_b) && i_a[30:23] == 0)) return is_nan(o_y);
    if (is_inf(i_a) || is_inf(i_b)) return o_y == {i_a[31] ^ i_b[31], 8'hff, 23'd0};
    if (i_a[30:23] == 0 || i_b[30:23] == 0) return o_y == {i_a[31] ^ i_b[31], 31'd0};
    return o_y == r2f(f2r(i_a) * f2r(i_b));
  endfunction
  always @(negedge clk) if (rst_n && fp_mul_out_valid) begin
    if (fp_mul_q.size() == 0) begin failures++; $display("FAIL fp_mul: unexpected result"); end
    else begin
      fp_mul_item_t it;
      it = fp_mul_q.pop_front();
      fp_mul_last = cyc;
      checks++;
      if (cyc - it.t != LAT_FP_MUL || !ok_fp_mul(it.a, it.b, fp_mul_y)) begin
        failures++;
        $display("FAIL fp_mul: a=%h b=%h -> y=%h lat=%0d", it.a, it.b, fp_mul_y, cyc - it.t);
      end
    end
  end
  // ---- fp_div
  logic fp_div_in_valid = 1'b0, fp_div_out_valid;
  logic [31:0] fp_div_a = '0;
  logic [31:0] fp_div_b = '0;
  logic [31:0] fp_div_y;
  typedef struct { logic [31:0] a; logic [31:0] b; int t; } fp_div_item_t;
  fp_div_item_t fp_div_q[$];
  int fp_div_last = 0;
  function automatic bit ok_fp_div(input logic [31:0] i_a, input logic [31:0] i_b, input logic [31:0] o_y);
    if (is_nan(i_a) || is_nan(i_b) || (i_a[30:23] == 0 && i_b[30:23] == 0) || (is_inf(i_a) && is_inf(i_b))) return is_nan(o_y);
    if (is_inf(i_a) || i_b[30:23] == 0) return o_y == {i_a[31] ^ i_b[31], 8'hff, 23'd0};
    if (i_a[30:23] == 0 || is_inf(i_b)) return o_y == {i_a[31] ^ i_b[31], 31'd0};
    return o_y == r2f(f2r(i_a) / f2r(i_b));
  endfunction
  always @(negedge clk) if (rst_n && fp_div_out_valid) begin
    if (fp_div_q.size() == 0) begin failures++; $display("FAIL fp_div: unexpected result"); end
    else begin
      fp_div_item_t it;
      it = fp_div_q.pop_front();
      fp_div_last = cyc;
      checks++;
      if (cyc - it.t != LAT_FP_DIV || !ok_fp_div(it.a, it.b, fp_div_y)) begin
        failures++;
        $display("FAIL fp_div: a=%h b=%h -> y=%h lat=%0d", it.a, it.b, fp_div_y, cyc - it.t);
      end
    end
  end
  // ---- pdf
  logic pdf_in_valid = 1'b0, pdf_out_valid;
  logic [31:0] pdf_x = '0;
  logic [31:0] pdf_mu = '0;
  logic [31:0] pdf_sigma = '0;
  logic [31:0] pdf_y;
  typedef struct { logic [31:0] x; logic [31:0] mu; logic [31:0] sigma; int t; } pdf_item_t;
  pdf_item_t pdf_q[$];
  int pdf_last = 0;
  function automatic bit ok_pdf(input logic [31:0] i_x, input logic [31:0] i_mu, input logic [31:0] i_sigma, input logic [31:0] o_y);
    real d, q, r;
    d = f2r(i_x) - f2r(i_mu);
    q = d * d / (2.0 * f2r(i_sigma) * f2r(i_sigma));
    r = $exp(-q) / (f2r(i_sigma) * $sqrt(2.0 * 3.14159265358979323846));
    if (r < 1.2e-38) return o_y[30:23] <= 8'd1;
    return ulp_err(o_y, r) <= 4.0 + 8.0 * q;
  endfunction
  always @(negedge clk) if (rst_n && pdf_out_valid) begin
    if (pdf_q.size() == 0) begin failures++; $display("FAIL pdf: unexpected result"); end
    else begin
      pdf_item_t it;
      it = pdf_q.pop_front();
      pdf_last = cyc;
      checks++;
      if (cyc - it.t != LAT_PDF || !ok_pdf(it.x, it.mu, it.sigma, pdf_y)) begin
        failures++;
        $display("FAIL pdf: x=%h mu=%h sigma=%h -> y=%h lat=%0d", it.x, it.mu, it.sigma, pdf_y, cyc - it.t);
      end
    end
  end
  // ---- random number generators
  logic rand_ms_i_seed_load = 1'b0, rand_ms_i_next = 1'b0, rand_ms_i_out_valid;
  logic [31:0] rand_ms_i_seed = '0;
  logic [14:0] rand_ms_i_rnd;
  logic rand6_seed_load = 1'b0, rand6_out_valid;
  logic [31:0] rand6_seed = '0;
  logic [14:0] rand6_rnd;
  logic [2:0]  rand6_thread;
  logic [31:0] m_ms = 32'd1, m6 [6];
  int          thread_seen [6];

  mathlib_top dut (.clk, .rst_n,
    .fabsf_in_valid, .fabsf_x, .fabsf_out_valid, .fabsf_y,
    .frexpf_in_valid, .frexpf_x, .frexpf_out_valid, .frexpf_frac, .frexpf_e,
    .ldexpf_in_valid, .ldexpf_frac, .ldexpf_e, .ldexpf_out_valid, .ldexpf_y,
    .modff_in_valid, .modff_x, .modff_out_valid, .modff_ipart, .modff_fpart,
    .sqrtf_in_valid, .sqrtf_x, .sqrtf_out_valid, .sqrtf_y,
    .expf_in_valid, .expf_x, .expf_out_valid, .expf_y,
    .logf_in_valid, .logf_x, .logf_out_valid, .logf_y,
    .sinf_in_valid, .sinf_x, .sinf_out_valid, .sinf_y,
    .cosf_in_valid, .cosf_x, .cosf_out_valid, .cosf_y,
    .tanf_in_valid, .tanf_x, .tanf_out_valid, .tanf_y,
    .powf_in_valid, .powf_x, .powf_yexp, .powf_out_valid, .powf_y,
    .fp_add_in_valid, .fp_add_a, .fp_add_b, .fp_add_sub, .fp_add_out_valid, .fp_add_y,
    .fp_mul_in_valid, .fp_mul_a, .fp_mul_b, .fp_mul_out_valid, .fp_mul_y,
    .fp_div_in_valid, .fp_div_a, .fp_div_b, .fp_div_out_valid, .fp_div_y,
    .pdf_in_valid, .pdf_x, .pdf_mu, .pdf_sigma, .pdf_out_valid, .pdf_y,
    .rand_ms_i_seed_load, .rand_ms_i_seed, .rand_ms_i_next, .rand_ms_i_out_valid, .rand_ms_i_rnd,
    .rand6_seed_load, .rand6_seed, .rand6_out_valid, .rand6_rnd, .rand6_thread);

  // generator checks: the controls seen at a rising edge are captured, and at the
  // following falling edge the model is advanced and compared with the outputs
  logic        ld_ms = 1'b0, nx_ms = 1'b0, ld6 = 1'b0, r6_live = 1'b0;
  logic [31:0] sd_ms = '0, sd6 = '0;
  always @(posedge clk) begin
    ld_ms <= rand_ms_i_seed_load; nx_ms <= rand_ms_i_next; sd_ms <= rand_ms_i_seed;
    ld6 <= rand6_seed_load; sd6 <= rand6_seed;
  end
  always @(negedge clk) if (rst_n) begin
    if (ld_ms) m_ms = sd_ms;
    if (!ld_ms && nx_ms) begin
      checks++;
      m_ms = m_ms * 32'd214013 + 32'd2531011;
      if (!rand_ms_i_out_valid || rand_ms_i_rnd != m_ms[30:16]) begin failures++; $display("FAIL rand_ms_i"); end
    end else if (rand_ms_i_out_valid) begin failures++; $display("FAIL rand_ms_i: spurious"); end
    if (ld6) begin
      for (int t = 0; t < 6; t++) m6[t] = sd6 + 32'(t);
      r6_live = 1'b1;
    end
    if (r6_live && rand6_out_valid) begin
      int t;
      t = int'(rand6_thread);
      checks++;
      m6[t] = m6[t] * 32'd214013 + 32'd2531011;
      if (rand6_rnd != m6[t][30:16]) begin failures++; $display("FAIL rand6 thread %0d", t); end
      thread_seen[t]++;
    end
  end

  // mechanism counters
  int n_exp_ovf = 0, n_exp_unf = 0, n_log_half = 0, n_log_special = 0, n_trig_bypass = 0, n_trig_range = 0;
  int n_quad [4] = '{0, 0, 0, 0};
  int n_div0 = 0, n_cancel = 0, n_sqrt_odd = 0, n_pow_sat = 0, n_ldexp_sat = 0, n_ldexp_flush = 0, n_full = 0;
  int n_pdf = 0, n_seed = 0;
  always @(negedge clk) if (rst_n) begin
    if (expf_out_valid && expf_y == F32_PINF) n_exp_ovf++;
    if (expf_out_valid && expf_y == 32'h0) n_exp_unf++;
    if (logf_in_valid && logf_x[22] && !logf_x[31]) n_log_half++;
    if (logf_out_valid && (is_nan(logf_y) || is_inf(logf_y))) n_log_special++;
    if (sinf_in_valid && sinf_x[30:23] < 8'd115) n_trig_bypass++;
    if (sinf_in_valid && sinf_x[30:23] >= 8'd151) n_trig_range++;
    if (sinf_in_valid && sinf_x[30:23] >= 8'd115 && sinf_x[30:23] < 8'd151)
      n_quad[int'($floor((f2r(sinf_x) < 0.0 ? -f2r(sinf_x) : f2r(sinf_x)) / (3.14159265358979323846 / 2.0))) % 4]++;
    if (fp_div_in_valid && fp_div_b[30:23] == 8'd0 && fp_div_a[30:23] != 8'd0) n_div0++;
    if (fp_add_out_valid && fp_add_y[30:23] != 0 && fp_add_y[30:23] + 8'd8 < 8'd127 - 8'd10) n_cancel++;
    if (sqrtf_in_valid && !sqrtf_x[23]) n_sqrt_odd++;
    if (powf_out_valid && (powf_y == F32_PINF || powf_y == 32'h0)) n_pow_sat++;
    if (ldexpf_out_valid && ldexpf_y[30:23] == 8'hff && ldexpf_y[22:0] == 0) n_ldexp_sat++;
    if (ldexpf_out_valid && ldexpf_y[30:23] == 8'h00) n_ldexp_flush++;
    if (pdf_out_valid) n_pdf++;
    if (fabsf_in_valid && frexpf_in_valid && ldexpf_in_valid && modff_in_valid && sqrtf_in_valid && expf_in_valid && logf_in_valid && sinf_in_valid && cosf_in_valid && tanf_in_valid && powf_in_valid && fp_add_in_valid && fp_mul_in_valid && fp_div_in_valid && pdf_in_valid) n_full++;
  end

  task automatic drive(input bit use_dir, input int k);
    begin
      fabsf_item_t it;
      if (use_dir) begin
        case (k % 4)
          0: {fabsf_x} = {32'h8000_0000};
          1: {fabsf_x} = {32'hff80_0000};
          2: {fabsf_x} = {32'hffc0_0001};
          3: {fabsf_x} = {32'hbf80_0000};
          default: ;
        endcase
      end else begin
        fabsf_x = rnd_f32(-126, 127, 1'b1);
      end
      fabsf_in_valid = 1'b1;
      it.t = cyc;
      it.x = fabsf_x;
      fabsf_q.push_back(it);
    end
    begin
      frexpf_item_t it;
      if (use_dir) begin
        case (k % 7)
          0: {frexpf_x} = {32'h0};
          1: {frexpf_x} = {32'h8000_0000};
          2: {frexpf_x} = {32'h7f80_0000};
          3: {frexpf_x} = {32'h7fc0_0000};
          4: {frexpf_x} = {32'h3f80_0000};
          5: {frexpf_x} = {32'h0080_0000};
          6: {frexpf_x} = {32'h7f7f_ffff};
          default: ;
        endcase
      end else begin
        frexpf_x = rnd_f32(-126, 127, 1'b1);
      end
      frexpf_in_valid = 1'b1;
      it.t = cyc;
      it.x = frexpf_x;
      frexpf_q.push_back(it);
    end
    begin
      ldexpf_item_t it;
      if (use_dir) begin
        case (k % 8)
          0: {ldexpf_frac, ldexpf_e} = {32'h3f80_0000, 32'd127};
          1: {ldexpf_frac, ldexpf_e} = {32'h3f80_0000, 32'd128};
          2: {ldexpf_frac, ldexpf_e} = {32'h3f80_0000, -32'sd126};
          3: {ldexpf_frac, ldexpf_e} = {32'h3f80_0000, -32'sd127};
          4: {ldexpf_frac, ldexpf_e} = {32'hbfc0_0000, 32'h7fff_ffff};
          5: {ldexpf_frac, ldexpf_e} = {32'h3fc0_0000, 32'h8000_0000};
          6: {ldexpf_frac, ldexpf_e} = {32'h0, 32'd5};
          7: {ldexpf_frac, ldexpf_e} = {32'h7f80_0000, -32'sd3};
          default: ;
        endcase
      end else begin
        ldexpf_frac = rnd_f32(-126, 127, 1'b1);
        ldexpf_e = 32'(int'($urandom_range(400)) - 200);
      end
      ldexpf_in_valid = 1'b1;
      it.t = cyc;
      it.frac = ldexpf_frac;
      it.e = ldexpf_e;
      ldexpf_q.push_back(it);
    end
    begin
      modff_item_t it;
      if (use_dir) begin
        case (k % 8)
          0: {modff_x} = {32'h0};
          1: {modff_x} = {32'h8000_0000};
          2: {modff_x} = {32'hff80_0000};
          3: {modff_x} = {32'h7fc0_0000};
          4: {modff_x} = {32'h3f00_0000};
          5: {modff_x} = {32'hbfc0_0000};
          6: {modff_x} = {32'h4b00_0001};
          7: {modff_x} = {32'h4affffff};
          default: ;
        endcase
      end else begin
        modff_x = rnd_f32(-30, 30, 1'b1);
      end
      modff_in_valid = 1'b1;
      it.t = cyc;
      it.x = modff_x;
      modff_q.push_back(it);
    end
    begin
      sqrtf_item_t it;
      if (use_dir) begin
        case (k % 9)
          0: {sqrtf_x} = {32'h0};
          1: {sqrtf_x} = {32'h8000_0000};
          2: {sqrtf_x} = {32'h7f80_0000};
          3: {sqrtf_x} = {32'hbf80_0000};
          4: {sqrtf_x} = {32'h7fc0_0000};
          5: {sqrtf_x} = {32'h4080_0000};
          6: {sqrtf_x} = {32'h3f80_0000};
          7: {sqrtf_x} = {32'h7f7f_ffff};
          8: {sqrtf_x} = {32'h0080_0000};
          default: ;
        endcase
      end else begin
        sqrtf_x = rnd_f32(-126, 127, 1'b0);
      end
      sqrtf_in_valid = 1'b1;
      it.t = cyc;
      it.x = sqrtf_x;
      sqrtf_q.push_back(it);
    end
    begin
      expf_item_t it;
      if (use_dir) begin
        case (k % 13)
          0: {expf_x} = {32'h0};
          1: {expf_x} = {32'h3f80_0000};
          2: {expf_x} = {32'hbf80_0000};
          3: {expf_x} = {32'h42b1_7217};
          4: {expf_x} = {32'h42b2_0000};
          5: {expf_x} = {32'hc2ae_0000};
          6: {expf_x} = {32'hc2b0_0000};
          7: {expf_x} = {32'h7f80_0000};
          8: {expf_x} = {32'hff80_0000};
          9: {expf_x} = {32'h7fc0_0000};
          10: {expf_x} = {32'h3000_0000};
          11: {expf_x} = {32'hb000_0000};
          12: {expf_x} = {32'h4300_0000};
          default: ;
        endcase
      end else begin
        expf_x = rnd_f32(-30, 7, 1'b1);
      end
      expf_in_valid = 1'b1;
      it.t = cyc;
      it.x = expf_x;
      expf_q.push_back(it);
    end
    begin
      logf_item_t it;
      if (use_dir) begin
        case (k % 13)
          0: {logf_x} = {32'h3f80_0000};
          1: {logf_x} = {32'h3f80_0001};
          2: {logf_x} = {32'h3f7f_ffff};
          3: {logf_x} = {32'h0};
          4: {logf_x} = {32'hbf80_0000};
          5: {logf_x} = {32'h7f80_0000};
          6: {logf_x} = {32'h7fc0_0000};
          7: {logf_x} = {32'h0080_0000};
          8: {logf_x} = {32'h7f7f_ffff};
          9: {logf_x} = {32'h4000_0000};
          10: {logf_x} = {32'h3f00_0000};
          11: {logf_x} = {32'h3fc0_0000};
          12: {logf_x} = {32'h3fbf_ffff};
          default: ;
        endcase
      end else begin
        logf_x = rnd_f32(-126, 127, 1'b0);
      end
      logf_in_valid = 1'b1;
      it.t = cyc;
      it.x = logf_x;
      logf_q.push_back(it);
    end
    begin
      sinf_item_t it;
      if (use_dir) begin
        case (k % 16)
          0: {sinf_x} = {32'h0};
          1: {sinf_x} = {32'h8000_0000};
          2: {sinf_x} = {32'h3f80_0000};
          3: {sinf_x} = {32'hbf80_0000};
          4: {sinf_x} = {32'h3fc9_0fdb};
          5: {sinf_x} = {32'h4049_0fdb};
          6: {sinf_x} = {32'h40c9_0fdb};
          7: {sinf_x} = {32'h3900_0000};
          8: {sinf_x} = {32'h3980_0000};
          9: {sinf_x} = {32'hb980_0000};
          10: {sinf_x} = {32'h4b7f_ffff};
          11: {sinf_x} = {32'h4b80_0000};
          12: {sinf_x} = {32'h7f80_0000};
          13: {sinf_x} = {32'h7fc0_0000};
          14: {sinf_x} = {32'h4700_0000};
          15: {sinf_x} = {32'h3f49_0fdb};
          default: ;
        endcase
      end else begin
        sinf_x = rnd_f32(-14, 10, 1'b1);
      end
      if (!use_dir && $urandom_range(15) == 0) sinf_x = rnd_f32(20, 25, 1'b1);
      sinf_in_valid = 1'b1;
      it.t = cyc;
      it.x = sinf_x;
      sinf_q.push_back(it);
    end
    begin
      cosf_item_t it;
      if (use_dir) begin
        case (k % 16)
          0: {cosf_x} = {32'h0};
          1: {cosf_x} = {32'h8000_0000};
          2: {cosf_x} = {32'h3f80_0000};
          3: {cosf_x} = {32'hbf80_0000};
          4: {cosf_x} = {32'h3fc9_0fdb};
          5: {cosf_x} = {32'h4049_0fdb};
          6: {cosf_x} = {32'h40c9_0fdb};
          7: {cosf_x} = {32'h3900_0000};
          8: {cosf_x} = {32'h3980_0000};
          9: {cosf_x} = {32'hb980_0000};
          10: {cosf_x} = {32'h4b7f_ffff};
          11: {cosf_x} = {32'h4b80_0000};
          12: {cosf_x} = {32'h7f80_0000};
          13: {cosf_x} = {32'h7fc0_0000};
          14: {cosf_x} = {32'h4700_0000};
          15: {cosf_x} = {32'h3f49_0fdb};
          default: ;
        endcase
      end else begin
        cosf_x = rnd_f32(-14, 10, 1'b1);
      end
      if (!use_dir && $urandom_range(15) == 0) cosf_x = rnd_f32(20, 25, 1'b1);
      cosf_in_valid = 1'b1;
      it.t = cyc;
      it.x = cosf_x;
      cosf_q.push_back(it);
    end
    begin
      tanf_item_t it;
      if (use_dir) begin
        case (k % 16)
          0: {tanf_x} = {32'h0};
          1: {tanf_x} = {32'h8000_0000};
          2: {tanf_x} = {32'h3f80_0000};
          3: {tanf_x} = {32'hbf80_0000};
          4: {tanf_x} = {32'h3fc9_0fdb};
          5: {tanf_x} = {32'h4049_0fdb};
          6: {tanf_x} = {32'h40c9_0fdb};
          7: {tanf_x} = {32'h3900_0000};
          8: {tanf_x} = {32'h3980_0000};
          9: {tanf_x} = {32'hb980_0000};
          10: {tanf_x} = {32'h4b7f_ffff};
          11: {tanf_x} = {32'h4b80_0000};
          12: {tanf_x} = {32'h7f80_0000};
          13: {tanf_x} = {32'h7fc0_0000};
          14: {tanf_x} = {32'h4700_0000};
          15: {tanf_x} = {32'h3f49_0fdb};
          default: ;
        endcase
      end else begin
        tanf_x = rnd_f32(-14, 10, 1'b1);
      end
      if (!use_dir && $urandom_range(15) == 0) tanf_x = rnd_f32(20, 25, 1'b1);
      tanf_in_valid = 1'b1;
      it.t = cyc;
      it.x = tanf_x;
      tanf_q.push_back(it);
    end
    begin
      powf_item_t it;
      if (use_dir) begin
        case (k % 17)
          0: {powf_x, powf_yexp} = {32'h4000_0000, 32'h4120_0000};
          1: {powf_x, powf_yexp} = {32'h4000_0000, 32'h0};
          2: {powf_x, powf_yexp} = {32'h7fc0_0000, 32'h0};
          3: {powf_x, powf_yexp} = {32'h0, 32'h3f80_0000};
          4: {powf_x, powf_yexp} = {32'h0, 32'hbf80_0000};
          5: {powf_x, powf_yexp} = {32'hc000_0000, 32'h4000_0000};
          6: {powf_x, powf_yexp} = {32'h7f80_0000, 32'h3f00_0000};
          7: {powf_x, powf_yexp} = {32'h7f80_0000, 32'hbf00_0000};
          8: {powf_x, powf_yexp} = {32'h3f80_0000, 32'h7f80_0000};
          9: {powf_x, powf_yexp} = {32'h4000_0000, 32'h7f80_0000};
          10: {powf_x, powf_yexp} = {32'h3f00_0000, 32'h7f80_0000};
          11: {powf_x, powf_yexp} = {32'h4000_0000, 32'hff80_0000};
          12: {powf_x, powf_yexp} = {32'h4000_0000, 32'h4300_0000};
          13: {powf_x, powf_yexp} = {32'h4000_0000, 32'hc300_0000};
          14: {powf_x, powf_yexp} = {32'h4120_0000, 32'h4220_0000};
          15: {powf_x, powf_yexp} = {32'h7fc0_0000, 32'h3f80_0000};
          16: {powf_x, powf_yexp} = {32'h3f80_0000, 32'h4f00_0000};
          default: ;
        endcase
      end else begin
        powf_x = rnd_f32(-20, 20, 1'b0);
        powf_yexp = rnd_f32(-10, 3, 1'b1);
      end
      powf_in_valid = 1'b1;
      it.t = cyc;
      it.x = powf_x;
      it.yexp = powf_yexp;
      powf_q.push_back(it);
    end
    begin
      fp_add_item_t it;
      if (use_dir) begin
        case (k % 9)
          0: {fp_add_a, fp_add_b, fp_add_sub} = {32'h3f80_0000, 32'h3f80_0000, 1'b1};
          1: {fp_add_a, fp_add_b, fp_add_sub} = {32'h8000_0000, 32'h0, 1'b1};
          2: {fp_add_a, fp_add_b, fp_add_sub} = {32'h7f80_0000, 32'h7f80_0000, 1'b1};
          3: {fp_add_a, fp_add_b, fp_add_sub} = {32'h3f80_0000, 32'h3380_0000, 1'b0};
          4: {fp_add_a, fp_add_b, fp_add_sub} = {32'h3f80_0000, 32'h3380_0001, 1'b0};
          5: {fp_add_a, fp_add_b, fp_add_sub} = {32'h3f80_0000, 32'h3300_0000, 1'b1};
          6: {fp_add_a, fp_add_b, fp_add_sub} = {32'h7f7f_ffff, 32'h7f7f_ffff, 1'b0};
          7: {fp_add_a, fp_add_b, fp_add_sub} = {32'h4000_0000, 32'h3fff_ffff, 1'b1};
          8: {fp_add_a, fp_add_b, fp_add_sub} = {32'h3f80_0000, 32'h0, 1'b0};
          default: ;
        endcase
      end else begin
        fp_add_a = rnd_f32(-10, 10, 1'b1);
        fp_add_b = rnd_f32(-10, 10, 1'b1);
        fp_add_sub = 1'($urandom);
      end
      fp_add_in_valid = 1'b1;
      it.t = cyc;
      it.a = fp_add_a;
      it.b = fp_add_b;
      it.sub = fp_add_sub;
      fp_add_q.push_back(it);
    end
    begin
      fp_mul_item_t it;
      if (use_dir) begin
        case (k % 6)
          0: {fp_mul_a, fp_mul_b} = {32'h7f80_0000, 32'h0};
          1: {fp_mul_a, fp_mul_b} = {32'h7f7f_ffff, 32'h4000_0000};
          2: {fp_mul_a, fp_mul_b} = {32'h0080_0000, 32'h3f00_0000};
          3: {fp_mul_a, fp_mul_b} = {32'hbf80_0000, 32'h7f80_0000};
          4: {fp_mul_a, fp_mul_b} = {32'h3fff_ffff, 32'h3fff_ffff};
          5: {fp_mul_a, fp_mul_b} = {32'h7fc0_0000, 32'h3f80_0000};
          default: ;
        endcase
      end else begin
        fp_mul_a = rnd_f32(-70, 70, 1'b1);
        fp_mul_b = rnd_f32(-70, 70, 1'b1);
      end
      fp_mul_in_valid = 1'b1;
      it.t = cyc;
      it.a = fp_mul_a;
      it.b = fp_mul_b;
      fp_mul_q.push_back(it);
    end
    begin
      fp_div_item_t it;
      if (use_dir) begin
        case (k % 7)
          0: {fp_div_a, fp_div_b} = {32'h3f80_0000, 32'h0};
          1: {fp_div_a, fp_div_b} = {32'h0, 32'h0};
          2: {fp_div_a, fp_div_b} = {32'h7f80_0000, 32'h7f80_0000};
          3: {fp_div_a, fp_div_b} = {32'h4040_0000, 32'h4040_0000};
          4: {fp_div_a, fp_div_b} = {32'h3f80_0000, 32'h4040_0000};
          5: {fp_div_a, fp_div_b} = {32'h7f7f_ffff, 32'h3e80_0000};
          6: {fp_div_a, fp_div_b} = {32'h0080_0000, 32'h4000_0000};
          default: ;
        endcase
      end else begin
        fp_div_a = rnd_f32(-60, 60, 1'b1);
        fp_div_b = rnd_f32(-60, 60, 1'b1);
      end
      fp_div_in_valid = 1'b1;
      it.t = cyc;
      it.a = fp_div_a;
      it.b = fp_div_b;
      fp_div_q.push_back(it);
    end
    begin
      pdf_item_t it;
      if (use_dir) begin
        case (k % 4)
          0: {pdf_x, pdf_mu, pdf_sigma} = {32'h0, 32'h0, 32'h3f80_0000};
          1: {pdf_x, pdf_mu, pdf_sigma} = {32'h3f80_0000, 32'h0, 32'h3f80_0000};
          2: {pdf_x, pdf_mu, pdf_sigma} = {32'h4120_0000, 32'h0, 32'h3f80_0000};
          3: {pdf_x, pdf_mu, pdf_sigma} = {32'h4000_0000, 32'h3f80_0000, 32'h3f00_0000};
          default: ;
        endcase
      end else begin
        pdf_x = rnd_f32(-2, 2, 1'b1);
        pdf_mu = rnd_f32(-2, 2, 1'b1);
        pdf_sigma = rnd_f32(-2, 2, 1'b0);
      end
      if (!use_dir) pdf_x = r2f(f2r(pdf_mu) + f2r(pdf_sigma) * (real'($urandom_range(1000)) / 125.0 - 4.0));
      pdf_in_valid = 1'b1;
      it.t = cyc;
      it.x = pdf_x;
      it.mu = pdf_mu;
      it.sigma = pdf_sigma;
      pdf_q.push_back(it);
    end
  endtask

  task automatic idle();
    fabsf_in_valid = 1'b0;
    frexpf_in_valid = 1'b0;
    ldexpf_in_valid = 1'b0;
    modff_in_valid = 1'b0;
    sqrtf_in_valid = 1'b0;
    expf_in_valid = 1'b0;
    logf_in_valid = 1'b0;
    sinf_in_valid = 1'b0;
    cosf_in_valid = 1'b0;
    tanf_in_valid = 1'b0;
    powf_in_valid = 1'b0;
    fp_add_in_valid = 1'b0;
    fp_mul_in_valid = 1'b0;
    fp_div_in_valid = 1'b0;
    pdf_in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      // random generators: reload now and then, step rand_ms_i on most cycles
      rand_ms_i_seed_load = 1'b0; rand_ms_i_next = 1'b0; rand6_seed_load = 1'b0;
      if (n % 997 == 0) begin
        rand_ms_i_seed_load = 1'b1; rand_ms_i_seed = $urandom;
        rand6_seed_load = 1'b1; rand6_seed = $urandom; n_seed++;
      end else begin
        rand_ms_i_next = 1'($urandom_range(3) != 0);
      end
      if (n == 0) t0 = cyc;
      if (1'b0) idle();
      else drive(1'b0, n);
    end
    @(negedge clk);
    idle();
    rand_ms_i_next = 1'b0; rand_ms_i_seed_load = 1'b0; rand6_seed_load = 1'b0;
    repeat (LAT_PDF + 10) @(negedge clk);

    if (fabsf_q.size() != 0) begin failures++; $display("FAIL fabsf: %0d results missing", fabsf_q.size()); end
    if (frexpf_q.size() != 0) begin failures++; $display("FAIL frexpf: %0d results missing", frexpf_q.size()); end
    if (ldexpf_q.size() != 0) begin failures++; $display("FAIL ldexpf: %0d results missing", ldexpf_q.size()); end
    if (modff_q.size() != 0) begin failures++; $display("FAIL modff: %0d results missing", modff_q.size()); end
    if (sqrtf_q.size() != 0) begin failures++; $display("FAIL sqrtf: %0d results missing", sqrtf_q.size()); end
    if (expf_q.size() != 0) begin failures++; $display("FAIL expf: %0d results missing", expf_q.size()); end
    if (logf_q.size() != 0) begin failures++; $display("FAIL logf: %0d results missing", logf_q.size()); end
    if (sinf_q.size() != 0) begin failures++; $display("FAIL sinf: %0d results missing", sinf_q.size()); end
    if (cosf_q.size() != 0) begin failures++; $display("FAIL cosf: %0d results missing", cosf_q.size()); end
    if (tanf_q.size() != 0) begin failures++; $display("FAIL tanf: %0d results missing", tanf_q.size()); end
    if (powf_q.size() != 0) begin failures++; $display("FAIL powf: %0d results missing", powf_q.size()); end
    if (fp_add_q.size() != 0) begin failures++; $display("FAIL fp_add: %0d results missing", fp_add_q.size()); end
    if (fp_mul_q.size() != 0) begin failures++; $display("FAIL fp_mul: %0d results missing", fp_mul_q.size()); end
    if (fp_div_q.size() != 0) begin failures++; $display("FAIL fp_div: %0d results missing", fp_div_q.size()); end
    if (pdf_q.size() != 0) begin failures++; $display("FAIL pdf: %0d results missing", pdf_q.size()); end
    checks++; if (fabsf_last - t0 != NCYC - 1 + LAT_FABS) begin failures++; $display("FAIL fabsf: last result after %0d clocks", fabsf_last - t0); end
    $display("fabsf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, fabsf_last - t0 + 1, real'(fabsf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (frexpf_last - t0 != NCYC - 1 + LAT_FREXP) begin failures++; $display("FAIL frexpf: last result after %0d clocks", frexpf_last - t0); end
    $display("frexpf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, frexpf_last - t0 + 1, real'(frexpf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (ldexpf_last - t0 != NCYC - 1 + LAT_LDEXP) begin failures++; $display("FAIL ldexpf: last result after %0d clocks", ldexpf_last - t0); end
    $display("ldexpf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, ldexpf_last - t0 + 1, real'(ldexpf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (modff_last - t0 != NCYC - 1 + LAT_MODF) begin failures++; $display("FAIL modff: last result after %0d clocks", modff_last - t0); end
    $display("modff: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, modff_last - t0 + 1, real'(modff_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (sqrtf_last - t0 != NCYC - 1 + LAT_SQRT) begin failures++; $display("FAIL sqrtf: last result after %0d clocks", sqrtf_last - t0); end
    $display("sqrtf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, sqrtf_last - t0 + 1, real'(sqrtf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (expf_last - t0 != NCYC - 1 + LAT_EXPF) begin failures++; $display("FAIL expf: last result after %0d clocks", expf_last - t0); end
    $display("expf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, expf_last - t0 + 1, real'(expf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (logf_last - t0 != NCYC - 1 + LAT_LOGF) begin failures++; $display("FAIL logf: last result after %0d clocks", logf_last - t0); end
    $display("logf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, logf_last - t0 + 1, real'(logf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (sinf_last - t0 != NCYC - 1 + LAT_TRIG) begin failures++; $display("FAIL sinf: last result after %0d clocks", sinf_last - t0); end
    $display("sinf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, sinf_last - t0 + 1, real'(sinf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (cosf_last - t0 != NCYC - 1 + LAT_TRIG) begin failures++; $display("FAIL cosf: last result after %0d clocks", cosf_last - t0); end
    $display("cosf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, cosf_last - t0 + 1, real'(cosf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (tanf_last - t0 != NCYC - 1 + LAT_TANF) begin failures++; $display("FAIL tanf: last result after %0d clocks", tanf_last - t0); end
    $display("tanf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, tanf_last - t0 + 1, real'(tanf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (powf_last - t0 != NCYC - 1 + LAT_POWF) begin failures++; $display("FAIL powf: last result after %0d clocks", powf_last - t0); end
    $display("powf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, powf_last - t0 + 1, real'(powf_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (fp_add_last - t0 != NCYC - 1 + LAT_FP_ADD) begin failures++; $display("FAIL fp_add: last result after %0d clocks", fp_add_last - t0); end
    $display("fp_add: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, fp_add_last - t0 + 1, real'(fp_add_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (fp_mul_last - t0 != NCYC - 1 + LAT_FP_MUL) begin failures++; $display("FAIL fp_mul: last result after %0d clocks", fp_mul_last - t0); end
    $display("fp_mul: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, fp_mul_last - t0 + 1, real'(fp_mul_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (fp_div_last - t0 != NCYC - 1 + LAT_FP_DIV) begin failures++; $display("FAIL fp_div: last result after %0d clocks", fp_div_last - t0); end
    $display("fp_div: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, fp_div_last - t0 + 1, real'(fp_div_last - t0 + 1) * 0.01 / real'(NCYC));
    checks++; if (pdf_last - t0 != NCYC - 1 + LAT_PDF) begin failures++; $display("FAIL pdf: last result after %0d clocks", pdf_last - t0); end
    $display("pdf: %0d results in %0d clocks, %.4f us per result at 100 MHz", NCYC, pdf_last - t0 + 1, real'(pdf_last - t0 + 1) * 0.01 / real'(NCYC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 1000) * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
