// modff: splits x into an integer part and a fractional part, both binary32 with the
// sign of x, like the C library modff. Stage 1 masks the mantissa bits below the
// binary point (150 - biased exponent of them) to form the integer part and keeps
// those bits as the fraction; stage 2 normalises the fraction with a leading-zero
// count. |x| >= 2^23 is integral (fraction +-0); |x| < 1 has integer part +-0.
// modff(+-inf) = (+-inf, +-0); NaN gives NaN in both outputs.
// Latency LAT_MODF = 2, one operand per clock.
// The function follows C's modff as the original library lists it; the mask-based
// datapath and its timing are this design's own.
module modff
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] ipart,
  output logic [31:0] fpart
);
  logic [31:0] ip_q;
  logic [31:0] x_q;
  logic [22:0] fb_q;      // mantissa bits below the binary point; bit 0 weighs 2^(e-23)
  logic signed [9:0] e_q; // unbiased exponent of x
  logic        s_q, nan_q, whole_q;

  always_ff @(posedge clk) begin
    logic [22:0] mask;
    int nf;
    x_q   <= x;
    s_q   <= x[31];
    nan_q <= is_nan(x);
    e_q   <= 10'(signed'({2'b0, x[30:23]}) - 127);
    nf     = 150 - int'(x[30:23]);            // number of fraction bits in mantissa
    mask   = (nf >= 23) ? 23'h7f_ffff : ((23'd1 << nf) - 23'd1);
    whole_q <= 1'b0;
    fb_q    <= '0;
    if (is_zero(x) || is_nan(x)) begin
      ip_q <= is_nan(x) ? F32_QNAN : {x[31], 31'd0};
    end else if (x[30:23] >= 8'd150) begin   // integral, includes inf
      ip_q <= x;
    end else if (x[30:23] < 8'd127) begin    // |x| < 1
      ip_q    <= {x[31], 31'd0};
      whole_q <= 1'b1;
    end else begin
      ip_q <= {x[31:23], x[22:0] & ~mask};
      fb_q <= x[22:0] & mask;
    end
  end

  // Fraction value: whole_q -> x itself; else fb_q * 2^(e-23).
  always_ff @(posedge clk) begin
    ipart <= ip_q;
    if (nan_q)        fpart <= F32_QNAN;
    else if (whole_q) fpart <= x_q;
    else              fpart <= fix_to_f32(s_q, {41'd0, fb_q}, int'(e_q) + 40);
  end
  valid_pipe #(.DEPTH(LAT_MODF)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
