// ldexpf: builds frac * 2^e by adding the signed integer e to the exponent field of
// frac, like the C library ldexpf. Stage 1 forms the new biased exponent in 34-bit
// arithmetic so no overflow of e can wrap; stage 2 saturates to signed infinity
// above the binary32 range and flushes to signed zero below 2^-126.
// Zero, inf and NaN inputs pass through. Latency LAT_LDEXP = 2, one operand per clock.
// The function follows C's ldexpf as the original library lists it; saturation,
// the subnormal flush and the two-clock timing are this design's choices.
module ldexpf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] frac,
  input  logic [31:0] e,
  output logic        out_valid,
  output logic [31:0] y
);
  logic signed [33:0] ne_q;
  logic [31:0]        f_q;
  logic               pass_q;

  always_ff @(posedge clk) begin
    f_q    <= frac;
    pass_q <= is_zero(frac) || frac[30:23] == 8'hff;
    ne_q   <= 34'(signed'({1'b0, frac[30:23]})) + 34'(signed'(e));
  end

  always_ff @(posedge clk) begin
    if (is_zero(f_q))    y <= {f_q[31], 31'd0};
    else if (pass_q)     y <= f_q;
    else if (ne_q >= 34'sd255) y <= {f_q[31], 8'hff, 23'd0};
    else if (ne_q <= 34'sd0)   y <= {f_q[31], 31'd0};
    else                 y <= {f_q[31], ne_q[7:0], f_q[22:0]};
  end
  valid_pipe #(.DEPTH(LAT_LDEXP)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
