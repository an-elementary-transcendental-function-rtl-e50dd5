// sqrtf: pipelined binary32 square root, correctly rounded (nearest even).
// Stage 1 unpacks x and makes the exponent even by doubling the significand when
// needed, giving a radicand X = M * 2^25 of up to 50 bits. Then 25 stages of the
// restoring square-root recurrence each decide one root bit, from 2^24 down to
// 2^0: bit i is kept when rem >= (R << (i+1)) + 2^(2i), with rem = X - R^2.
// The 25-bit root holds the leading one, 23 mantissa bits and a guard bit; the
// final stage rounds with the remainder as sticky. sqrt(-0) = -0, sqrt(+inf) =
// +inf, negative numbers and NaN give NaN. Latency LAT_SQRT = 27, one per clock.
// The original library lists sqrtf and its one-result-per-clock speed but not its
// method; the restoring digit recurrence is this design's choice.
module sqrtf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  localparam int RB = 25;                 // root bits = recurrence stages
  typedef struct packed {
    logic              spec;
    logic [31:0]       spv;
    logic signed [8:0] e;                 // unbiased exponent of the result
  } tag_t;

  logic [2*RB:0]  rem [RB+1];
  logic [RB-1:0]  root[RB+1];
  tag_t           tg  [RB+1];

  always_ff @(posedge clk) begin
    logic signed [9:0] eu;
    logic [24:0] m;
    eu = 10'(signed'({2'b0, x[30:23]}) - 127);
    m  = {1'b0, 1'b1, x[22:0]};
    if (eu[0]) begin                      // odd exponent: double the significand
      m  = m << 1;
      eu = eu - 10'sd1;
    end
    rem[0]  <= {1'b0, m, 25'd0};
    root[0] <= '0;
    tg[0].e <= 9'(eu >>> 1);
    tg[0].spec <= 1'b1;
    if (is_nan(x) || (x[31] && !is_zero(x))) tg[0].spv <= F32_QNAN;
    else if (is_zero(x))                   tg[0].spv <= {x[31], 31'd0};
    else if (is_inf(x))                    tg[0].spv <= x;
    else begin
      tg[0].spec <= 1'b0;
      tg[0].spv  <= '0;
    end
  end

  for (genvar k = 0; k < RB; k++) begin : g_stage
    localparam int I = RB - 1 - k;        // root bit decided in this stage
    always_ff @(posedge clk) begin
      logic [2*RB:0] t;
      t = ({{(RB+1){1'b0}}, root[k]} << (I + 1)) + ((2*RB+1)'(1) << (2 * I));
      if (rem[k] >= t) begin
        rem[k+1]  <= rem[k] - t;
        root[k+1] <= root[k] | (RB'(1) << I);
      end else begin
        rem[k+1]  <= rem[k];
        root[k+1] <= root[k];
      end
      tg[k+1] <= tg[k];
    end
  end

  // Root bit 24 weighs 2^e.
  always_ff @(posedge clk) begin
    if (tg[RB].spec) y <= tg[RB].spv;
    else y <= fix_to_f32(1'b0, {root[RB], rem[RB] != '0, 38'd0}, int'(tg[RB].e));
  end
  valid_pipe #(.DEPTH(LAT_SQRT)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
