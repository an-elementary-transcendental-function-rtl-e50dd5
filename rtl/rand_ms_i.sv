// rand_ms_i: iterative pseudo-random number generator that reproduces the rand()
// of the mingw32 C runtime, a linear congruential generator
//   state = state * 214013 + 2531011 (mod 2^32),   rnd = (state >> 16) & 0x7fff.
// One register holds the state, so the whole multiply-add lies inside a single
// clock cycle; this is the slow, exact form. seed_load sets the state (srand),
// next advances it and registers the new number, valid one cycle later.
// Reset leaves the state at 1, the C library's default seed.
// Matching the mingw32 rand() exactly follows the original core; the ports and the
// seed handling are this design's choices.
module rand_ms_i (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [31:0] seed,
  input  logic        next,
  output logic        out_valid,
  output logic [14:0] rnd
);
  localparam logic [31:0] LCG_A = 32'd214013;
  localparam logic [31:0] LCG_C = 32'd2531011;

  logic [31:0] state, nxt;
  assign nxt = state * LCG_A + LCG_C;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= 32'd1;
      out_valid <= 1'b0;
      rnd       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (seed_load) begin
        state <= seed;
      end else if (next) begin
        state     <= nxt;
        rnd       <= nxt[30:16];
        out_valid <= 1'b1;
      end
    end
  end
endmodule
