// rand6: pipelined rand(): THREADS = 6 independent copies of the mingw32 linear
// congruential generator (state = state * 214013 + 2531011, rnd = bits 30..16)
// share one six-stage ring, so the feedback loop of each thread passes through six
// registers and the multiply-add is cut into short pieces:
//   stage 0..3  acc += byte j of the state * 214013 << 8j   (one byte per stage)
//   stage 4     new state = acc + 2531011
//   stage 5     output register: rnd and thread number; feeds stage 0 again
// Every clock one thread completes an update, so one number leaves per cycle.
// Thread t is seeded with seed + t (reset uses seed 1). After a load the ring
// holds thread t in stage t, with the partial sums of stage t already formed, so
// the output order is thread 5, 4, 3, 2, 1, 0, 5, ... and each thread's numbers
// are exactly rand() of the C library after srand(seed + t). out_valid is high
// from the clock after a load; after reset it rises one clock after reset is
// released, by which time thread 5's first number has been passed over.
// Six threads of the mingw32 generator on a pipeline follow the original core; the
// split of the multiply-add over the stages, the seeding with seed + t and the
// output order are this design's choices.
module rand6 #(
  parameter int THREADS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [31:0] seed,
  output logic        out_valid,
  output logic [14:0] rnd,
  output logic [2:0]  thread
);
  localparam logic [31:0] LCG_A = 32'd214013;
  localparam logic [31:0] LCG_C = 32'd2531011;

  typedef struct packed {
    logic [2:0]  tid;
    logic [31:0] s;      // state being advanced (stages 0..3) or new state (4, 5)
    logic [31:0] acc;    // partial product
  } slot_t;

  slot_t r [THREADS];

  // Contents of stage k right after thread t = k has been seeded with s0.
  function automatic slot_t seed_slot(input int k, input logic [31:0] s0);
    slot_t v;
    v.tid = 3'(k);
    v.s   = s0;
    v.acc = '0;
    if (k <= 3) v.acc = 32'((64'(s0) & ((64'd1 << (8 * (k + 1))) - 64'd1)) * 64'(LCG_A));
    else        v.s   = s0 * LCG_A + LCG_C;
    return v;
  endfunction

  initial assert (THREADS == 6) else $error("rand6: the ring is laid out for six stages");

  always_ff @(posedge clk) begin
    if (!rst_n || seed_load) begin
      for (int k = 0; k < THREADS; k++) r[k] <= seed_slot(k, (rst_n ? seed : 32'd1) + 32'(k));
      out_valid <= rst_n;              // a load leaves thread 5's first number ready
    end else begin
      r[0].tid <= r[5].tid;  r[0].s <= r[5].s;  r[0].acc <= 32'(r[5].s[7:0]) * LCG_A;
      for (int j = 1; j < 4; j++) begin
        r[j].tid <= r[j-1].tid;
        r[j].s   <= r[j-1].s;
        r[j].acc <= r[j-1].acc + ((32'(r[j-1].s[8*j +: 8]) * LCG_A) << (8 * j));
      end
      r[4].tid <= r[3].tid;  r[4].s <= r[3].acc + LCG_C;  r[4].acc <= '0;
      r[5]     <= r[4];
      out_valid <= 1'b1;
    end
  end

  assign rnd    = r[5].s[30:16];
  assign thread = r[5].tid;
endmodule
