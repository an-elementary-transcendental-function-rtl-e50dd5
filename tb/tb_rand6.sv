// tb_rand6: self-checking testbench for rand6.
// After each seed load, thread t must produce exactly the C runtime rand() sequence
// of seed + t, the threads must leave in the order 5, 4, ..., 0 repeating, and one
// number must leave on every clock (throughput check). With seed 0, thread 1 is
// seeded with 1 and must begin 41, 18467, 6334.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_rand6;
  logic clk = 1'b0, rst_n = 1'b0, seed_load = 1'b0, out_valid;
  logic [31:0] seed = '0;
  logic [14:0] rnd;
  logic [2:0]  thread;
  int checks = 0, failures = 0;
  logic [31:0] model [6];
  int          cnt [6];
  int unsigned known [3] = '{41, 18467, 6334};

  rand6 dut (.clk, .rst_n, .seed_load, .seed, .out_valid, .rnd, .thread);
  always #5 clk = ~clk;

  task automatic load(input logic [31:0] sd);
    @(negedge clk);
    seed_load = 1'b1; seed = sd;
    @(negedge clk);
    seed_load = 1'b0;
    for (int t = 0; t < 6; t++) begin model[t] = sd + 32'(t); cnt[t] = 0; end
  endtask

  task automatic run(input int n);
    int expect_tid;
    expect_tid = 5;
    for (int i = 0; i < n; i++) begin
      logic [14:0] want;
      int t;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: no number in cycle %0d", i); end
      t = int'(thread);
      if (t != expect_tid) begin failures++; $display("FAIL thread %0d want %0d", t, expect_tid); end
      model[t] = model[t] * 32'd214013 + 32'd2531011;
      want = model[t][30:16];
      if (rnd != want) begin failures++; $display("FAIL t=%0d rnd=%0d want=%0d", t, rnd, want); end
      if (seed == 0 && t == 1 && cnt[1] < 3 && int'(rnd) != int'(known[cnt[1]])) begin
        failures++; $display("FAIL known value %0d", rnd);
      end
      cnt[t]++;
      expect_tid = (expect_tid == 0) ? 5 : expect_tid - 1;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load(32'd0);
    run(60);
    for (int k = 0; k < 20; k++) begin
      load($urandom);
      run(6 * int'($urandom_range(40, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
