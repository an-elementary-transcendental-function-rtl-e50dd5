// tb_rand_ms_i: self-checking testbench for rand_ms_i.
// The first numbers after the default seed must be the well-known C runtime values
// 41, 18467, 6334, 26500, 19169; then random seed loads and random next pulses are
// checked against a software model of the same recurrence, including that a number
// appears exactly one cycle after each next pulse and never otherwise.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_rand_ms_i;
  logic clk = 1'b0, rst_n = 1'b0, seed_load = 1'b0, next = 1'b0, out_valid;
  logic [31:0] seed = '0;
  logic [14:0] rnd;
  int checks = 0, failures = 0;
  logic [31:0] model = 32'd1;
  int unsigned known [5] = '{41, 18467, 6334, 26500, 19169};

  rand_ms_i dut (.clk, .rst_n, .seed_load, .seed, .next, .out_valid, .rnd);
  always #5 clk = ~clk;

  task automatic step(input bit ld, input bit nx, input logic [31:0] sd, input int exp_known);
    logic [14:0] want;
    @(negedge clk);
    seed_load = ld; next = nx; seed = sd;
    @(negedge clk);
    seed_load = 1'b0; next = 1'b0;
    if (ld) model = sd;
    else if (nx) begin
      model = model * 32'd214013 + 32'd2531011;
      want  = model[30:16];
      checks++;
      if (!out_valid || rnd != want || (exp_known >= 0 && int'(rnd) != exp_known)) begin
        failures++;
        $display("FAIL rnd=%0d want=%0d valid=%b", rnd, want, out_valid);
      end
    end
    if (!nx || ld) begin
      checks++;
      if (out_valid) begin failures++; $display("FAIL: valid without next"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5; i++) step(1'b0, 1'b1, '0, int'(known[i]));
    for (int i = 0; i < 3000; i++) begin
      int c;
      c = int'($urandom_range(19));
      if (c == 0) step(1'b1, 1'b0, $urandom, -1);
      else if (c < 4) step(1'b0, 1'b0, '0, -1);
      else step(1'b0, 1'b1, '0, -1);
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
