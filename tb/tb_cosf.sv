// tb_cosf: self-checking testbench for cosf.
// Checks results against the real cos() to within one ulp, or 2e-11 absolute next to the zeros of cos, over |x| < 2^24, plus tiny, huge, inf and NaN arguments.
// Operands are applied on falling clock edges, with random idle cycles between
// them; every result is matched in order against a queue of the operands sent and
// must appear exactly 8 cycles after its operands (LAT_TRIG). Expected values
// come from the real-number functions of the simulator and the integer field
// arithmetic of tb_fp_pkg, not from the design. A watchdog ends a run that hangs.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_cosf;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRAND = 3000;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] x = '0;
  logic [31:0] y;
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  typedef struct { logic [31:0] x; int t; } item_t;
  item_t q[$];

  cosf dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok(input logic [31:0] i_x, input logic [31:0] o_y);
    real v, r;
    int e;
    e = int'(i_x[30:23]) - 127;
    if (i_x[30:23] == 8'hff || e >= 24) return is_nan(o_y);
    v = f2r(i_x);
    r = $cos(v);
    if (e < -12) return o_y == F32_ONE;
    return ulp_err(o_y, r) < 1.0 || (f2r(o_y) - r < 2.0e-11 && r - f2r(o_y) < 2.0e-11);
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result without operands");
      end else begin
        item_t it;
        it = q.pop_front();
        checks++;
        if (cyc - it.t != 8) begin
          failures++;
          $display("FAIL latency %0d", cyc - it.t);
        end
        if (!ok(it.x, y)) begin
          failures++;
          $display("FAIL x=%h -> y=%h", it.x, y);
        end
      end
    end
  end

  task automatic send(input logic [31:0] i_x);
    @(negedge clk);
    x = i_x;
    in_valid = 1'b1;
    q.push_back('{i_x, cyc});
    sent++;
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom_range(3) == 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(32'h0);
    send(32'h8000_0000);
    send(32'h3f80_0000);
    send(32'hbf80_0000);
    send(32'h3fc9_0fdb);
    send(32'h4049_0fdb);
    send(32'h40c9_0fdb);
    send(32'h3900_0000);
    send(32'h3980_0000);
    send(32'hb980_0000);
    send(32'h4b7f_ffff);
    send(32'h4b80_0000);
    send(32'h7f80_0000);
    send(32'h7fc0_0000);
    send(32'h4700_0000);
    send(32'h3f49_0fdb);
    for (int n = 0; n < NRAND; n++) begin
      if (n % 8 == 0) send(rnd_f32(-12, 23, 1'b1));
      else send(rnd_f32(-12, 8, 1'b1));
    end
    repeat (8 + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(104810);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
