// tb_fp_add: self-checking testbench for fp_add.
// Checks every sum and difference bit-exactly against the exact real result rounded to nearest even (exponents kept close enough for the double sum to be exact), plus cancellation, zeros and infinities.
// Operands are applied on falling clock edges, with random idle cycles between
// them; every result is matched in order against a queue of the operands sent and
// must appear exactly 4 cycles after its operands (LAT_FP_ADD). Expected values
// come from the real-number functions of the simulator and the integer field
// arithmetic of tb_fp_pkg, not from the design. A watchdog ends a run that hangs.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_fp_add;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRAND = 3000;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] a = '0;
  logic [31:0] b = '0;
  logic [0:0] sub = '0;
  logic [31:0] y;
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  typedef struct { logic [31:0] a; logic [31:0] b; logic [0:0] sub; int t; } item_t;
  item_t q[$];

  fp_add dut (.clk, .rst_n, .in_valid, .a, .b, .sub, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok(input logic [31:0] i_a, input logic [31:0] i_b, input logic [0:0] i_sub, input logic [31:0] o_y);
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

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result without operands");
      end else begin
        item_t it;
        it = q.pop_front();
        checks++;
        if (cyc - it.t != 4) begin
          failures++;
          $display("FAIL latency %0d", cyc - it.t);
        end
        if (!ok(it.a, it.b, it.sub, y)) begin
          failures++;
          $display("FAIL a=%h b=%h sub=%h -> y=%h", it.a, it.b, it.sub, y);
        end
      end
    end
  end

  task automatic send(input logic [31:0] i_a, input logic [31:0] i_b, input logic [0:0] i_sub);
    @(negedge clk);
    a = i_a;
    b = i_b;
    sub = i_sub;
    in_valid = 1'b1;
    q.push_back('{i_a, i_b, i_sub, cyc});
    sent++;
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom_range(3) == 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(32'h3f80_0000, 32'h3f80_0000, 1'b1);
    send(32'h8000_0000, 32'h0, 1'b1);
    send(32'h7f80_0000, 32'h7f80_0000, 1'b1);
    send(32'h3f80_0000, 32'h3380_0000, 1'b0);
    send(32'h3f80_0000, 32'h3380_0001, 1'b0);
    send(32'h3f80_0000, 32'h3300_0000, 1'b1);
    send(32'h7f7f_ffff, 32'h7f7f_ffff, 1'b0);
    send(32'h4000_0000, 32'h3fff_ffff, 1'b1);
    send(32'h3f80_0000, 32'h0, 1'b0);
    for (int n = 0; n < NRAND; n++) begin
      send(rnd_f32(-10, 10, 1'b1), rnd_f32(-10, 10, 1'b1), 1'($urandom));
    end
    repeat (4 + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(104950);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
