// tb_ldexpf: self-checking testbench for ldexpf.
// Checks frac * 2^e against exact real scaling, including saturation to inf and flush to zero.
// Operands are applied on falling clock edges, with random idle cycles between
// them; every result is matched in order against a queue of the operands sent and
// must appear exactly 2 cycles after its operands (LAT_LDEXP). Expected values
// come from the real-number functions of the simulator and the integer field
// arithmetic of tb_fp_pkg, not from the design. A watchdog ends a run that hangs.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_ldexpf;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRAND = 1000;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] frac = '0;
  logic [31:0] e = '0;
  logic [31:0] y;
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  typedef struct { logic [31:0] frac; logic [31:0] e; int t; } item_t;
  item_t q[$];

  ldexpf dut (.clk, .rst_n, .in_valid, .frac, .e, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok(input logic [31:0] i_frac, input logic [31:0] i_e, input logic [31:0] o_y);
    real r;
    if (i_frac[30:23] == 8'hff) return o_y == i_frac;
    if (i_frac[30:23] == 8'd0) return o_y == {i_frac[31], 31'd0};
    r = f2r(i_frac) * $pow(2.0, real'($signed(i_e)));
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
        if (cyc - it.t != 2) begin
          failures++;
          $display("FAIL latency %0d", cyc - it.t);
        end
        if (!ok(it.frac, it.e, y)) begin
          failures++;
          $display("FAIL frac=%h e=%h -> y=%h", it.frac, it.e, y);
        end
      end
    end
  end

  task automatic send(input logic [31:0] i_frac, input logic [31:0] i_e);
    @(negedge clk);
    frac = i_frac;
    e = i_e;
    in_valid = 1'b1;
    q.push_back('{i_frac, i_e, cyc});
    sent++;
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom_range(3) == 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(32'h3f80_0000, 32'd127);
    send(32'h3f80_0000, 32'd128);
    send(32'h3f80_0000, -32'sd126);
    send(32'h3f80_0000, -32'sd127);
    send(32'hbfc0_0000, 32'h7fff_ffff);
    send(32'h3fc0_0000, 32'h8000_0000);
    send(32'h0, 32'd5);
    send(32'h7f80_0000, -32'sd3);
    for (int n = 0; n < NRAND; n++) begin
      send(rnd_f32(-126, 127, 1'b1), 32'(int'($urandom_range(400)) - 200));
    end
    repeat (2 + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(41330);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
