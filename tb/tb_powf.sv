// tb_powf: self-checking testbench for powf.
// Checks results against the real pow() to within 1 + |y ln x|/64 ulps (the argument of exp is exact to 2^-30), plus every special case listed in the module header.
// Operands are applied on falling clock edges, with random idle cycles between
// them; every result is matched in order against a queue of the operands sent and
// must appear exactly 58 cycles after its operands (LAT_POWF). Expected values
// come from the real-number functions of the simulator and the integer field
// arithmetic of tb_fp_pkg, not from the design. A watchdog ends a run that hangs.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_powf;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRAND = 3000;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] x = '0;
  logic [31:0] yexp = '0;
  logic [31:0] y;
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  typedef struct { logic [31:0] x; logic [31:0] yexp; int t; } item_t;
  item_t q[$];

  powf dut (.clk, .rst_n, .in_valid, .x, .yexp, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok(input logic [31:0] i_x, input logic [31:0] i_yexp, input logic [31:0] o_y);
    real a, b, r, t;
    if (i_yexp[30:23] == 0) return o_y == F32_ONE;
    if (is_nan(i_x) || is_nan(i_yexp) || (i_x[31] && i_x[30:23] != 0)) return is_nan(o_y);
    if (i_x[30:23] == 0) return o_y == (i_yexp[31] ? F32_PINF : 32'h0);
    if (is_inf(i_x)) return o_y == (i_yexp[31] ? 32'h0 : F32_PINF);
    if (is_inf(i_yexp)) begin
      if (i_x == F32_ONE) return o_y == F32_ONE;
      return o_y == (((f2r(i_x) > 1.0) == !i_yexp[31]) ? F32_PINF : 32'h0);
    end
    a = f2r(i_x);
    b = f2r(i_yexp);
    t = b * $ln(a);
    r = $pow(a, b);
    if (t > 88.7228) return o_y == F32_PINF || (t < 88.7229 && ulp_err(o_y, r) < 4.0);
    if (t < -87.3365) return o_y == 32'h0 || o_y[30:23] == 8'd1;
    return ulp_err(o_y, r) <= 1.0 + (t < 0.0 ? -t : t) / 64.0;
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
        if (cyc - it.t != 58) begin
          failures++;
          $display("FAIL latency %0d", cyc - it.t);
        end
        if (!ok(it.x, it.yexp, y)) begin
          failures++;
          $display("FAIL x=%h yexp=%h -> y=%h", it.x, it.yexp, y);
        end
      end
    end
  end

  task automatic send(input logic [31:0] i_x, input logic [31:0] i_yexp);
    @(negedge clk);
    x = i_x;
    yexp = i_yexp;
    in_valid = 1'b1;
    q.push_back('{i_x, i_yexp, cyc});
    sent++;
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom_range(3) == 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(32'h4000_0000, 32'h4120_0000);
    send(32'h4000_0000, 32'h0);
    send(32'h7fc0_0000, 32'h0);
    send(32'h0, 32'h3f80_0000);
    send(32'h0, 32'hbf80_0000);
    send(32'hc000_0000, 32'h4000_0000);
    send(32'h7f80_0000, 32'h3f00_0000);
    send(32'h7f80_0000, 32'hbf00_0000);
    send(32'h3f80_0000, 32'h7f80_0000);
    send(32'h4000_0000, 32'h7f80_0000);
    send(32'h3f00_0000, 32'h7f80_0000);
    send(32'h4000_0000, 32'hff80_0000);
    send(32'h4000_0000, 32'h4300_0000);
    send(32'h4000_0000, 32'hc300_0000);
    send(32'h4120_0000, 32'h4220_0000);
    send(32'h7fc0_0000, 32'h3f80_0000);
    send(32'h3f80_0000, 32'h4f00_0000);
    for (int n = 0; n < NRAND; n++) begin
      send(rnd_f32(-20, 20, 1'b0), rnd_f32(-10, 2, 1'b1));
    end
    repeat (58 + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(112990);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
