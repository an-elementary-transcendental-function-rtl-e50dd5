// tb_modff: self-checking testbench for modff.
// Checks the integer part against truncation toward zero and the fraction against the exact difference, with the sign of x on both.
// Operands are applied on falling clock edges, with random idle cycles between
// them; every result is matched in order against a queue of the operands sent and
// must appear exactly 2 cycles after its operands (LAT_MODF). Expected values
// come from the real-number functions of the simulator and the integer field
// arithmetic of tb_fp_pkg, not from the design. A watchdog ends a run that hangs.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_modff;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRAND = 1500;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] x = '0;
  logic [31:0] ipart;
  logic [31:0] fpart;
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  typedef struct { logic [31:0] x; int t; } item_t;
  item_t q[$];

  modff dut (.clk, .rst_n, .in_valid, .x, .out_valid, .ipart, .fpart);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok(input logic [31:0] i_x, input logic [31:0] o_ipart, input logic [31:0] o_fpart);
    real v, ip;
    if (is_nan(i_x)) return is_nan(o_ipart) && is_nan(o_fpart);
    if (i_x[30:23] == 8'hff) return o_ipart == i_x && o_fpart == {i_x[31], 31'd0};
    v = f2r(i_x);
    if (i_x[30:23] >= 8'd150) ip = v;
    else ip = real'($rtoi(v));
    return f2r(o_ipart) == ip && f2r(o_fpart) == v - ip
           && o_ipart[31] == i_x[31] && o_fpart[31] == i_x[31];
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
        if (!ok(it.x, ipart, fpart)) begin
          failures++;
          $display("FAIL x=%h -> ipart=%h fpart=%h", it.x, ipart, fpart);
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
    send(32'hff80_0000);
    send(32'h7fc0_0000);
    send(32'h3f00_0000);
    send(32'hbfc0_0000);
    send(32'h4b00_0001);
    send(32'h4affffff);
    for (int n = 0; n < NRAND; n++) begin
      send(rnd_f32(-30, 30, 1'b1));
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
    #(53720);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
