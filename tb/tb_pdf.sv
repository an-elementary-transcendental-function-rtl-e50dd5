// tb_pdf: self-checking testbench for pdf.
// Checks the normal density against a real-number evaluation of the same formula, to within 4 + 8q ulps where q = (x-mu)^2/(2 sigma^2) is the exponent (the rounding of q is magnified by exp); one result per clock.
// Operands are applied on falling clock edges, with random idle cycles between
// them; every result is matched in order against a queue of the operands sent and
// must appear exactly 69 cycles after its operands (LAT_PDF). Expected values
// come from the real-number functions of the simulator and the integer field
// arithmetic of tb_fp_pkg, not from the design. A watchdog ends a run that hangs.
// The checks are this design's own: the original library gives no test vectors
// beyond the functions themselves and their one-result-per-clock rate.
module tb_pdf;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRAND = 3000;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] x = '0;
  logic [31:0] mu = '0;
  logic [31:0] sigma = '0;
  logic [31:0] y;
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  typedef struct { logic [31:0] x; logic [31:0] mu; logic [31:0] sigma; int t; } item_t;
  item_t q[$];

  pdf dut (.clk, .rst_n, .in_valid, .x, .mu, .sigma, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok(input logic [31:0] i_x, input logic [31:0] i_mu, input logic [31:0] i_sigma, input logic [31:0] o_y);
    real d, q, r;
    d = f2r(i_x) - f2r(i_mu);
    q = d * d / (2.0 * f2r(i_sigma) * f2r(i_sigma));
    r = $exp(-q) / (f2r(i_sigma) * $sqrt(2.0 * 3.14159265358979323846));
    if (r < 1.2e-38) return o_y[30:23] <= 8'd1;
    return ulp_err(o_y, r) <= 4.0 + 8.0 * q;
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
        if (cyc - it.t != 69) begin
          failures++;
          $display("FAIL latency %0d", cyc - it.t);
        end
        if (!ok(it.x, it.mu, it.sigma, y)) begin
          failures++;
          $display("FAIL x=%h mu=%h sigma=%h -> y=%h", it.x, it.mu, it.sigma, y);
        end
      end
    end
  end

  task automatic send(input logic [31:0] i_x, input logic [31:0] i_mu, input logic [31:0] i_sigma);
    @(negedge clk);
    x = i_x;
    mu = i_mu;
    sigma = i_sigma;
    in_valid = 1'b1;
    q.push_back('{i_x, i_mu, i_sigma, cyc});
    sent++;
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom_range(3) == 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(32'h0, 32'h0, 32'h3f80_0000);
    send(32'h3f80_0000, 32'h0, 32'h3f80_0000);
    send(32'h4120_0000, 32'h0, 32'h3f80_0000);
    send(32'h4000_0000, 32'h3f80_0000, 32'h3f00_0000);
    for (int n = 0; n < NRAND; n++) begin
      begin
        logic [31:0] mu_r, sg;
        mu_r = rnd_f32(-4, 4, 1'b1);
        sg   = rnd_f32(-3, 3, 1'b0);
        send(r2f(f2r(mu_r) + f2r(sg) * (real'($urandom_range(1000)) / 125.0 - 4.0)), mu_r, sg);
      end
    end
    repeat (69 + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(99300);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
