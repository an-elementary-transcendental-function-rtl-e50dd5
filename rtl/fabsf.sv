// fabsf: magnitude of a binary32 number. The sign bit is cleared and the result is
// registered once (latency LAT_FABS = 1, one operand per clock). NaNs keep their
// payload with the sign cleared, as the C library fabsf does.
// The function is the C library's, as the original library lists it; the one-clock
// register stage is this design's choice.
module fabsf
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);
  always_ff @(posedge clk) y <= {1'b0, x[30:0]};
  valid_pipe #(.DEPTH(LAT_FABS)) u_v (.clk, .rst_n, .d(in_valid), .q(out_valid));
endmodule
