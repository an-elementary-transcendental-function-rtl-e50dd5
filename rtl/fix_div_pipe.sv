// fix_div_pipe: pipelined unsigned restoring divider, one quotient bit per stage.
// It requires num < 2*den and returns q = floor(num/den * 2^(QB-1)), so the MSB of
// q weighs 2^0, plus a sticky bit that is 1 when the remainder is not zero. A TW-bit
// tag travels alongside so that callers can carry exponents and signs with the
// quotient. Latency QB cycles, one division per clock.
// The original log core calls for a division to form r but does not say how; the
// one-bit-per-stage restoring divider is this design's choice.
module fix_div_pipe #(
  parameter int WD = 24,   // divisor width
  parameter int QB = 26,   // quotient bits = pipeline stages
  parameter int TW = 1     // tag width
) (
  input  logic          clk,
  input  logic [WD:0]   num,
  input  logic [WD-1:0] den,
  input  logic [TW-1:0] tag_in,
  output logic [QB-1:0] q,
  output logic          sticky,
  output logic [TW-1:0] tag_out
);
  logic [WD+1:0]   rem [QB+1];
  logic [WD-1:0]   dv  [QB+1];
  logic [QB-1:0]   qq  [QB+1];
  logic [TW-1:0]   tg  [QB+1];

  assign rem[0] = {1'b0, num};
  assign dv[0]  = den;
  assign qq[0]  = '0;
  assign tg[0]  = tag_in;

  for (genvar i = 0; i < QB; i++) begin : g_stage
    always_ff @(posedge clk) begin
      logic ge;
      ge = rem[i] >= {2'b0, dv[i]};
      rem[i+1] <= (ge ? rem[i] - {2'b0, dv[i]} : rem[i]) << 1;
      qq[i+1]  <= {qq[i][QB-2:0], ge};
      dv[i+1]  <= dv[i];
      tg[i+1]  <= tg[i];
    end
  end

  assign q       = qq[QB];
  assign sticky  = rem[QB] != '0;
  assign tag_out = tg[QB];
endmodule
