// valid_pipe: the valid bit of a fixed-latency pipeline, DEPTH registers with
// synchronous active-low reset so that no result is reported before real data
// has travelled through the datapath.
// A generic helper of this design; the valid-only handshake is its own choice.
module valid_pipe #(
  parameter int DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [DEPTH-1:0] sr;
  always_ff @(posedge clk) begin
    if (!rst_n) sr <= '0;
    else begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end
  assign q = sr[DEPTH-1];
endmodule
