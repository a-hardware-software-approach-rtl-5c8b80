// pipe_delay: a W-bit signal delayed by N clock cycles (N >= 1), used to
// carry operands alongside the floating-point stages of the force pipeline.
// No reset: the values are only used together with a separately reset
// valid bit.
module pipe_delay #(
    parameter int unsigned W = 32,
    parameter int unsigned N = 1
) (
    input  logic         clk,
    input  logic [W-1:0] d,
    output logic [W-1:0] q
);

  logic [W-1:0] sr[N];

  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int k = 1; k < N; k++) sr[k] <= sr[k-1];
  end

  assign q = sr[N-1];

endmodule
