// luk_tconorm_sync: synchronous Łukasiewicz t-conorm, q = min(a + b, 1)
// registered on the rising clock edge.
//
// The OR gates of the combinational t-conorm are replaced by the slice
// flip-flops themselves: each sum bit feeds the D input of a flip-flop whose
// synchronous set is driven by the adder's carry out (the FDS arrangement).
// An overflowing sum therefore loads all ones, any other sum loads the sum,
// and the whole norm fits in the area of the adder, N/4 slices.
// The flip-flops have no other reset: as in the FPGA, their power-up state
// is whatever the configuration gives, and the first clock edge defines q.
//
// Interface: clk; a, b N-bit fuzzy values; q N-bit registered result.
// Timing: one clock of latency; a, b must be stable a set-up time before the
// edge, q holds the result of the operands sampled at the last edge.
module luk_tconorm_sync #(
  parameter int unsigned N = luk_pkg::LUK_N
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] q
);

  logic [N-1:0] sum;
  logic         carry_n;

  luk_carry_chain #(.N(N)) u_add (
    .a (a),
    .b (b),
    .ci(1'b0),
    .s (sum),
    .co(carry_n)
  );

  // Flip-flops with synchronous set (set has priority over D).
  always_ff @(posedge clk) begin
    if (carry_n) q <= '1;
    else         q <= sum;
  end

endmodule
