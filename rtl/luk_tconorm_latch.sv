// luk_tconorm_latch: asynchronous (clockless) Łukasiewicz t-conorm,
// q = min(a + b, 1), with its output held in latches.
//
// The OR gates of the combinational t-conorm are replaced by the slice
// storage elements configured as level-sensitive latches with an
// asynchronous preset (the LDP arrangement): each sum bit drives a latch D
// input and the adder's carry out drives every preset, so an overflowing sum
// forces all ones at once. The gate input g is shared by all latches; the
// published realization ties it to 1, which makes the latches transparent
// and the block a clockless norm of adder size. Holding the output with
// g = 0 is kept as a port so that the latch can be used as a store; a preset
// still forces all ones while g = 0.
// The latches are intended, which is why this module infers latches; glitches
// on the carry out propagate to q while the sum settles.
//
// Interface: g latch gate (1 = transparent); a, b N-bit fuzzy values;
// q N-bit result. Timing: combinational from a, b to q while g = 1.
module luk_tconorm_latch #(
  parameter int unsigned N = luk_pkg::LUK_N
) (
  input  logic         g,
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

  // Latches with asynchronous preset (preset has priority over the gate).
  always_latch begin
    if (carry_n) q = '1;
    else if (g)  q = sum;
  end

endmodule
