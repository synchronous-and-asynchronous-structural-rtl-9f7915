// luk_tnorm_latch: asynchronous (clockless) Łukasiewicz t-norm,
// q = max(a + b - 1, 0), with its output held in latches.
//
// The adder runs with carry in 1 and each sum bit drives the D input of a
// level-sensitive latch with an asynchronous clear (the LDC arrangement).
// The clear must act when the carry out is 0, and since the storage elements
// only have active-high set/reset inputs, an inverter drives it from the
// carry out, as in the synchronous t-norm. Only the latch t-conorm is laid
// out in the source design; this t-norm is built by that analogy. The gate
// g is shared by all latches and is tied to 1 in normal use, making the block
// a clockless norm; g = 0 holds the last result, while a clear still forces
// zeros. Keeping g as a port rather than a constant is this design's choice.
// The latches are intended, which is why this module infers latches.
//
// Interface: g latch gate (1 = transparent); a, b N-bit fuzzy values;
// q N-bit result. Timing: combinational from a, b to q while g = 1.
module luk_tnorm_latch #(
  parameter int unsigned N = luk_pkg::LUK_N
) (
  input  logic         g,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] q
);

  logic [N-1:0] sum;
  logic         carry_n;
  logic         not_carry_n;

  luk_carry_chain #(.N(N)) u_add (
    .a (a),
    .b (b),
    .ci(1'b1),
    .s (sum),
    .co(carry_n)
  );

  always_comb not_carry_n = ~carry_n;

  // Latches with asynchronous clear (clear has priority over the gate).
  always_latch begin
    if (not_carry_n) q = '0;
    else if (g)      q = sum;
  end

endmodule
