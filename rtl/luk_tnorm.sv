// luk_tnorm: combinational Łukasiewicz t-norm (bounded difference),
// q = max(a + b - 1, 0) with 1 = 2^N - 1.
//
// The operands go through a carry-chain adder with carry in tied to 1, so
// the (N+1)-bit result is a + b + 1. When a + b >= 2^N - 1 the carry out is 1
// and the low N bits are exactly a + b + 1 - 2^N = a + b - (2^N - 1); when the
// carry out is 0 the true result is below zero and a row of AND gates clears
// every bit. The resource cost is the adder plus one AND per bit.
//
// Interface: a, b N-bit fuzzy values; q N-bit result.
// Timing: combinational.
module luk_tnorm #(
  parameter int unsigned N = luk_pkg::LUK_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] q
);

  logic [N-1:0] sum;
  logic         carry_n;

  luk_carry_chain #(.N(N)) u_add (
    .a (a),
    .b (b),
    .ci(1'b1),
    .s (sum),
    .co(carry_n)
  );

  always_comb q = sum & {N{carry_n}};

endmodule
