// luk_tconorm: combinational Łukasiewicz t-conorm (bounded sum),
// q = min(a + b, 1) with 1 = 2^N - 1.
//
// The operands go through a carry-chain adder with carry in 0. If the sum
// does not fit in N bits the carry out is 1, and a row of OR gates forces
// every result bit to 1; otherwise the N sum bits pass unchanged. The
// resource cost is the adder plus one OR per bit.
//
// Interface: a, b N-bit fuzzy values; q N-bit result.
// Timing: combinational.
module luk_tconorm #(
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
    .ci(1'b0),
    .s (sum),
    .co(carry_n)
  );

  always_comb q = sum | {N{carry_n}};

endmodule
