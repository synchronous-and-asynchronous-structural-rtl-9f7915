// luk_carry_chain: N-bit ripple-carry adder on the dedicated carry chain.
//
// N luk_fa_cell instances are chained carry-out to carry-in, least
// significant bit first, as the slice carry logic of a Spartan-6 chains them
// (four bits per slice). The result is s = a + b + ci modulo 2^N with the
// (N+1)-th sum bit available as co, the carry out of bit N-1.
// The Łukasiewicz norms use co to decide saturation: the t-conorm adds with
// ci = 0, the t-norm with ci = 1 (adding 1 and dropping the 2^N weight of co
// subtracts 2^N - 1).
//
// Interface: a, b N-bit unsigned operands, ci carry in; s N-bit sum, co carry
// out. Timing: combinational, N carry stages from ci/a/b to co.
module luk_carry_chain #(
  parameter int unsigned N        = luk_pkg::LUK_N,
  parameter logic [3:0]  LUT_INIT = luk_pkg::XOR_LUT_INIT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);

  logic [N:0] carry;

  assign carry[0] = ci;
  assign co       = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    luk_fa_cell #(.LUT_INIT(LUT_INIT)) u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(carry[i]),
      .s (s[i]),
      .co(carry[i+1])
    );
  end

endmodule
