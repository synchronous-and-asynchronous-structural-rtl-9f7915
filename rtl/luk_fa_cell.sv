// luk_fa_cell: one bit of a carry-chain ripple adder, built the way a
// Spartan-6 slice builds it.
//
// A two-input look-up table forms the propagate term p = a xor b (its truth
// table is the LUT_INIT parameter, XOR by default). A dedicated XOR gate
// (XORCY) forms the sum s = p xor ci, and the carry multiplexer (MUXCY)
// passes the incoming carry when p is 1 and the operand bit a otherwise:
// co = p ? ci : a, which equals a*b + ci*(a xor b). The split into these three
// elements follows the FPGA structure; the generate term g = a*b is never
// formed explicitly because the multiplexer's data input a equals it whenever
// p is 0.
//
// Interface: a, b operand bits, ci carry in; s sum bit, co carry out.
// Timing: purely combinational.
module luk_fa_cell #(
  parameter logic [3:0] LUT_INIT = luk_pkg::XOR_LUT_INIT
) (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  // Function generator: LUT2 indexed by {b, a}.
  always_comb p = LUT_INIT[{b, a}];

  // XORCY and MUXCY of the carry logic.
  always_comb begin
    s  = p ^ ci;
    co = p ? ci : a;
  end

endmodule
