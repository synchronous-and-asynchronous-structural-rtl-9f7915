// luk_pkg: constants shared by the Łukasiewicz norm modules.
//
// Fuzzy truth values are unsigned N-bit numbers: all zeros is logical 0 and
// all ones (2^N - 1) is logical 1. LUK_N is the default resolution of the
// structural norms (8 bits, the default of the published structural t-conorm).
// XOR_LUT_INIT is the truth table of the two-input look-up table that forms
// the carry-chain propagate signal p = a xor b; bit {b,a} of the constant is
// the table output, so 4'h6 is the XOR function.
package luk_pkg;

  parameter int unsigned LUK_N = 8;

  parameter logic [3:0] XOR_LUT_INIT = 4'h6;

endpackage
