// luk_norms_top: the three realizations of the Łukasiewicz t-norm and
// t-conorm side by side on one pair of operands.
//
// Fuzzy values are N-bit unsigned numbers, 0 = all zeros, 1 = all ones.
//   t-conorm (bounded sum)        a (+) b = min(a + b, 1)
//   t-norm   (bounded difference) a (x) b = max(a + b - 1, 0)
// Every norm is one N-bit carry-chain adder plus a saturation stage driven by
// the adder's carry out:
//   *_comb  OR / AND gates on the adder outputs (combinational)
//   *_sync  flip-flops with synchronous set / reset (one clock of latency)
//   *_async latches with asynchronous preset / clear (clockless)
// The clockless realization ties the latch gates to 1, so the latches are
// transparent and only their preset / clear inputs act. The shared gate is
// brought out as latch_g rather than tied inside, so that the storage
// elements survive synthesis as latches; tie it to 1 for the clockless norm,
// or drive it low to hold the last latched results.
//
// Interface: clk for the synchronous pair; latch_g gate of the latch pair;
// a, b N-bit operands; six N-bit results. Timing: *_comb follow a, b
// combinationally, *_async too while latch_g = 1; *_sync show the result of
// the operands sampled at the previous rising edge.
module luk_norms_top #(
  parameter int unsigned N = luk_pkg::LUK_N
) (
  input  logic         clk,
  input  logic         latch_g,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] tconorm_comb,
  output logic [N-1:0] tnorm_comb,
  output logic [N-1:0] tconorm_sync,
  output logic [N-1:0] tnorm_sync,
  output logic [N-1:0] tconorm_async,
  output logic [N-1:0] tnorm_async
);

  luk_tconorm #(.N(N)) u_tconorm (
    .a(a), .b(b), .q(tconorm_comb)
  );

  luk_tnorm #(.N(N)) u_tnorm (
    .a(a), .b(b), .q(tnorm_comb)
  );

  luk_tconorm_sync #(.N(N)) u_tconorm_sync (
    .clk(clk), .a(a), .b(b), .q(tconorm_sync)
  );

  luk_tnorm_sync #(.N(N)) u_tnorm_sync (
    .clk(clk), .a(a), .b(b), .q(tnorm_sync)
  );

  luk_tconorm_latch #(.N(N)) u_tconorm_latch (
    .g(latch_g), .a(a), .b(b), .q(tconorm_async)
  );

  luk_tnorm_latch #(.N(N)) u_tnorm_latch (
    .g(latch_g), .a(a), .b(b), .q(tnorm_async)
  );

endmodule
