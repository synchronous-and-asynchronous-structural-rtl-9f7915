// luk_tnorm_sync: synchronous Łukasiewicz t-norm, q = max(a + b - 1, 0)
// registered on the rising clock edge.
//
// The adder runs with carry in 1. Each sum bit feeds a flip-flop with a
// synchronous reset (the FDR arrangement). Slice flip-flops only have an
// active-high set/reset, while the t-norm must clear its output when the
// carry out is 0, so one inverter drives the reset from the inverted carry
// out. In the FPGA that inverter shares the dual-output look-up table of the
// top bit's propagate function, so the norm still costs only the adder's
// N/4 slices. There is no other reset; the first clock edge defines q.
//
// Interface: clk; a, b N-bit fuzzy values; q N-bit registered result.
// Timing: one clock of latency.
module luk_tnorm_sync #(
  parameter int unsigned N = luk_pkg::LUK_N
) (
  input  logic         clk,
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

  // Inverter (one-input look-up table) on the carry out.
  always_comb not_carry_n = ~carry_n;

  // Flip-flops with synchronous reset (reset has priority over D).
  always_ff @(posedge clk) begin
    if (not_carry_n) q <= '0;
    else             q <= sum;
  end

endmodule
