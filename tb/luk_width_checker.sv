// luk_width_checker: drives one luk_norms_top of width N with random and
// corner operands and compares all six outputs with the defining formulas
// (t-conorm min(a + b, 1), t-norm max(a + b - 1, 0), 1 = 2^N - 1), worked out
// in 64-bit integers. Used by tb_luk_norm_widths to run several widths side
// by side. Operands change on the falling edge; combinational and latch
// outputs are checked before the rising edge, registered outputs after it.
// Reports its counts through checks / failures and raises done at the end.
module luk_width_checker #(
  parameter int unsigned N     = 8,
  parameter int unsigned PAIRS = 2000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   saturations,
  output logic done
);

  localparam longint ONE = (64'd1 << N) - 1;

  logic [N-1:0] a, b;
  logic [N-1:0] tconorm_comb, tnorm_comb, tconorm_sync, tnorm_sync;
  logic [N-1:0] tconorm_async, tnorm_async;

  luk_norms_top #(.N(N)) dut (
    .clk          (clk),
    .latch_g      (1'b1),
    .a            (a),
    .b            (b),
    .tconorm_comb (tconorm_comb),
    .tnorm_comb   (tnorm_comb),
    .tconorm_sync (tconorm_sync),
    .tnorm_sync   (tnorm_sync),
    .tconorm_async(tconorm_async),
    .tnorm_async  (tnorm_async)
  );

  function automatic longint conorm_ref(longint x, longint y);
    return (x + y > ONE) ? ONE : x + y;
  endfunction

  function automatic longint norm_ref(longint x, longint y);
    return (x + y < ONE) ? 0 : x + y - ONE;
  endfunction

  function automatic longint rand_operand();
    return longint'({$urandom, $urandom}) & ONE;
  endfunction

  task automatic expect_q(input longint got, input longint want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s: got %0d want %0d", N, what, got, want);
    end
  endtask

  initial begin
    longint x, y;
    checks = 0;
    failures = 0;
    saturations = 0;
    done = 1'b0;
    a = '0;
    b = '0;
    for (int k = 0; k < PAIRS; k++) begin
      case (k)
        0: begin x = ONE; y = ONE; end
        1: begin x = 0;   y = 0;   end
        2: begin x = ONE; y = 0;   end
        3: begin x = 1;   y = ONE - 1; end
        4: begin x = 1;   y = ONE; end
        default: begin x = rand_operand(); y = rand_operand(); end
      endcase
      @(negedge clk);
      a = N'(x);
      b = N'(y);
      #4;
      if (x + y !== ONE) saturations++;
      expect_q(longint'(tconorm_comb),  conorm_ref(x, y), "tconorm_comb");
      expect_q(longint'(tnorm_comb),    norm_ref(x, y),   "tnorm_comb");
      expect_q(longint'(tconorm_async), conorm_ref(x, y), "tconorm_async");
      expect_q(longint'(tnorm_async),   norm_ref(x, y),   "tnorm_async");
      @(posedge clk);
      #1;
      expect_q(longint'(tconorm_sync), conorm_ref(x, y), "tconorm_sync");
      expect_q(longint'(tnorm_sync),   norm_ref(x, y),   "tnorm_sync");
    end
    done = 1'b1;
  end

endmodule
