// tb_luk_norms_top: end-to-end test of all six norm realizations at the
// default width, with the top's parameters left at their defaults.
//
// Every operand pair (2^N x 2^N) is applied on the falling clock edge. Just
// before the next rising edge the combinational and latch outputs must
// already show the new result and the synchronous outputs the previous one;
// just after the edge the synchronous outputs must show the new result, so
// the one-clock latency of the registered norms is checked on every pair.
// Expected values come from the defining formulas in integers:
//   t-conorm min(a + b, 1), t-norm max(a + b - 1, 0), 1 = 2^N - 1.
// The saturation mechanisms are counted and each must occur at least once:
// t-conorm set/preset (a + b > 1), t-norm reset/clear (a + b < 1), and the
// boundary a + b = 1 where both norms take their bound through the adder,
// and, with the latch gate closed, a latch holding a result that differs
// from what its inputs would now give.
module tb_luk_norms_top;

  localparam int unsigned N   = luk_pkg::LUK_N;
  localparam int          ONE = (1 << N) - 1;

  logic         clk = 1'b0;
  logic         latch_g;
  logic [N-1:0] a, b;
  logic [N-1:0] tconorm_comb, tnorm_comb, tconorm_sync, tnorm_sync;
  logic [N-1:0] tconorm_async, tnorm_async;
  int           checks = 0;
  int           failures = 0;
  int           n_conorm_sat = 0;
  int           n_norm_clear = 0;
  int           n_boundary = 0;
  int           n_inside = 0;
  int           cycles = 0;
  int           n_hold = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  luk_norms_top dut (
    .clk          (clk),
    .latch_g      (latch_g),
    .a            (a),
    .b            (b),
    .tconorm_comb (tconorm_comb),
    .tnorm_comb   (tnorm_comb),
    .tconorm_sync (tconorm_sync),
    .tnorm_sync   (tnorm_sync),
    .tconorm_async(tconorm_async),
    .tnorm_async  (tnorm_async)
  );

  function automatic int conorm_ref(int x, int y);
    return (x + y > ONE) ? ONE : x + y;
  endfunction

  function automatic int norm_ref(int x, int y);
    return (x + y < ONE) ? 0 : x + y - ONE;
  endfunction

  task automatic expect_q(input int got, input int want, input string what,
                          input int x, input int y);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%0d b=%0d: got %0d want %0d", what, x, y, got, want);
    end
  endtask

  initial begin
    repeat (3 * (1 << (2 * N)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_c, prev_n, start;
    a = '0;
    b = '0;
    latch_g = 1'b1;
    @(posedge clk);
    #1;
    prev_c = 0;
    prev_n = 0;
    start  = cycles;
    for (int x = 0; x <= ONE; x++) begin
      for (int y = 0; y <= ONE; y++) begin
        @(negedge clk);
        a = N'(x);
        b = N'(y);
        #4;
        if (x + y > ONE) n_conorm_sat++;
        else if (x + y < ONE) n_norm_clear++;
        else n_boundary++;
        if (x + y > 0 && x + y < ONE && x > 0 && y > 0) n_inside++;
        expect_q(int'(tconorm_comb),  conorm_ref(x, y), "tconorm_comb",  x, y);
        expect_q(int'(tnorm_comb),    norm_ref(x, y),   "tnorm_comb",    x, y);
        expect_q(int'(tconorm_async), conorm_ref(x, y), "tconorm_async", x, y);
        expect_q(int'(tnorm_async),   norm_ref(x, y),   "tnorm_async",   x, y);
        expect_q(int'(tconorm_sync),  prev_c, "tconorm_sync before edge", x, y);
        expect_q(int'(tnorm_sync),    prev_n, "tnorm_sync before edge",   x, y);
        @(posedge clk);
        #1;
        expect_q(int'(tconorm_sync), conorm_ref(x, y), "tconorm_sync", x, y);
        expect_q(int'(tnorm_sync),   norm_ref(x, y),   "tnorm_sync",   x, y);
        prev_c = conorm_ref(x, y);
        prev_n = norm_ref(x, y);
      end
    end
    // One result per clock: the whole sweep took one cycle per operand pair.
    checks++;
    if (cycles - start !== (1 << (2 * N))) begin
      failures++;
      $display("FAIL throughput: %0d cycles for %0d pairs", cycles - start, 1 << (2 * N));
    end
    // Latch gate closed: the latch outputs keep the last result unless the
    // preset (t-conorm) or clear (t-norm) is active for the new operands.
    for (int k = 0; k < 1000; k++) begin
      int x, y, held_c, held_n;
      latch_g = 1'b1;
      x = int'($urandom_range(ONE));
      y = int'($urandom_range(ONE));
      a = N'(x);
      b = N'(y);
      #1;
      latch_g = 1'b0;
      held_c = conorm_ref(x, y);
      held_n = norm_ref(x, y);
      #1;
      x = int'($urandom_range(ONE));
      y = int'($urandom_range(ONE));
      a = N'(x);
      b = N'(y);
      #1;
      expect_q(int'(tconorm_async), (x + y > ONE) ? ONE : held_c, "tconorm_async closed", x, y);
      expect_q(int'(tnorm_async),   (x + y < ONE) ? 0 : held_n,   "tnorm_async closed",   x, y);
      if (x + y <= ONE && conorm_ref(x, y) !== held_c) n_hold++;
      @(posedge clk);
    end
    $display("latch_holds=%0d", n_hold);
    checks++;
    if (n_hold == 0) failures++;
    $display("conorm_saturations=%0d norm_clears=%0d boundary=%0d unsaturated=%0d",
             n_conorm_sat, n_norm_clear, n_boundary, n_inside);
    checks += 4;
    if (n_conorm_sat == 0) failures++;
    if (n_norm_clear == 0) failures++;
    if (n_boundary == 0) failures++;
    if (n_inside == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
