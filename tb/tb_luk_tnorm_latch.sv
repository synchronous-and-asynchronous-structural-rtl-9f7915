// tb_luk_tnorm_latch: checks the asynchronous (latch) Łukasiewicz t-norm,
// q = max(a + b - 1, 0) with 1 = 2^N - 1.
// With the gate open every operand pair is applied at 4 bits and at the
// default width and the output must follow combinationally. With the gate
// closed the output must hold its last value while the operands change,
// except that an operand pair with a + b < 1 (adder carry out 0) must
// force all zeros at once through the asynchronous clear input.
// Expected values come from the defining formula in integers.
module tb_luk_tnorm_latch;

  localparam int unsigned NS = 4;
  localparam int unsigned NL = luk_pkg::LUK_N;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   n_forced = 0;
  int   n_follow = 0;
  int   n_hold = 0;
  int   n_async = 0;

  always #5 clk = ~clk;

  logic          g;
  logic [NS-1:0] as, bs, qs;
  logic [NL-1:0] al, bl, ql;

  luk_tnorm_latch #(.N(NS)) dut_s (.g(g), .a(as), .b(bs), .q(qs));
  luk_tnorm_latch           dut_l (.g(g), .a(al), .b(bl), .q(ql));

  function automatic int ref_norm(int x, int y, int n);
    int one = (1 << n) - 1;
    return (x + y - one < 0) ? 0 : x + y - one;
  endfunction

  // True when the asynchronous clear is active, i.e. the adder's carry out
  // says the sum is out of range.
  function automatic bit forced(int x, int y, int n);
    return x + y < (1 << n) - 1;
  endfunction

  task automatic expect_q(input int got, input int want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, held_l, held_s, want;
    g = 1'b1;
    // Transparent: exhaustive.
    for (int i = 0; i < 2**NL; i++) begin
      for (int j = 0; j < 2**NL; j++) begin
        al = NL'(i); bl = NL'(j);
        as = NS'(i); bs = NS'(j);
        #1;
        want = ref_norm(i, j, NL);
        if (forced(i, j, NL)) n_forced++; else n_follow++;
        expect_q(int'(ql), want, "transparent N=8");
        if (i < 2**NS && j < 2**NS) expect_q(int'(qs), ref_norm(i, j, NS), "transparent N=4");
      end
      @(posedge clk);
    end
    // Closed gate: hold, and the asynchronous override.
    for (int k = 0; k < 2000; k++) begin
      g = 1'b1;
      x = int'($urandom_range((1 << NL) - 1)); y = int'($urandom_range((1 << NL) - 1));
      al = NL'(x); bl = NL'(y); as = NS'(x); bs = NS'(y);
      #1;
      g = 1'b0;
      #1;
      held_l = ref_norm(x, y, NL);
      held_s = ref_norm(x % (1 << NS), y % (1 << NS), NS);
      x = int'($urandom_range((1 << NL) - 1)); y = int'($urandom_range((1 << NL) - 1));
      al = NL'(x); bl = NL'(y); as = NS'(x); bs = NS'(y);
      #1;
      want = ref_norm(x, y, NL);
      if (forced(x, y, NL)) begin
        n_async++;
        expect_q(int'(ql), want, "forced while closed N=8");
      end else begin
        n_hold++;
        expect_q(int'(ql), held_l, "hold N=8");
      end
      want = ref_norm(x % (1 << NS), y % (1 << NS), NS);
      if (forced(x % (1 << NS), y % (1 << NS), NS)) expect_q(int'(qs), want, "forced while closed N=4");
      else expect_q(int'(qs), held_s, "hold N=4");
      @(posedge clk);
    end
    $display("forced=%0d followed=%0d held=%0d forced_while_closed=%0d",
             n_forced, n_follow, n_hold, n_async);
    checks += 4;
    if (n_forced == 0) failures++;
    if (n_follow == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_async == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
