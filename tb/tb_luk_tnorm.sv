// tb_luk_tnorm: exhaustive check of the combinational Łukasiewicz t-norm.
// Every operand pair is applied at 4 bits and at the default width; the
// expected value is worked out in integers from the defining formula
//   q = max(a + b - 1, 0)
// with 1 = 2^N - 1. Both the saturated and the unsaturated branch are
// counted, and a branch that never occurs counts as a failure.
module tb_luk_tnorm;

  localparam int unsigned NS = 4;
  localparam int unsigned NL = luk_pkg::LUK_N;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   n_sat = 0;
  int   n_pass = 0;

  always #5 clk = ~clk;

  logic [NS-1:0] as, bs, qs;
  logic [NL-1:0] al, bl, ql;

  luk_tnorm #(.N(NS)) dut_s (.a(as), .b(bs), .q(qs));
  luk_tnorm           dut_l (.a(al), .b(bl), .q(ql));

  function automatic int ref_norm(int x, int y, int n);
    int one = (1 << n) - 1;
    return (x + y - one < 0) ? 0 : x + y - one;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int one_l = (1 << NL) - 1;
    for (int x = 0; x < 2**NS; x++)
      for (int y = 0; y < 2**NS; y++) begin
        as = NS'(x); bs = NS'(y);
        #1;
        checks++;
        if (int'(qs) !== ref_norm(x, y, NS)) begin
          failures++;
          $display("FAIL N=%0d a=%0d b=%0d: got %0d want %0d", NS, x, y, qs, ref_norm(x, y, NS));
        end
      end
    for (int x = 0; x < 2**NL; x++) begin
      for (int y = 0; y < 2**NL; y++) begin
        al = NL'(x); bl = NL'(y);
        #1;
        checks++;
        if (x + y < one_l) n_sat++; else n_pass++;
        if (int'(ql) !== ref_norm(x, y, NL)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d a=%0d b=%0d: got %0d want %0d", NL, x, y, ql, ref_norm(x, y, NL));
        end
      end
      @(posedge clk);
    end
    $display("saturated=%0d passed=%0d", n_sat, n_pass);
    checks += 2;
    if (n_sat == 0) failures++;
    if (n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
