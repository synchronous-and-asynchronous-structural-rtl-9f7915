// tb_luk_tnorm_sync: checks the synchronous Łukasiewicz t-norm,
// q = max(a + b - 1, 0) with 1 = 2^N - 1, registered on the rising edge.
// Every operand pair is applied at 4 bits and at the default width. Operands
// change on the falling edge; just before the next rising edge the output
// must still show the previous result (one register stage, no combinational
// path), and just after it the new result. The expected values come from the
// defining formula in integers. Saturated and unsaturated results are both
// counted and must both occur.
module tb_luk_tnorm_sync;

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

  luk_tnorm_sync #(.N(NS)) dut_s (.clk(clk), .a(as), .b(bs), .q(qs));
  luk_tnorm_sync           dut_l (.clk(clk), .a(al), .b(bl), .q(ql));

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
    int prev_s, prev_l;
    al = '0; bl = '0; as = '0; bs = '0;
    @(posedge clk);
    #1;
    prev_s = 0; prev_l = 0;
    for (int x = 0; x < 2**NL; x++)
      for (int y = 0; y < 2**NL; y++) begin
        @(negedge clk);
        al = NL'(x); bl = NL'(y);
        as = NS'(x); bs = NS'(y);
        #4;
        // Still the result of the previous operands: one clock of latency.
        checks++;
        if (int'(ql) !== prev_l || (x < 2**NS && y < 2**NS && int'(qs) !== prev_s)) begin
          failures++;
          if (failures < 10) $display("FAIL latency a=%0d b=%0d", x, y);
        end
        @(posedge clk);
        #1;
        checks++;
        if (x + y < (1 << NL) - 1) n_sat++; else n_pass++;
        if (int'(ql) !== ref_norm(x, y, NL)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d a=%0d b=%0d: got %0d want %0d", NL, x, y, ql, ref_norm(x, y, NL));
        end
        prev_l = ref_norm(x, y, NL);
        if (x < 2**NS && y < 2**NS) begin
          checks++;
          if (int'(qs) !== ref_norm(x, y, NS)) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=%0d a=%0d b=%0d: got %0d want %0d", NS, x, y, qs, ref_norm(x, y, NS));
          end
          prev_s = ref_norm(x, y, NS);
        end
      end
    $display("saturated=%0d passed=%0d", n_sat, n_pass);
    checks += 2;
    if (n_sat == 0) failures++;
    if (n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
