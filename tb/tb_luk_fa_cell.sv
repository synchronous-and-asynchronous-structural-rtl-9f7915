// tb_luk_fa_cell: exhaustive check of the one-bit carry-chain full adder.
// All eight input combinations are applied; the expected sum and carry come
// from integer addition of the three input bits.
module tb_luk_fa_cell;

  logic clk = 1'b0;
  logic a, b, ci, s, co;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  luk_fa_cell dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 8; v++) begin
      {ci, b, a} = 3'(v);
      @(posedge clk);
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d: got co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
