// tb_luk_carry_chain: checks the ripple-carry adder at 4 bits (exhaustive,
// both carry-in values) and at the default width (random operands plus the
// corner cases that ripple a carry through every bit).
module tb_luk_carry_chain;

  localparam int unsigned NS = 4;
  localparam int unsigned NL = luk_pkg::LUK_N;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [NS-1:0] as, bs, ss;
  logic          cis, cos;
  logic [NL-1:0] al, bl, sl;
  logic          cil, col;

  luk_carry_chain #(.N(NS)) dut_s (.a(as), .b(bs), .ci(cis), .s(ss), .co(cos));
  luk_carry_chain           dut_l (.a(al), .b(bl), .ci(cil), .s(sl), .co(col));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_l(input logic [NL-1:0] x, input logic [NL-1:0] y, input logic c);
    longint unsigned exp;
    al = x; bl = y; cil = c;
    @(posedge clk);
    exp = longint'(x) + longint'(y) + longint'(c);
    checks++;
    if ({col, sl} !== (NL+1)'(exp)) begin
      failures++;
      $display("FAIL N=%0d a=%0d b=%0d ci=%0d: got %0d", NL, x, y, c, {col, sl});
    end
  endtask

  initial begin
    int exp;
    al = '0; bl = '0; cil = 1'b0;
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < 2**NS; x++)
        for (int y = 0; y < 2**NS; y++) begin
          as = NS'(x); bs = NS'(y); cis = c[0];
          @(posedge clk);
          exp = x + y + c;
          checks++;
          if ({cos, ss} !== (NS+1)'(exp)) begin
            failures++;
            $display("FAIL N=%0d a=%0d b=%0d ci=%0d: got %0d", NS, x, y, c, {cos, ss});
          end
        end
    check_l('1, '0, 1'b1);
    check_l('1, '0, 1'b0);
    check_l('1, '1, 1'b1);
    check_l('0, '0, 1'b0);
    for (int k = 0; k < 2000; k++)
      check_l(NL'($urandom), NL'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
