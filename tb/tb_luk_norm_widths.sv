// tb_luk_norm_widths: runs the norm top at each resolution of the area
// comparison, 4, 8, 12, 16 and 24 bits, with corner and random operands.
// Every width must see saturating operand pairs (one of the two norms at its
// bound through the preset / clear path) and report no mismatch.
module tb_luk_norm_widths;

  localparam int NW = 5;
  localparam int unsigned WIDTHS [NW] = '{4, 8, 12, 16, 24};

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   c [NW];
  int   f [NW];
  int   s [NW];
  logic d [NW];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NW; i++) begin : g_w
    luk_width_checker #(.N(WIDTHS[i]), .PAIRS(3000)) u_chk (
      .clk(clk), .checks(c[i]), .failures(f[i]), .saturations(s[i]), .done(d[i])
    );
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NW; i++) if (!d[i]) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < NW; i++) begin
      $display("N=%0d checks=%0d failures=%0d saturations=%0d", WIDTHS[i], c[i], f[i], s[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (s[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
