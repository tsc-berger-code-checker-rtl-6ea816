// Self-checking testbench for the two-variable two-rail checker trc.
// All 16 input patterns: two complementary pairs must give a complementary
// output whose f rail is ai XOR aj; any non-complementary pair must give
// f = g. Also confirms that the four test patterns 0101, 0110, 1001, 1010
// produce both output code words.
module tb_trc;
  logic ai, bi, aj, bj, f, g;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int seen_fg [2];

  trc dut (.ai(ai), .bi(bi), .aj(aj), .bj(bj), .f(f), .g(g));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen_fg = '{0, 0};
    for (int v = 0; v < 16; v++) begin
      bit code;
      {ai, bi, aj, bj} = 4'(v);
      code = (ai != bi) && (aj != bj);
      @(posedge clk);
      checks++;
      if (code) begin
        if (f == g || f != (ai ^ aj)) begin
          failures++;
          $display("trc code input %b%b%b%b gave fg=%b%b", ai, bi, aj, bj, f, g);
        end
        seen_fg[f]++;
      end else if (f != g) begin
        failures++;
        $display("trc non-code input %b%b%b%b gave code output fg=%b%b", ai, bi, aj, bj, f, g);
      end
    end
    checks++;
    if (seen_fg[0] != 2 || seen_fg[1] != 2) begin
      failures++;
      $display("trc output code words not balanced: %0d/%0d", seen_fg[0], seen_fg[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
